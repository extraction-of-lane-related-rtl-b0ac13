// tb_field_fifo: random simultaneous pushes and pops on a small FIFO,
// compared with a queue kept here: data order, count, empty and full. It
// fills the FIFO to full, drains it to empty, and checks that clr empties
// it.
module tb_field_fifo;
  localparam int AW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clr = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [7:0] wr_data = '0, rd_data;
  logic [AW:0] count;
  logic empty, full;
  int checks = 0, failures = 0;
  int q [$];
  int fulls = 0, empties = 0;

  field_fifo #(.AW(AW), .DW(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(int bias);   // bias: percent chance of a write
    @(negedge clk);
    checks++;
    if (int'(count) != q.size() || empty != (q.size() == 0) || full != (q.size() == 2**AW) ||
        (q.size() > 0 && int'(rd_data) != q[0])) begin
      failures++;
      $display("count %0d/%0d empty %0b full %0b data %0d/%0d", count, q.size(), empty, full,
               rd_data, q.size() > 0 ? q[0] : -1);
    end
    if (full) fulls++;
    if (empty) empties++;
    wr_en = ($urandom_range(99) < bias) && !full;
    rd_en = ($urandom_range(99) >= bias) && !empty;
    wr_data = 8'($urandom);
    if (rd_en) void'(q.pop_front());
    if (wr_en) q.push_back(int'(wr_data));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) step(80);
    for (int n = 0; n < 300; n++) step(20);
    for (int n = 0; n < 1000; n++) step(50);
    @(negedge clk);
    wr_en = 1'b0; rd_en = 1'b0; clr = 1'b1;
    q.delete();
    @(negedge clk);
    clr = 1'b0;
    for (int n = 0; n < 100; n++) step(60);
    checks++;
    if (fulls == 0 || empties == 0) begin
      failures++;
      $display("full seen %0d, empty seen %0d", fulls, empties);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
