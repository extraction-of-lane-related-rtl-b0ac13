// tb_line_buffer: checks that the line buffer returns, for every accepted
// pixel, the pixel of the same column one line earlier, with random gaps
// in the input stream. Reference: a copy of the previous line kept here.
module tb_line_buffer;
  localparam int W = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, sol = 1'b0;
  logic [7:0] din = '0, dout;
  int checks = 0, failures = 0;
  logic [7:0] prev [W];
  logic [7:0] cur  [W];

  line_buffer #(.W(W), .DW(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int line = 0; line < 20; line++) begin
      for (int x = 0; x < W; x++) begin
        while ($urandom_range(3) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
          sol = 1'b0;
        end
        @(negedge clk);
        in_valid = 1'b1;
        sol = (x == 0);
        din = 8'($urandom);
        cur[x] = din;
        #1;
        if (line > 0) begin
          checks++;
          if (dout !== prev[x]) begin
            failures++;
            $display("line %0d col %0d: got %0d expected %0d", line, x, dout, prev[x]);
          end
        end
      end
      prev = cur;
    end
    @(negedge clk);
    in_valid = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
