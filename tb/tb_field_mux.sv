// tb_field_mux: two field FIFOs are filled the way the capture unit fills
// them: the even field completely, the odd field slowly while the frame is
// already being read. The multiplexer must deliver the frame in raster
// order (even FIFO for even lines, odd FIFO for odd lines) with correct
// start-of-line/frame flags, must never read a FIFO that holds MIN_GAP
// pixels or fewer unless its field is complete, must stall at least once
// (the odd field is written more slowly than it is read), and must pulse
// frame_done once, with the last pixel.
module tb_field_mux;
  import lane_pkg::*;
  localparam int W = 10, H = 8, AW = 7, MIN_GAP = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [AW:0] even_count, odd_count;
  logic even_done = 1'b0, odd_done = 1'b0;
  pix_t even_data, odd_data;
  logic even_rd, odd_rd, out_valid, out_sol, out_sof, frame_done, busy, stall;
  pix_t out_pix;
  logic e_we = 1'b0, o_we = 1'b0;
  pix_t e_wd = '0, o_wd = '0;
  logic e_empty, e_full, o_empty, o_full;
  int checks = 0, failures = 0;
  int n_out = 0, stalls = 0, dones = 0, gap_violations = 0;

  field_mux #(.W(W), .H(H), .AW(AW), .MIN_GAP(MIN_GAP)) dut (.*);

  field_fifo #(.AW(AW), .DW(8)) u_e (.clk, .rst_n, .clr(1'b0), .wr_en(e_we), .wr_data(e_wd),
    .rd_en(even_rd), .rd_data(even_data), .count(even_count), .empty(e_empty), .full(e_full));
  field_fifo #(.AW(AW), .DW(8)) u_o (.clk, .rst_n, .clr(1'b0), .wr_en(o_we), .wr_data(o_wd),
    .rd_en(odd_rd), .rd_data(odd_data), .count(odd_count), .empty(o_empty), .full(o_full));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pixval(int y, int x);
    return (y * W + x) % 251;
  endfunction

  always @(negedge clk) if (rst_n) begin
    if (stall) stalls++;
    if (even_rd && int'(even_count) <= MIN_GAP && !even_done) gap_violations++;
    if (odd_rd && int'(odd_count) <= MIN_GAP && !odd_done) gap_violations++;
    if (out_valid) begin
      int y, x;
      y = n_out / W;
      x = n_out % W;
      checks++;
      if (int'(out_pix) != pixval(y, x) || out_sol != (x == 0) || out_sof != (n_out == 0)) begin
        failures++;
        $display("pixel %0d (%0d,%0d): %0d expected %0d sol %0b sof %0b",
                 n_out, x, y, out_pix, pixval(y, x), out_sol, out_sof);
      end
      n_out++;
    end
    if (frame_done) begin
      dones++;
      checks++;
      if (n_out != W * H) begin
        failures++;
        $display("frame_done after %0d pixels", n_out);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // even field: lines 0, 2, 4, ...
    for (int y = 0; y < H; y += 2)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        e_we = 1'b1; e_wd = 8'(pixval(y, x));
      end
    @(negedge clk);
    e_we = 1'b0;
    even_done = 1'b1;
    // odd field: written slowly, reading starts after its first line
    for (int y = 1; y < H; y += 2)
      for (int x = 0; x < W; x++) begin
        @(negedge clk);
        o_we = 1'b1; o_wd = 8'(pixval(y, x));
        if (y == 3 && x == 0) start = 1'b1;
        @(negedge clk);
        o_we = 1'b0;
        start = 1'b0;
        repeat (2) @(negedge clk);
      end
    odd_done = 1'b1;
    repeat (50) @(negedge clk);
    checks++;
    if (n_out != W * H || dones != 1 || busy) begin
      failures++;
      $display("%0d pixels, %0d frame_done pulses, busy %0b", n_out, dones, busy);
    end
    checks++;
    if (gap_violations != 0) begin
      failures++;
      $display("%0d reads inside the minimum gap", gap_violations);
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("the read never stalled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
