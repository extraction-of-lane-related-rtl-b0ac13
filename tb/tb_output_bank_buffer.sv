// tb_output_bank_buffer: the DSP side writes frame 1, requests a swap and
// starts writing frame 2 while frame 1 is displayed, and so on. Every
// displayed frame must be exactly the last frame whose swap took effect,
// even though the other bank is being written at the same time; a swap
// requested in mid-frame must wait for the next display frame start
// (swap_pending high meanwhile). Display data must follow disp_rd by one
// clock.
module tb_output_bank_buffer;
  import lane_pkg::*;
  localparam int W = 6, H = 4, N = W * H;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, swap = 1'b0, disp_sof = 1'b0, disp_rd = 1'b0;
  logic [$clog2(N)-1:0] wr_addr = '0;
  pix_t wr_data = '0;
  logic swap_pending, disp_valid, disp_bank;
  pix_t disp_pix;
  int checks = 0, failures = 0;
  int swaps = 0;

  output_bank_buffer #(.W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int frame_pix(int f, int i);
    return (f * 37 + i * 5) % 256;
  endfunction

  // display one frame while (optionally) writing frame wf; expect frame ef
  task automatic display_frame(int ef, int wf);
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      disp_sof = (i == 0);
      disp_rd  = 1'b1;
      wr_en    = (wf >= 0);
      wr_addr  = ($clog2(N))'(N - 1 - i);
      wr_data  = 8'(frame_pix(wf, N - 1 - i));
      @(negedge clk);
      disp_sof = 1'b0;
      disp_rd  = 1'b0;
      wr_en    = 1'b0;
      checks++;
      if (!disp_valid || int'(disp_pix) != frame_pix(ef, i)) begin
        failures++;
        $display("frame %0d pixel %0d: %0d expected %0d", ef, i, disp_pix, frame_pix(ef, i));
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // frame 0 into the hidden bank, then swap before the first display frame
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_addr = ($clog2(N))'(i); wr_data = 8'(frame_pix(0, i));
    end
    @(negedge clk);
    wr_en = 1'b0;
    swap = 1'b1;
    @(negedge clk);
    swap = 1'b0;
    checks++;
    if (!swap_pending) begin
      failures++;
      $display("swap not pending");
    end
    display_frame(0, 1);           // shows frame 0, frame 1 written behind it
    @(negedge clk);
    swap = 1'b1;                   // request in mid-stream
    @(negedge clk);
    swap = 1'b0;
    display_frame(1, 2);           // swap takes effect at this frame start
    display_frame(1, 2);           // no swap requested: frame 1 again
    @(negedge clk);
    swap = 1'b1;
    @(negedge clk);
    swap = 1'b0;
    display_frame(2, -1);
    checks++;
    if (swap_pending) begin
      failures++;
      $display("swap still pending");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
