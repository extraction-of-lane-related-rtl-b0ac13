// tb_capture_ctrl: a small decoder model produces fields of known pixels
// with blanking and random gaps. Four grabs are issued, each at a different
// point of the field sequence (during an even field, during an odd field,
// in vertical blanking, and right after the previous grab ended). For each
// grab: nothing may be written before it; the first even field that starts
// after the grab must go, pixel for pixel, to the even FIFO and the odd
// field that follows to the odd FIFO; nothing else may be written.
// read_irq must pulse once, on the clock after the READ_LINE-th odd line is
// complete; even_done/odd_done must rise when their field is complete and
// be clear during the grab; fifo_clr must pulse once, on the grab.
module tb_capture_ctrl;
  import lane_pkg::*;
  localparam int W = 8, H = 12, READ_LINE = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic grab = 1'b0, dec_vs = 1'b0, dec_odd = 1'b0, dec_valid = 1'b0;
  pix_t dec_pix = '0;
  logic fifo_clr, even_we, odd_we, even_done, odd_done, busy, read_irq;
  pix_t wr_pix;
  int checks = 0, failures = 0;
  int even_got [$], odd_got [$], even_exp [$], odd_exp [$];
  int irq_count = 0, irq_at = -1, clr_count = 0, odd_written = 0;

  capture_ctrl #(.W(W), .H(H), .READ_LINE(READ_LINE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (read_irq) begin
      irq_count++;
      irq_at = odd_written;
    end
    if (even_we) even_got.push_back(int'(wr_pix));
    if (odd_we) begin
      odd_got.push_back(int'(wr_pix));
      odd_written++;
    end
    if (fifo_clr) clr_count++;
  end

  task automatic field(bit odd, int tag, bit keep);
    @(negedge clk);
    dec_vs = 1'b1; dec_odd = odd;
    @(negedge clk);
    dec_vs = 1'b0;
    for (int y = 0; y < H / 2; y++) begin
      repeat (3) @(negedge clk);   // horizontal blanking
      for (int x = 0; x < W; x++) begin
        dec_valid = 1'b0;
        while ($urandom_range(2) == 0) @(negedge clk);
        dec_valid = 1'b1;
        dec_pix = 8'(tag * 16 + y * W + x);
        if (keep) begin
          if (odd) odd_exp.push_back(int'(dec_pix));
          else     even_exp.push_back(int'(dec_pix));
        end
        @(negedge clk);
      end
      dec_valid = 1'b0;
    end
    repeat (5) @(negedge clk);     // vertical blanking
  endtask

  task automatic check_pixels();
    checks++;
    if (even_got.size() != even_exp.size() || odd_got.size() != odd_exp.size()) begin
      failures++;
      $display("even %0d/%0d odd %0d/%0d pixels", even_got.size(), even_exp.size(),
               odd_got.size(), odd_exp.size());
    end
    for (int i = 0; i < even_exp.size() && i < even_got.size(); i++) begin
      checks++;
      if (even_got[i] != even_exp[i]) begin
        failures++;
        if (failures < 10) $display("even pixel %0d: %0d, expected %0d", i, even_got[i], even_exp[i]);
      end
    end
    for (int i = 0; i < odd_exp.size() && i < odd_got.size(); i++) begin
      checks++;
      if (odd_got[i] != odd_exp[i]) begin
        failures++;
        if (failures < 10) $display("odd pixel %0d: %0d, expected %0d", i, odd_got[i], odd_exp[i]);
      end
    end
  endtask

  task automatic pulse_grab();
    @(negedge clk);
    grab = 1'b1;
    @(negedge clk);
    grab = 1'b0;
    checks++;
    if (!busy || even_done || odd_done || !fifo_clr) begin
      failures++;
      $display("after grab: busy %0b even_done %0b odd_done %0b fifo_clr %0b",
               busy, even_done, odd_done, fifo_clr);
    end
  endtask

  task automatic start_grab();
    even_got.delete(); odd_got.delete(); even_exp.delete(); odd_exp.delete();
    irq_count = 0; irq_at = -1; clr_count = 0; odd_written = 0;
  endtask

  task automatic finish_grab(int g);
    checks++;
    if (!even_done || !odd_done || busy) begin
      failures++;
      $display("grab %0d: even_done %0b odd_done %0b busy %0b", g, even_done, odd_done, busy);
    end
    check_pixels();
    checks++;
    if (irq_count != 1 || irq_at != READ_LINE * W) begin
      failures++;
      $display("grab %0d: read_irq %0d times, after %0d odd pixels", g, irq_count, irq_at);
    end
    checks++;
    if (clr_count != 1) begin
      failures++;
      $display("grab %0d: fifo_clr %0d times", g, clr_count);
    end
  endtask

  // Grab in the middle of a field: the field itself is not kept.
  task automatic grab_during(bit odd, int tag);
    fork
      field(odd, tag, 1'b0);
      begin
        repeat (W * 2) @(negedge clk);
        pulse_grab();
      end
    join
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    field(1'b0, 1, 1'b0);          // no grab yet: ignored
    checks++;
    if (even_got.size() != 0 || odd_got.size() != 0 || busy) begin
      failures++;
      $display("written before any grab");
    end

    // Grab 0: in vertical blanking before an odd field.
    start_grab();
    pulse_grab();
    field(1'b1, 2, 1'b0);          // odd field before the first even: ignored
    field(1'b0, 3, 1'b1);
    checks++;
    if (!even_done || odd_done) begin
      failures++;
      $display("after even field: even_done %0b odd_done %0b", even_done, odd_done);
    end
    field(1'b1, 4, 1'b1);
    field(1'b0, 5, 1'b0);          // grab is over: ignored
    finish_grab(0);

    // Grab 1: during an even field, which must be skipped.
    start_grab();
    grab_during(1'b0, 6);
    field(1'b1, 7, 1'b0);
    field(1'b0, 8, 1'b1);
    field(1'b1, 9, 1'b1);
    finish_grab(1);

    // Grab 2: during an odd field.
    start_grab();
    grab_during(1'b1, 10);
    field(1'b0, 11, 1'b1);
    field(1'b1, 12, 1'b1);
    finish_grab(2);

    // Grab 3: straight after the previous one, before the next even field.
    start_grab();
    pulse_grab();
    field(1'b0, 13, 1'b1);
    field(1'b1, 14, 1'b1);
    field(1'b0, 15, 1'b0);
    field(1'b1, 0, 1'b0);
    finish_grab(3);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
