// tb_lane_onboard_top: end-to-end run of the whole system at its default
// size (320x240 frame), with models of the chips around the FPGA.
//
// Camera and decoder: a free-running interlaced source of a synthetic road
// image, dark asphalt with light texture and two bright lane marks (with
// soft edges) that
// meet at a vanishing point above the image, delivered as alternating
// even/odd fields at one pixel every fourth clock with line and field
// blanking.
//
// DSP: programs four decoder registers over I2C (a slave model answers),
// issues grab in the middle of a field, waits for read_irq (60th odd line)
// and answers with proc_start. It checks the raw frame pixel for pixel and
// every edge record against a Sobel computed here on the same image
// (magnitude, signs, orientation of the halved gradients, coordinates), then
// builds the edge distribution function - the histogram of edge magnitude
// over orientation (0..179 degrees) of the pixels above a magnitude
// threshold - finds its largest value on each side of the 90-degree
// symmetry axis and checks that these lie
// within 2 degrees of the orientations of the two lane marks worked out
// from the image geometry. Finally it writes a result image into the output
// memory, requests a bank swap, and an encoder model checks that the next
// displayed frame is that image while the previous one stays intact.
//
// Mechanisms counted, each must occur: grab waiting for an even field,
// read_irq, read stalls behind the write side, bank swap, I2C writes.
module tb_lane_onboard_top;
  import lane_pkg::*;
  localparam int W = IMG_W, H = IMG_H;
  localparam int HBLANK = 40, VBLANK = 200;
  localparam int PIX_DIV = 4;                 // clocks per decoder pixel
  localparam int VX = 160, VY = -60;          // vanishing point
  localparam int LX = 20, RX = 300;           // lane marks at the bottom line
  localparam int MAG_TH = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic dec_vs = 1'b0, dec_odd = 1'b0, dec_valid = 1'b0;
  pix_t dec_pix = '0;
  logic grab = 1'b0, proc_start = 1'b0;
  logic read_irq, capture_busy, proc_busy, read_stall, frame_done;
  logic raw_valid, raw_sol, raw_sof;
  pix_t raw_pix;
  logic edge_valid;
  edge_feat_t edge_o;
  logic [$clog2(W)-1:0] edge_x;
  logic [$clog2(H)-1:0] edge_y;
  logic out_wr_en = 1'b0, out_swap = 1'b0, out_swap_pending;
  logic [$clog2(W*H)-1:0] out_wr_addr = '0;
  pix_t out_wr_data = '0;
  logic disp_sof = 1'b0, disp_rd = 1'b0, disp_valid, disp_bank;
  pix_t disp_pix;
  logic i2c_cmd_valid = 1'b0, i2c_cmd_ready, i2c_done, i2c_ack_err, scl_o, sda_o, sda_i;
  logic [6:0] i2c_dev_addr = '0;
  logic [7:0] i2c_reg_addr = '0, i2c_wr_data = '0;

  int checks = 0, failures = 0;
  int img [H][W];
  int n_raw = 0, n_edge = 0, n_irq = 0, n_stall = 0, n_wait = 0, n_swap = 0, n_i2c = 0;
  int n_edge_bad = 0, n_raw_bad = 0;
  real edf [180];

  lane_onboard_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- scene ----------------
  // Each mark is 4 pixels wide with a 3-pixel linear ramp on both sides,
  // measured along the line, so that its edges are not staircases.
  function automatic real mark(int x_bottom, int x, int y);
    real xc, dx;
    xc = real'(VX) + real'(x_bottom - VX) * real'(y - VY) / real'(H - 1 - VY);
    dx = real'(x) - xc;
    if (dx < 0.0) dx = -dx;
    if (dx <= 2.0) return 1.0;
    if (dx >= 5.0) return 0.0;
    return (5.0 - dx) / 3.0;
  endfunction

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        real c;
        c = mark(LX, x, y) + mark(RX, x, y);
        if (c > 1.0) c = 1.0;
        img[y][x] = 50 + int'(((x * 7 + y * 13) ^ (x * y)) % 8) + int'(c * 160.0);
      end
  end

  // ---------------- camera / decoder ----------------
  initial begin
    @(posedge rst_n);
    forever begin
      for (int f = 0; f < 2; f++) begin
        @(negedge clk);
        dec_vs = 1'b1; dec_odd = f[0];
        @(negedge clk);
        dec_vs = 1'b0;
        for (int l = 0; l < H / 2; l++) begin
          repeat (HBLANK) @(negedge clk);
          for (int x = 0; x < W; x++) begin
            dec_valid = 1'b1;
            dec_pix = 8'(img[2 * l + f][x]);
            @(negedge clk);
            dec_valid = 1'b0;
            repeat (PIX_DIV - 1) @(negedge clk);
          end
        end
        repeat (VBLANK) @(negedge clk);
      end
    end
  end

  // ---------------- I2C slave of the decoder ----------------
  logic slave_ack = 1'b0, scl_q = 1'b1, sda_q = 1'b1;
  int   sbit = 0;
  always @(posedge clk) begin
    scl_q <= scl_o;
    sda_q <= sda_i;
    if (scl_q && scl_o && sda_q && !sda_i) sbit <= 0;                   // START seen
    else if (!scl_q && scl_o) sbit <= sbit + 1;
    if (scl_q && !scl_o) slave_ack <= (sbit == 8 || sbit == 17 || sbit == 26);
  end
  assign sda_i = sda_o && !slave_ack;

  // ---------------- monitors ----------------
  always @(negedge clk) if (rst_n) begin
    if (read_irq) n_irq++;
    if (read_stall) n_stall++;
    if (raw_valid) begin
      if (int'(raw_pix) != img[n_raw / W][n_raw % W] || raw_sol != (n_raw % W == 0) ||
          raw_sof != (n_raw == 0)) n_raw_bad++;
      n_raw++;
    end
    if (edge_valid) begin
      int x, y, gx, gy, m, ax, ay, a, d;
      real r;
      x = int'(edge_x);
      y = int'(edge_y);
      gx = (img[y+1][x-1] + 2*img[y][x-1] + img[y-1][x-1]) - (img[y+1][x+1] + 2*img[y][x+1] + img[y-1][x+1]);
      gy = (img[y-1][x+1] + 2*img[y-1][x] + img[y-1][x-1]) - (img[y+1][x+1] + 2*img[y+1][x] + img[y+1][x-1]);
      m  = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
      ax = (gx < 0 ? -gx : gx) / 2;
      ay = (gy < 0 ? -gy : gy) / 2;
      if (ay == 0) r = (ax == 0) ? 0.0 : 90.0;
      else         r = $atan(real'(ax) / real'(ay)) * 180.0 / 3.141592653589793;
      a = int'($floor(r + 0.5));
      if ((gx < 0) != (gy < 0)) a = -a;
      if (x != n_edge % (W - 2) + 1 || y != n_edge / (W - 2) + 1 || int'(edge_o.mag) != m ||
          int'(edge_o.ang) != a || int'(edge_o.pix) != img[y][x] ||
          edge_o.gx_neg != (gx < 0) || edge_o.gy_neg != (gy < 0)) begin
        n_edge_bad++;
        if (n_edge_bad < 10)
          $display("edge (%0d,%0d) #%0d: mag %0d/%0d ang %0d/%0d", x, y, n_edge, edge_o.mag, m, edge_o.ang, a);
      end
      // edge distribution function
      if (int'(edge_o.mag) >= MAG_TH) begin
        d = int'(edge_o.ang);
        if (d < 0) d += 180;
        if (d == 180) d = 0;
        edf[d] += real'(edge_o.mag);
      end
      n_edge++;
    end
  end

  task automatic i2c_write(logic [7:0] ra, logic [7:0] d);
    @(negedge clk);
    while (!i2c_cmd_ready) @(negedge clk);
    i2c_cmd_valid = 1'b1; i2c_dev_addr = 7'h44; i2c_reg_addr = ra; i2c_wr_data = d;
    @(negedge clk);
    i2c_cmd_valid = 1'b0;
    while (!i2c_done) @(negedge clk);
    if (!i2c_ack_err) n_i2c++;
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one display frame from the encoder side; returns mismatches against exp
  task automatic display_frame(bit inverted, output int bad);
    bad = 0;
    @(negedge clk);
    disp_sof = 1'b1;
    for (int i = 0; i < W * H; i++) begin
      disp_rd = 1'b1;
      @(negedge clk);
      disp_sof = 1'b0;
      if (!disp_valid || int'(disp_pix) != (inverted ? 255 - img[i / W][i % W] : img[i / W][i % W]))
        bad++;
    end
    disp_rd = 1'b0;
  endtask

  initial begin
    int t0, p1, p2, e1, e2, bad;
    real best1, best2;
    for (int d = 0; d < 180; d++) edf[d] = 0.0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    // DSP set-up of the decoder's crop window (register numbers are examples)
    i2c_write(8'h03, 8'h12);   // crop MSBs
    i2c_write(8'h04, 8'h16);   // VDELAY
    i2c_write(8'h05, 8'hF0);   // VACTIVE
    i2c_write(8'h07, 8'h40);   // HACTIVE
    check(n_i2c == 4, "I2C writes acknowledged");

    // grab in the middle of a field: capture waits for the next even field
    repeat (30000) @(negedge clk);
    grab = 1'b1;
    @(negedge clk);
    grab = 1'b0;
    while (!dec_vs || dec_odd) begin
      if (capture_busy) n_wait++;
      @(negedge clk);
    end
    while (!read_irq) @(negedge clk);
    check(int'(dut.u_odd.count) == 60 * W, "read_irq after the 60th odd line");
    repeat (20) @(negedge clk);
    proc_start = 1'b1;
    @(negedge clk);
    proc_start = 1'b0;
    t0 = 0;
    while (!frame_done) begin
      @(negedge clk);
      t0++;
    end
    repeat (5) @(negedge clk);
    $display("frame processed %0d clocks after proc_start; %0d stall clocks", t0, n_stall);
    check(n_raw == W * H && n_raw_bad == 0, "raw frame");
    check(n_edge == (W - 2) * (H - 2) && n_edge_bad == 0, "edge records");
    check(n_irq == 1, "one read_irq");
    check(n_wait > 0, "grab waited for an even field");
    check(n_stall > 0, "read stalled behind the odd-field writes");

    // EDF peaks
    // the largest value on each side of the 90-degree symmetry axis
    best1 = -1.0; best2 = -1.0; p1 = -1; p2 = -1;
    for (int d = 0; d < 90; d++)
      if (edf[d] > best1) begin
        best1 = edf[d]; p1 = d;
      end
    for (int d = 91; d < 180; d++)
      if (edf[d] > best2) begin
        best2 = edf[d]; p2 = d;
      end
    // lane mark orientation: gradient is normal to the mark, angle = -atan(dy/dx)
    e1 = int'($floor($atan(real'(H - 1 - VY) / real'(VX - LX)) * 180.0 / 3.141592653589793 + 0.5));
    e2 = 180 - e1;
    $display("EDF maxima at %0d and %0d degrees, lane marks at %0d and %0d", p1, p2, e1, e2);
    check(((p1 - e1) * (p1 - e1) <= 4 && (p2 - e2) * (p2 - e2) <= 4) ||
          ((p1 - e2) * (p1 - e2) <= 4 && (p2 - e1) * (p2 - e1) <= 4), "EDF maxima at lane orientations");

    // image output unit: show the raw frame, then swap to the inverted one
    for (int i = 0; i < W * H; i++) begin
      @(negedge clk);
      out_wr_en = 1'b1; out_wr_addr = ($clog2(W*H))'(i); out_wr_data = 8'(img[i / W][i % W]);
    end
    @(negedge clk);
    out_wr_en = 1'b0;
    out_swap = 1'b1;
    @(negedge clk);
    out_swap = 1'b0;
    display_frame(1'b0, bad);
    if (!out_swap_pending) n_swap++;
    check(bad == 0, "first displayed frame");
    for (int i = 0; i < W * H; i++) begin
      @(negedge clk);
      out_wr_en = 1'b1; out_wr_addr = ($clog2(W*H))'(i); out_wr_data = 8'(255 - img[i / W][i % W]);
    end
    @(negedge clk);
    out_wr_en = 1'b0;
    out_swap = 1'b1;
    @(negedge clk);
    out_swap = 1'b0;
    display_frame(1'b1, bad);
    if (!out_swap_pending) n_swap++;
    check(bad == 0, "second displayed frame after bank swap");
    check(n_swap == 2, "two bank swaps");

    $display("mechanisms: i2c %0d, grab wait %0d, irq %0d, stall %0d, swap %0d",
             n_i2c, n_wait, n_irq, n_stall, n_swap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
