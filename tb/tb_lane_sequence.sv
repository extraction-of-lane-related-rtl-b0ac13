// tb_lane_sequence: a sequence of road frames through the whole system at
// its default size, one grab per frame, as in a drive: the vanishing point
// and the lane marks move from frame to frame, and the last two frames are
// "rainy": per-pixel noise of +/-12 and +/-16 grey levels, lower mark
// contrast, and bright round reflections scattered over the road.
//
// For every frame the DSP model grabs, waits for read_irq, issues
// proc_start and collects the edge records. Every record is checked
// against a Sobel computed here on the same image. The edge distribution
// function (edge magnitude summed per orientation degree, 0..179, over the
// pixels whose magnitude reaches a threshold) is built from the records,
// and its largest value on each side of the 90-degree symmetry axis must
// lie within 2 degrees of the two
// lane-mark orientations given by the scene geometry. It also checks that
// repeated grabs each deliver exactly one full frame and one read_irq.
module tb_lane_sequence;
  import lane_pkg::*;
  localparam int W = IMG_W, H = IMG_H;
  localparam int HBLANK = 40, VBLANK = 200, PIX_DIV = 4;
  localparam int VY = -60;                         // vanishing point height
  localparam int NFRAMES = 4;
  localparam real PI = 3.141592653589793;

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
  logic i2c_cmd_valid = 1'b0, i2c_cmd_ready, i2c_done, i2c_ack_err, scl_o, sda_o;
  logic sda_i = 1'b1;
  logic [6:0] i2c_dev_addr = '0;
  logic [7:0] i2c_reg_addr = '0, i2c_wr_data = '0;

  int checks = 0, failures = 0;
  int img [H][W];
  int n_raw = 0, n_edge = 0, n_irq = 0, n_edge_bad = 0, n_raw_bad = 0;
  int mag_th = 200;
  real edf [180];

  lane_onboard_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- scene ----------------
  function automatic int sqr(int v);
    return v * v;
  endfunction

  function automatic real mark(int vx, int x_bottom, int x, int y);
    real xc, dx;
    xc = real'(vx) + real'(x_bottom - vx) * real'(y - VY) / real'(H - 1 - VY);
    dx = real'(x) - xc;
    if (dx < 0.0) dx = -dx;
    if (dx <= 2.0) return 1.0;
    if (dx >= 5.0) return 0.0;
    return (5.0 - dx) / 3.0;
  endfunction

  // noise: uniform per-pixel noise of +/-noise; blobs: bright round
  // reflections of radius 4 at random places (wet road)
  task automatic draw(int vx, int lx, int rx, int noise, int contrast, int blobs);
    int bx [16], by [16];
    for (int b = 0; b < blobs; b++) begin
      bx[b] = int'($urandom_range(W - 1));
      by[b] = int'($urandom_range(H - 1));
    end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        real c;
        int  v;
        c = mark(vx, lx, x, y) + mark(vx, rx, x, y);
        for (int b = 0; b < blobs; b++)
          if (sqr(x - bx[b]) + sqr(y - by[b]) <= 16) c = 1.0;
        if (c > 1.0) c = 1.0;
        v = 60 + int'($urandom_range(2 * noise)) - noise + int'(c * real'(contrast));
        img[y][x] = (v < 0) ? 0 : (v > 255) ? 255 : v;
      end
  endtask

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

  // ---------------- DSP side: records and EDF ----------------
  always @(negedge clk) if (rst_n) begin
    if (read_irq) n_irq++;
    if (raw_valid) begin
      if (int'(raw_pix) != img[n_raw / W][n_raw % W]) n_raw_bad++;
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
      else         r = $atan(real'(ax) / real'(ay)) * 180.0 / PI;
      a = int'($floor(r + 0.5));
      if ((gx < 0) != (gy < 0)) a = -a;
      if (x != n_edge % (W - 2) + 1 || y != n_edge / (W - 2) + 1 || int'(edge_o.mag) != m ||
          int'(edge_o.ang) != a || int'(edge_o.pix) != img[y][x] ||
          edge_o.gx_neg != (gx < 0) || edge_o.gy_neg != (gy < 0)) n_edge_bad++;
      if (int'(edge_o.mag) >= mag_th) begin
        d = int'(edge_o.ang);
        if (d < 0) d += 180;
        if (d == 180) d = 0;
        edf[d] += real'(edge_o.mag);
      end
      n_edge++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_frame(int k, int vx, int lx, int rx, int noise, int contrast, int blobs, int th);
    int p1, p2, e1, e2;
    real best1, best2;
    draw(vx, lx, rx, noise, contrast, blobs);
    mag_th = th;
    for (int d = 0; d < 180; d++) edf[d] = 0.0;
    n_raw = 0; n_edge = 0; n_irq = 0; n_edge_bad = 0; n_raw_bad = 0;
    @(negedge clk);
    grab = 1'b1;
    @(negedge clk);
    grab = 1'b0;
    while (!read_irq) @(negedge clk);
    repeat (20) @(negedge clk);
    proc_start = 1'b1;
    @(negedge clk);
    proc_start = 1'b0;
    while (!frame_done) @(negedge clk);
    repeat (5) @(negedge clk);
    check(n_raw == W * H && n_raw_bad == 0, "raw frame");
    check(n_edge == (W - 2) * (H - 2) && n_edge_bad == 0, "edge records");
    check(n_irq == 1, "one read_irq per grab");
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
    e1 = int'($floor($atan(real'(H - 1 - VY) / real'(vx - lx)) * 180.0 / PI + 0.5));
    e2 = 180 - int'($floor($atan(real'(H - 1 - VY) / real'(rx - vx)) * 180.0 / PI + 0.5));
    $display("frame %0d (noise %0d): EDF maxima at %0d and %0d, lane marks at %0d and %0d",
             k, noise, p1, p2, e1, e2);
    check((sqr(p1 - e1) <= 4 && sqr(p2 - e2) <= 4) || (sqr(p1 - e2) <= 4 && sqr(p2 - e1) <= 4),
          "EDF maxima at the lane orientations");
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (1000) @(negedge clk);
    //         frame vx   lx   rx   noise contrast blobs threshold
    run_frame(0,   160,  20, 300,  4,   160,     0,    200);   // daytime
    run_frame(1,   140,   0, 290,  4,   160,     0,    200);   // drifting right in the lane
    run_frame(2,   185,  45, 320,  12,  110,     6,    200);   // rain
    run_frame(3,   160,  20, 300,  16,  100,     12,   200);   // heavier rain
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
