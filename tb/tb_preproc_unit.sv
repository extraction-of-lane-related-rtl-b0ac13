// tb_preproc_unit: sends random frames (one with a bright diagonal line on
// a dark background, one of noise) through the pre-processing unit at
// reduced size, with random gaps, and checks every edge record against a
// Sobel computed here on the same frame: centre coordinates, intensity,
// magnitude |Gx|+|Gy|, gradient signs and the orientation
// round(atan(Gx/Gy)) of the halved gradients. It checks that exactly
// (W-2) x (H-2) records arrive per frame, in raster order, and that each
// arrives 6 clocks after the pixel that completes its window.
module tb_preproc_unit;
  import lane_pkg::*;
  localparam int W = 16, H = 10;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sol = 1'b0, in_sof = 1'b0;
  pix_t in_pix = '0;
  logic edge_valid;
  edge_feat_t edge_o;
  logic [$clog2(W)-1:0] edge_x;
  logic [$clog2(H)-1:0] edge_y;
  int checks = 0, failures = 0;
  int cyc = 0;
  int img [H][W];
  int q_x [$], q_y [$], q_cyc [$];
  int got = 0;

  preproc_unit #(.W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int p(int y, int x);
    return img[y][x];
  endfunction

  always @(negedge clk) if (rst_n && edge_valid) begin
    int x, y, c, gx, gy, m, a, ax, ay;
    real d;
    got++;
    checks++;
    x = q_x.pop_front(); y = q_y.pop_front(); c = q_cyc.pop_front();
    // Z1 is the newest pixel of the newest line: Z1 = (y+1, x+1), Z9 = (y-1, x-1)
    gx = (p(y+1,x-1) + 2*p(y,x-1) + p(y-1,x-1)) - (p(y+1,x+1) + 2*p(y,x+1) + p(y-1,x+1));
    gy = (p(y-1,x+1) + 2*p(y-1,x) + p(y-1,x-1)) - (p(y+1,x+1) + 2*p(y+1,x) + p(y+1,x-1));
    m  = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    ax = (gx < 0 ? -gx : gx) / 2;
    ay = (gy < 0 ? -gy : gy) / 2;
    if (ay == 0) d = (ax == 0) ? 0.0 : 90.0;
    else         d = $atan(real'(ax) / real'(ay)) * 180.0 / 3.141592653589793;
    a = int'($floor(d + 0.5));
    if ((gx < 0) != (gy < 0)) a = -a;
    if (int'(edge_x) != x || int'(edge_y) != y || int'(edge_o.pix) != p(y, x) ||
        int'(edge_o.mag) != m || int'(edge_o.ang) != a || edge_o.gx_neg != (gx < 0) ||
        edge_o.gy_neg != (gy < 0) || cyc - c != 6) begin
      failures++;
      $display("(%0d,%0d)/(%0d,%0d): mag %0d/%0d ang %0d/%0d pix %0d/%0d latency %0d",
               edge_x, edge_y, x, y, edge_o.mag, m, edge_o.ang, a, edge_o.pix, p(y,x), cyc - c);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 3; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          img[y][x] = (f == 0) ? ((x - y >= 2 && x - y <= 4) ? 230 : 20) : int'($urandom_range(255));
      got = 0;
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          while ($urandom_range(4) == 0) begin
            @(negedge clk);
            in_valid = 1'b0; in_sol = 1'b0; in_sof = 1'b0;
          end
          @(negedge clk);
          in_valid = 1'b1;
          in_sol = (x == 0);
          in_sof = (x == 0 && y == 0);
          in_pix = 8'(img[y][x]);
          if (y >= 2 && x >= 2) begin
            q_x.push_back(x - 1); q_y.push_back(y - 1); q_cyc.push_back(cyc);
          end
        end
      end
      @(negedge clk);
      in_valid = 1'b0; in_sol = 1'b0; in_sof = 1'b0;
      repeat (10) @(negedge clk);
      checks++;
      if (got != (W - 2) * (H - 2) || q_x.size() != 0) begin
        failures++;
        $display("frame %0d: %0d records, %0d missing", f, got, q_x.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
