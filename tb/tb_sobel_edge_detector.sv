// tb_sobel_edge_detector: streams lines of random three-pixel columns (some
// lines are flat or step edges) with random gaps. For every column from the
// third on, the detector must deliver Gx, Gy (Equation (1)) and |Gx|+|Gy|
// (Equation (2)) computed here from the same window, the LUT-side gradients
// four clocks after the column enters and the aligned results five clocks
// after, in order and with nothing extra.
module tb_sobel_edge_detector;
  import lane_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, sol = 1'b0;
  pix_t n0 = '0, n1 = '0, n2 = '0;
  logic lut_valid, out_valid;
  grad_t lut_gx, lut_gy, gx, gy;
  mag_t mag;
  pix_t pix;
  int checks = 0, failures = 0;
  int cyc = 0;
  int qgx [$], qgy [$], qpix [$], qcyc [$];
  int lgx [$], lgy [$], lcyc [$];
  int col [3][64];

  sobel_edge_detector dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (lut_valid) begin
      int a, b, c;
      checks++;
      a = lgx.pop_front(); b = lgy.pop_front(); c = lcyc.pop_front();
      if (int'(lut_gx) != a || int'(lut_gy) != b || cyc - c != 4) begin
        failures++;
        $display("lut side: gx %0d/%0d gy %0d/%0d latency %0d", lut_gx, a, lut_gy, b, cyc - c);
      end
    end
    if (out_valid) begin
      int a, b, p, c, m;
      checks++;
      a = qgx.pop_front(); b = qgy.pop_front(); p = qpix.pop_front(); c = qcyc.pop_front();
      m = (a < 0 ? -a : a) + (b < 0 ? -b : b);
      if (int'(gx) != a || int'(gy) != b || int'(mag) != m || int'(pix) != p || cyc - c != 5) begin
        failures++;
        $display("out: gx %0d/%0d gy %0d/%0d mag %0d/%0d pix %0d/%0d latency %0d",
                 gx, a, gy, b, mag, m, pix, p, cyc - c);
      end
    end
  end

  function automatic int zv(int i, int x);   // Z_i of the window ending at column x
    int r = (i - 1) / 3, k = (i - 1) % 3;
    return col[r][x-k];
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int line = 0; line < 40; line++) begin
      int len, kind;
      len = 3 + $urandom_range(30);
      kind = $urandom_range(3);
      for (int x = 0; x < len; x++) begin
        while ($urandom_range(3) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
          sol = 1'b0;
        end
        @(negedge clk);
        in_valid = 1'b1;
        sol = (x == 0);
        for (int r = 0; r < 3; r++) begin
          case (kind)
            0: col[r][x] = 100;                        // flat
            1: col[r][x] = (x >= len / 2) ? 255 : 0;   // vertical step
            2: col[r][x] = (r == 0) ? 255 : 0;         // horizontal step
            default: col[r][x] = int'($urandom_range(255));
          endcase
        end
        n0 = 8'(col[0][x]); n1 = 8'(col[1][x]); n2 = 8'(col[2][x]);
        if (x >= 2) begin
          int a, b;
          a = (zv(3,x) + 2*zv(6,x) + zv(9,x)) - (zv(1,x) + 2*zv(4,x) + zv(7,x));
          b = (zv(7,x) + 2*zv(8,x) + zv(9,x)) - (zv(1,x) + 2*zv(2,x) + zv(3,x));
          qgx.push_back(a); qgy.push_back(b); qpix.push_back(zv(5,x)); qcyc.push_back(cyc);
          lgx.push_back(a); lgy.push_back(b); lcyc.push_back(cyc);
        end
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    sol = 1'b0;
    repeat (10) @(negedge clk);
    checks++;
    if (qgx.size() != 0 || lgx.size() != 0) begin
      failures++;
      $display("%0d outputs missing", qgx.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
