// tb_gradient_calc: random 3x3 windows, including all-0 / all-255 corner
// cases, are fed with random valid gaps; every output must equal the Sobel
// gradients of Equation (1) computed here, and must appear exactly three
// clocks after its window.
module tb_gradient_calc;
  import lane_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  window_t z = '0;
  logic out_valid;
  grad_t gx, gy;
  pix_t pix;
  int checks = 0, failures = 0;
  int cyc = 0;
  int exp_gx [$], exp_gy [$], exp_pix [$], exp_cyc [$];

  gradient_calc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int zz(window_t w, int i);  // Z_i, i = 1..9
    return int'(w[i-1]);
  endfunction

  // compare outputs
  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_gx.size() == 0) begin
      failures++;
      $display("unexpected output");
    end else begin
      int egx, egy, ep, ec;
      egx = exp_gx.pop_front();
      egy = exp_gy.pop_front();
      ep  = exp_pix.pop_front();
      ec  = exp_cyc.pop_front();
      if (int'(gx) != egx || int'(gy) != egy || int'(pix) != ep || cyc - ec != 3) begin
        failures++;
        $display("gx %0d/%0d gy %0d/%0d pix %0d/%0d latency %0d", gx, egx, gy, egy, pix, ep, cyc - ec);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      for (int i = 0; i < 9; i++) z[i] = 8'($urandom);
      if (n == 5) z = '{default: 8'd255};
      if (n == 6) z = '0;
      if (n == 7) z = {8'd255, 8'd255, 8'd255, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0, 8'd0};
      if (n == 8) z = {8'd255, 8'd0, 8'd0, 8'd255, 8'd0, 8'd0, 8'd255, 8'd0, 8'd0};
      if (in_valid) begin
        exp_gx.push_back((zz(z,3) + 2*zz(z,6) + zz(z,9)) - (zz(z,1) + 2*zz(z,4) + zz(z,7)));
        exp_gy.push_back((zz(z,7) + 2*zz(z,8) + zz(z,9)) - (zz(z,1) + 2*zz(z,2) + zz(z,3)));
        exp_pix.push_back(zz(z,5));
        exp_cyc.push_back(cyc);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (6) @(negedge clk);
    checks++;
    if (exp_gx.size() != 0) begin
      failures++;
      $display("%0d outputs missing", exp_gx.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
