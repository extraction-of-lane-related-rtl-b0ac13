// tb_magnitude_calc: random gradient pairs over the full -1020..1020 range
// plus the extremes; the registered magnitude must equal |Gx| + |Gy| one
// clock later, and the valid flag must follow the input by one clock.
module tb_magnitude_calc;
  import lane_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  grad_t gx = '0, gy = '0;
  logic out_valid;
  mag_t mag;
  int checks = 0, failures = 0;

  magnitude_calc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, b, e;
    logic v;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      a = int'($urandom_range(2040)) - 1020;
      b = int'($urandom_range(2040)) - 1020;
      if (n == 0) begin a = -1020; b = -1020; end
      if (n == 1) begin a = 1020;  b = -1020; end
      if (n == 2) begin a = 0;     b = 0;     end
      v = ($urandom_range(1) == 1);
      gx = grad_t'(a);
      gy = grad_t'(b);
      in_valid = v;
      e = (a < 0 ? -a : a) + (b < 0 ? -b : b);
      @(negedge clk);
      in_valid = 1'b0;
      checks++;
      if (int'(mag) != e || out_valid != v) begin
        failures++;
        $display("gx %0d gy %0d: mag %0d expected %0d valid %0b", a, b, mag, e, out_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
