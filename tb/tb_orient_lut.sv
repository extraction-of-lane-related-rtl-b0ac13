// tb_orient_lut: reads the orientation ROM at every |Gx|/2 for a set of
// |Gy|/2 rows and at random addresses, in all four sign combinations, and
// compares with round(atan(Gx/Gy)) in degrees computed here in floating
// point (+/-90 for Gy = 0, 0 for Gx = Gy = 0). Entries whose exact angle
// lies within 1e-6 degree of a rounding boundary are not compared. The
// data must appear one clock after the address, and hold while en is low.
module tb_orient_lut;
  import lane_pkg::*;
  logic clk = 1'b0, en = 1'b0;
  logic [LUT_AW-1:0] addr = '0;
  ang_t data;
  int checks = 0, failures = 0;

  orient_lut dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected angle, or 999 when too close to a rounding boundary
  function automatic int ref_ang(logic [LUT_AW-1:0] a);
    real ax, ay, d, f;
    int  r;
    ax = real'(a[8:0]);
    ay = real'(a[18:10]);
    if (ay == 0.0) d = (ax == 0.0) ? 0.0 : 90.0;
    else           d = $atan(ax / ay) * 180.0 / 3.141592653589793;
    f = d - $floor(d);
    if (f > 0.5 - 1e-6 && f < 0.5 + 1e-6) return 999;
    r = int'($floor(d + 0.5));
    return (a[9] ^ a[19]) ? -r : r;
  endfunction

  task automatic probe(logic [LUT_AW-1:0] a);
    int e;
    @(negedge clk);
    addr = a;
    en = 1'b1;
    @(negedge clk);
    en = 1'b0;
    addr = ~a;
    e = ref_ang(a);
    if (e != 999) begin
      checks++;
      if (int'(data) != e) begin
        failures++;
        if (failures < 20) $display("addr %h (gx %0d gy %0d): %0d expected %0d",
                                    a, a[8:0], a[18:10], data, e);
      end
    end
    @(negedge clk);
    checks++;
    if (e != 999 && int'(data) != e) begin
      failures++;
      $display("data did not hold with en low");
    end
  endtask

  initial begin
    logic [LUT_AW-1:0] a;
    for (int gy = 0; gy < 512; gy += 37)
      for (int gx = 0; gx < 512; gx++)
        probe({1'b0, 9'(gy), 1'b0, 9'(gx)});
    for (int n = 0; n < 20000; n++) begin
      a = LUT_AW'($urandom);
      probe(a);
    end
    probe({1'b0, 9'd0, 1'b0, 9'd0});
    probe({1'b0, 9'd0, 1'b1, 9'd5});
    probe({1'b1, 9'd5, 1'b0, 9'd5});
    probe({1'b1, 9'd510, 1'b1, 9'd1});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
