// orient_lut: gradient orientation look-up table, a 1M x 8 ROM returning
// round(atan(Gx/Gy)) in whole degrees (-90..90, two's complement).
//
// The arctangent cannot be computed in one clock, so it is read from a
// ROM addressed by the gradients, as the document does with an M27C801
// EPROM. Address bits 8:0 are |Gx|/2, bit 9 the sign of Gx, bits 18:10
// |Gy|/2 and bit 19 the sign of Gy (lane_pkg::lut_addr builds it). The
// halving that folds -1020..1020 into -512..512 is the document's;
// rounding to the nearest degree, atan(x/0) = +/-90 and atan(0/0) = 0 are
// this design's choices.
//
// The contents are computed at elaboration with integer arithmetic only:
// for each quadrant-free pair (|Gx|, |Gy|) the angle is the number of
// half-degree boundaries b_k = k + 0.5 degrees (k = 0..89) for which
// |Gx|*cos(b_k) > |Gy|*sin(b_k). The cos/sin pairs come from rotating the
// vector (cos 0.5deg, sin 0.5deg) by 1 degree at a time in Q30 fixed
// point; the four constants below are round(2^30 * cos/sin(1deg)) and
// round(2^30 * cos/sin(0.5deg)). The sign of the result is the product of
// the two gradient signs.
//
// Timing: synchronous read, data one clock after addr when en is high
// (the FPGA registers the EPROM output). Filling the ROM takes about a
// million loop iterations at elaboration.
module orient_lut
  import lane_pkg::*;
(
  input  logic              clk,
  input  logic              en,
  input  logic [LUT_AW-1:0] addr,
  output ang_t              data
);
  localparam int AW = LUT_AW;
  localparam int HW = AW / 2 - 1;              // magnitude bits per gradient
  localparam longint COS1 = 64'sd1073578288;   // cos(1 deg)   * 2^30
  localparam longint SIN1 = 64'sd18739379;     // sin(1 deg)   * 2^30
  localparam longint COSH = 64'sd1073700939;   // cos(0.5 deg) * 2^30
  localparam longint SINH = 64'sd9370046;      // sin(0.5 deg) * 2^30

  ang_t rom [2**AW];

  initial begin
    longint c [90];
    longint s [90];
    longint cc, ss, t;
    int     k;
    cc = COSH;
    ss = SINH;
    for (int i = 0; i < 90; i++) begin
      c[i] = cc;
      s[i] = ss;
      t  = (cc * COS1 - ss * SIN1) >>> 30;
      ss = (ss * COS1 + cc * SIN1) >>> 30;
      cc = t;
    end
    for (int ay = 0; ay < 2**HW; ay++) begin
      k = 0;
      for (int ax = 0; ax < 2**HW; ax++) begin
        while (k < 90 && longint'(ax) * c[k] > longint'(ay) * s[k]) k++;
        rom[{1'b0, HW'(ay), 1'b0, HW'(ax)}] = 8'(k);
        rom[{1'b1, HW'(ay), 1'b1, HW'(ax)}] = 8'(k);
        rom[{1'b0, HW'(ay), 1'b1, HW'(ax)}] = 8'(-k);
        rom[{1'b1, HW'(ay), 1'b0, HW'(ax)}] = 8'(-k);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en) data <= rom[addr];
  end
endmodule
