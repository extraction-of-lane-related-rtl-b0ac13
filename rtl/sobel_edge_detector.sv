// sobel_edge_detector: 3x3 Sobel edge detector, staging register followed
// by the gradient calculator and the magnitude calculator.
//
// Three pixels (lines N, N-1, N-2 of one column) enter per clock. If they
// enter at clock n, the window is latched at n, the gradient pipeline runs
// over clocks n+1..n+3 and the magnitude is registered at clock n+4, which
// is also the clock at which the gradients are presented to the
// orientation look-up table (lut_gx/lut_gy). The gx/gy/pix outputs are
// delayed by one register so that they line up with mag.
//
// Interface: in_valid qualifies n0/n1/n2; sol marks the first column of a
// line. out_valid is high for every window that is complete, i.e. from the
// third column of a line on. lut_valid/lut_gx/lut_gy lead out_valid by one
// clock. Throughput one pixel per clock, latency 5 clocks to mag.
module sobel_edge_detector
  import lane_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  sol,
  input  pix_t  n0,
  input  pix_t  n1,
  input  pix_t  n2,
  // to the orientation LUT
  output logic  lut_valid,
  output grad_t lut_gx,
  output grad_t lut_gy,
  // aligned results
  output logic  out_valid,
  output mag_t  mag,
  output grad_t gx,
  output grad_t gy,
  output pix_t  pix
);
  window_t z;
  logic    oe;
  pix_t    gpix;

  staging_register u_stage (
    .clk, .rst_n, .in_valid, .sol, .n0, .n1, .n2, .z, .oe
  );

  gradient_calc u_grad (
    .clk, .rst_n, .in_valid(oe), .z,
    .out_valid(lut_valid), .gx(lut_gx), .gy(lut_gy), .pix(gpix)
  );

  magnitude_calc u_mag (
    .clk, .rst_n, .in_valid(lut_valid), .gx(lut_gx), .gy(lut_gy),
    .out_valid, .mag
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gx  <= '0;
      gy  <= '0;
      pix <= '0;
    end else begin
      gx  <= lut_gx;
      gy  <= lut_gy;
      pix <= gpix;
    end
  end
endmodule
