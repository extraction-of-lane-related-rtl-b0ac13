// magnitude_calc: gradient magnitude, Equation (2) in its |Gx| + |Gy| form.
//
// Two absolute-value units feed one adder whose sum is registered, as the
// magnitude calculator is drawn. The square root of Gx^2+Gy^2 is not
// computed; the document uses the sum of absolute values in its place.
//
// Timing: one clock from in_valid/gx/gy to out_valid/mag. The maximum
// result is 2040, well inside the 16-bit output.
module magnitude_calc
  import lane_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  grad_t gx,
  input  grad_t gy,
  output logic  out_valid,
  output mag_t  mag
);
  logic [GRAD_W-1:0] ax, ay;

  always_comb begin
    ax = gx[GRAD_W-1] ? GRAD_W'(-gx) : GRAD_W'(gx);
    ay = gy[GRAD_W-1] ? GRAD_W'(-gy) : GRAD_W'(gy);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      mag       <= '0;
    end else begin
      out_valid <= in_valid;
      mag       <= MAG_W'(ax) + MAG_W'(ay);
    end
  end
endmodule
