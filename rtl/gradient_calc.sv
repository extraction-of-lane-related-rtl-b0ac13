// gradient_calc: pipelined Sobel gradients, Equation (1) as an adder tree.
//
//   Gx = (Z3 + 2*Z6 + Z9) - (Z1 + 2*Z4 + Z7)
//   Gy = (Z7 + 2*Z8 + Z9) - (Z1 + 2*Z2 + Z3)
//
// The tree has three register stages, as the gradient calculator is drawn:
// eight two-input adders on Z1..Z4, Z6..Z9 (9-bit sums), four adders that
// form the four weighted column and row sums (10 bits), and two
// subtractors that give Gy and Gx (11 bits signed). Which pixel pairs feed
// the first eight adders is this design's choice: each weighted sum
// Za + 2*Zb + Zc is built as (Za+Zb) + (Zb+Zc), so no shifter is needed.
// Z5 does not enter the gradients; it travels alongside as pix so that the
// intensity stays aligned with its gradients.
//
// Timing: three clocks from in_valid/z to out_valid/gx/gy. One window per
// clock.
module gradient_calc
  import lane_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  window_t z,
  output logic    out_valid,
  output grad_t   gx,
  output grad_t   gy,
  output pix_t    pix
);
  logic [8:0] s1 [8];   // stage 1: pair sums
  logic [9:0] s2 [4];   // stage 2: weighted sums
  logic [2:0] v;
  pix_t       p1, p2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v  <= '0;
      s1 <= '{default: '0};
      s2 <= '{default: '0};
      gx <= '0;
      gy <= '0;
      p1 <= '0;
      p2 <= '0;
      pix <= '0;
    end else begin
      v <= {v[1:0], in_valid};
      // stage 1
      s1[0] <= {1'b0, z[0]} + {1'b0, z[1]};   // Z1+Z2
      s1[1] <= {1'b0, z[1]} + {1'b0, z[2]};   // Z2+Z3
      s1[2] <= {1'b0, z[6]} + {1'b0, z[7]};   // Z7+Z8
      s1[3] <= {1'b0, z[7]} + {1'b0, z[8]};   // Z8+Z9
      s1[4] <= {1'b0, z[0]} + {1'b0, z[3]};   // Z1+Z4
      s1[5] <= {1'b0, z[3]} + {1'b0, z[6]};   // Z4+Z7
      s1[6] <= {1'b0, z[2]} + {1'b0, z[5]};   // Z3+Z6
      s1[7] <= {1'b0, z[5]} + {1'b0, z[8]};   // Z6+Z9
      p1 <= z[4];
      // stage 2
      s2[0] <= {1'b0, s1[0]} + {1'b0, s1[1]}; // Z1+2Z2+Z3
      s2[1] <= {1'b0, s1[2]} + {1'b0, s1[3]}; // Z7+2Z8+Z9
      s2[2] <= {1'b0, s1[4]} + {1'b0, s1[5]}; // Z1+2Z4+Z7
      s2[3] <= {1'b0, s1[6]} + {1'b0, s1[7]}; // Z3+2Z6+Z9
      p2 <= p1;
      // stage 3
      gy  <= grad_t'({1'b0, s2[1]}) - grad_t'({1'b0, s2[0]});
      gx  <= grad_t'({1'b0, s2[3]}) - grad_t'({1'b0, s2[2]});
      pix <= p2;
    end
  end

  assign out_valid = v[2];
endmodule
