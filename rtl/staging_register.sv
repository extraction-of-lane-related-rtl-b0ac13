// staging_register: the nine-latch 3x3 window of the Sobel edge detector.
//
// Each clock with in_valid, three vertically adjacent pixels enter the
// first column of latches (line N into Z1, N-1 into Z4, N-2 into Z7) and
// every latch passes its value one place along its row (Z1->Z2->Z3,
// Z4->Z5->Z6, Z7->Z8->Z9), as the staging register is drawn. The window is
// only complete once three columns of a line have entered, so the output
// enable oe rises with the third pixel of each line and stays up for the
// rest of the line. sol marks the first pixel of a line.
//
// Timing: one clock. The window z and oe are registered; z[i] is Z(i+1).
// Z5 is kept as well, although Sobel does not use it, because it is the
// intensity of the pixel whose edge is being computed.
module staging_register
  import lane_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    sol,
  input  pix_t    n0,     // line N
  input  pix_t    n1,     // line N-1
  input  pix_t    n2,     // line N-2
  output window_t z,
  output logic    oe
);
  logic [1:0] fill;   // columns of the current line already shifted in

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z    <= '0;
      oe   <= 1'b0;
      fill <= '0;
    end else begin
      oe <= 1'b0;
      if (in_valid) begin
        z[0] <= n0;  z[1] <= z[0];  z[2] <= z[1];
        z[3] <= n1;  z[4] <= z[3];  z[5] <= z[4];
        z[6] <= n2;  z[7] <= z[6];  z[8] <= z[7];
        if (sol)                fill <= 2'd1;
        else if (fill != 2'd3)  fill <= fill + 2'd1;
        oe <= !sol && (fill >= 2'd2);
      end
    end
  end
endmodule
