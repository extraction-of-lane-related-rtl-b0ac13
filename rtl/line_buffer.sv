// line_buffer: delays a raster pixel stream by exactly one image line.
//
// Two of these sit in front of the Sobel edge detector: the first turns the
// current line N into line N-1, the second turns N-1 into N-2, so that the
// detector sees three vertically adjacent pixels at once. The buffer is a
// W-entry circular memory addressed by a column pointer: on each accepted
// pixel the old entry is read out (combinationally, on dout) and replaced by
// din, and the pointer advances, wrapping after W pixels.
//
// Interface: in_valid/din is one pixel; dout is valid in the same cycle and
// holds the pixel accepted W valid cycles earlier. sol (start of line)
// re-aligns the pointer to column 0 so a short line cannot shift the
// columns. The memory is not cleared: the first line out after reset is
// undefined and the user ignores it (the pre-processing unit starts Sobel
// output on the third line).
module line_buffer #(
  parameter int W  = 320,   // pixels per line
  parameter int DW = 8      // pixel bits
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          sol,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);
  localparam int AW = (W > 1) ? $clog2(W) : 1;

  logic [DW-1:0] mem [W];
  logic [AW-1:0] ptr, rd_ptr;

  assign rd_ptr = sol ? '0 : ptr;
  assign dout   = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (in_valid) mem[rd_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)               ptr <= '0;
    else if (in_valid) begin
      if (rd_ptr == AW'(W-1)) ptr <= '0;
      else                    ptr <= rd_ptr + 1'b1;
    end
  end
endmodule
