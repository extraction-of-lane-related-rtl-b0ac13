// field_mux: frame read control and field multiplexer.
//
// The two field FIFOs hold the even and the odd lines of one interlaced
// frame. On start this block reads them alternately line by line (frame
// line 0 from the even FIFO, line 1 from the odd FIFO, line 2 from the
// even FIFO again, ...) and so delivers the frame in raster order to the
// pre-processing unit, W pixels per line, H lines.
//
// Reading starts while the odd field is still being written. A dual-port
// FIFO must not read and write the same location at the same time, so a
// read from a FIFO is only made while it holds more than MIN_GAP pixels,
// i.e. the read side stays at least MIN_GAP pixels behind the write side
// (600 in the document); once a field is completely written its FIFO is
// drained without that margin. When neither holds, the read stalls and
// stall is high for that clock.
//
// Interface: start (one clock) begins a frame; FIFO status
// even_count/odd_count and even_done/odd_done; FIFO pop even_rd/odd_rd
// with first-word fall-through data even_data/odd_data. Output stream
// out_valid/out_pix with out_sol (first pixel of a line) and out_sof
// (first pixel of the frame), registered, one clock after the pop.
// frame_done pulses with the last pixel. At most one pixel per clock.
module field_mux
  import lane_pkg::*;
#(
  parameter int W       = IMG_W,
  parameter int H       = IMG_H,
  parameter int AW      = 16,
  parameter int MIN_GAP = 600
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [AW:0] even_count,
  input  logic [AW:0] odd_count,
  input  logic        even_done,
  input  logic        odd_done,
  input  pix_t        even_data,
  input  pix_t        odd_data,
  output logic        even_rd,
  output logic        odd_rd,
  output logic        out_valid,
  output pix_t        out_pix,
  output logic        out_sol,
  output logic        out_sof,
  output logic        frame_done,
  output logic        busy,
  output logic        stall
);
  localparam int XW = $clog2(W);
  localparam int YW = $clog2(H);

  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic          sel_odd, avail, rd;
  logic [AW:0]   cnt;

  assign sel_odd = y[0];
  assign cnt     = sel_odd ? odd_count : even_count;
  assign avail   = (cnt > (AW+1)'(MIN_GAP)) ||
                   ((sel_odd ? odd_done : even_done) && cnt != '0);
  assign rd      = busy && avail;
  assign stall   = busy && !avail;
  assign even_rd = rd && !sel_odd;
  assign odd_rd  = rd && sel_odd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      x          <= '0;
      y          <= '0;
      out_valid  <= 1'b0;
      out_pix    <= '0;
      out_sol    <= 1'b0;
      out_sof    <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      out_valid  <= rd;
      out_sol    <= rd && (x == '0);
      out_sof    <= rd && (x == '0) && (y == '0);
      frame_done <= 1'b0;
      if (rd) out_pix <= sel_odd ? odd_data : even_data;
      if (start && !busy) begin
        busy <= 1'b1;
        x    <= '0;
        y    <= '0;
      end else if (rd) begin
        if (x == XW'(W-1)) begin
          x <= '0;
          if (y == YW'(H-1)) begin
            busy       <= 1'b0;
            frame_done <= 1'b1;
          end else begin
            y <= y + 1'b1;
          end
        end else begin
          x <= x + 1'b1;
        end
      end
    end
  end
endmodule
