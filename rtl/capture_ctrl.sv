// capture_ctrl: control logic of the image capturing unit.
//
// The video decoder delivers the cropped region of interest one field at a
// time. On a grab command from the DSP this block empties both field FIFOs,
// waits for the start of an even field, steers that field's pixels into
// the even-field FIFO and the following odd field's pixels into the
// odd-field FIFO, and then stops until the next grab. While the odd field
// is written it counts lines, and when the READ_LINE-th odd line is
// complete it raises read_irq for one clock: that is the moment at which
// the DSP orders the pre-processing unit to start reading (the document
// uses line 60).
//
// Decoder interface (single clock, this design's choice): dec_vs is a
// one-clock pulse at the start of each field, with dec_odd telling which
// field starts; dec_valid/dec_pix is an active pixel of the region of
// interest. Lines are counted in units of W pixels.
//
// Outputs: fifo_clr (one clock, on grab), even_we/odd_we/wr_pix to the
// FIFOs, even_done/odd_done (sticky until the next grab: the field's
// W*H/2 pixels are written, or the field ended early), busy, read_irq.
// The grab ends when the odd field is complete; further decoder pixels are
// not stored.
module capture_ctrl
  import lane_pkg::*;
#(
  parameter int W         = IMG_W,
  parameter int H         = IMG_H,
  parameter int READ_LINE = 60
) (
  input  logic clk,
  input  logic rst_n,
  input  logic grab,
  input  logic dec_vs,
  input  logic dec_odd,
  input  logic dec_valid,
  input  pix_t dec_pix,
  output logic fifo_clr,
  output logic even_we,
  output logic odd_we,
  output pix_t wr_pix,
  output logic even_done,
  output logic odd_done,
  output logic busy,
  output logic read_irq
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT_EVEN, S_EVEN, S_ODD} state_t;
  localparam int FIELD_PIX = W * (H / 2);
  localparam int CW = $clog2(FIELD_PIX + 1);

  state_t        state;
  logic [CW-1:0] pcnt;      // pixels written into the current field

  assign busy    = (state != S_IDLE);
  assign even_we = (state == S_EVEN) && dec_valid && !dec_vs;
  assign odd_we  = (state == S_ODD)  && dec_valid && !dec_vs;
  assign wr_pix  = dec_pix;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      pcnt      <= '0;
      fifo_clr  <= 1'b0;
      even_done <= 1'b0;
      odd_done  <= 1'b0;
      read_irq  <= 1'b0;
    end else begin
      fifo_clr <= 1'b0;
      read_irq <= 1'b0;
      unique case (state)
        S_IDLE: if (grab) begin
          fifo_clr  <= 1'b1;
          even_done <= 1'b0;
          odd_done  <= 1'b0;
          state     <= S_WAIT_EVEN;
        end
        S_WAIT_EVEN: if (dec_vs && !dec_odd) begin
          pcnt  <= '0;
          state <= S_EVEN;
        end
        S_EVEN:
          if (dec_vs) begin
            even_done <= 1'b1;
            pcnt      <= '0;
            state     <= dec_odd ? S_ODD : S_EVEN;
          end else if (dec_valid) begin
            pcnt <= pcnt + 1'b1;
            if (pcnt + 1'b1 == CW'(FIELD_PIX)) even_done <= 1'b1;
          end
        S_ODD:
          if (dec_vs) begin
            odd_done <= 1'b1;
            state    <= S_IDLE;
          end else if (dec_valid) begin
            pcnt <= pcnt + 1'b1;
            if (pcnt + 1'b1 == CW'(READ_LINE * W)) read_irq <= 1'b1;
            if (pcnt + 1'b1 == CW'(FIELD_PIX)) begin
              odd_done <= 1'b1;
              state    <= S_IDLE;
            end
          end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
