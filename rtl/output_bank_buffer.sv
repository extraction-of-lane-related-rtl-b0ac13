// output_bank_buffer: the two image memories of the image output unit and
// their bank switch.
//
// The DSP writes result images (the captured frame with the extracted lane
// information drawn in) while the video encoder reads a frame out for the
// monitor. With two memories, A and B, one is written while the other is
// read, so neither side waits. The DSP requests a swap when it has
// finished writing a frame; the swap takes effect at the start of the next
// display frame, so the monitor never shows a half-written image.
//
// DSP side: wr_en/wr_addr/wr_data writes one pixel into the bank that is
// not on display; swap (one clock) requests the exchange, swap_pending
// shows it has not yet happened. Display side: disp_sof (one clock)
// starts a display frame and rewinds the read address, disp_rd requests
// the next pixel in raster order, disp_pix/disp_valid follow one clock
// later. disp_bank is the bank on display (0 = A, 1 = B).
module output_bank_buffer
  import lane_pkg::*;
#(
  parameter int W = IMG_W,
  parameter int H = IMG_H
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wr_en,
  input  logic [$clog2(W*H)-1:0]    wr_addr,
  input  pix_t                      wr_data,
  input  logic                      swap,
  output logic                      swap_pending,
  input  logic                      disp_sof,
  input  logic                      disp_rd,
  output pix_t                      disp_pix,
  output logic                      disp_valid,
  output logic                      disp_bank
);
  localparam int DEPTH = W * H;
  localparam int AW    = $clog2(DEPTH);

  pix_t          mem_a [DEPTH];
  pix_t          mem_b [DEPTH];
  logic [AW-1:0] rd_addr, rd_cur;
  logic          do_swap, bank_cur;

  assign rd_cur   = disp_sof ? '0 : rd_addr;
  assign do_swap  = disp_sof && (swap_pending || swap);
  assign bank_cur = do_swap ? !disp_bank : disp_bank;   // bank shown from now on

  // write port: the bank that is not displayed
  always_ff @(posedge clk) begin
    if (wr_en && 32'(wr_addr) < DEPTH) begin
      if (bank_cur)  mem_a[wr_addr] <= wr_data;
      else           mem_b[wr_addr] <= wr_data;
    end
  end

  // read port: the displayed bank
  always_ff @(posedge clk) begin
    if (disp_rd) disp_pix <= bank_cur ? mem_b[rd_cur] : mem_a[rd_cur];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      disp_bank    <= 1'b0;
      swap_pending <= 1'b0;
      rd_addr      <= '0;
      disp_valid   <= 1'b0;
    end else begin
      disp_valid <= disp_rd;
      if (do_swap) begin
        disp_bank    <= !disp_bank;
        swap_pending <= 1'b0;
      end else if (swap) begin
        swap_pending <= 1'b1;
      end
      if (disp_rd) rd_addr <= (rd_cur == AW'(DEPTH-1)) ? '0 : rd_cur + 1'b1;
      else         rd_addr <= rd_cur;
    end
  end
endmodule
