// lane_onboard_top: FPGA-side logic of a real-time onboard image processing
// system that extracts lane information from road images.
//
// Data path: the video decoder's region of interest is captured field by
// field into two FIFOs (capture_ctrl, field_fifo x2); the field
// multiplexer reads them back line by line in interlaced order as one
// W x H frame (field_mux); the pre-processing unit turns that frame into
// per-pixel Sobel magnitude, orientation, gradient signs and intensity
// (preproc_unit). The raw frame and the edge features both go to the DSP,
// which builds the edge distribution function and finds the lanes. The
// DSP's result images go to a double-buffered output memory read by the
// video encoder (output_bank_buffer). An I2C master lets the DSP program
// the video chips (i2c_master).
//
// Control sequence, as in the document's timing: the DSP issues grab; the
// even then the odd field are stored; when READ_LINE (60) lines of the odd
// field are stored read_irq tells the DSP, which answers with proc_start;
// the frame is then read and processed while the odd field is still being
// written, with the read side kept MIN_GAP (600) pixels behind the write
// side. frame_done marks the end of the frame's edge output.
//
// All logic runs on one clock (this design's choice). The decoder, DSP,
// encoder and OSD are external chips: their signals are the ports.
module lane_onboard_top
  import lane_pkg::*;
#(
  parameter int W         = IMG_W,
  parameter int H         = IMG_H,
  parameter int FIFO_AW   = 16,
  parameter int READ_LINE = 60,
  parameter int MIN_GAP   = 600,
  parameter int I2C_DIV   = 83
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // video decoder (cropped region of interest)
  input  logic                     dec_vs,
  input  logic                     dec_odd,
  input  logic                     dec_valid,
  input  pix_t                     dec_pix,
  // DSP commands and status
  input  logic                     grab,
  input  logic                     proc_start,
  output logic                     read_irq,
  output logic                     capture_busy,
  output logic                     proc_busy,
  output logic                     read_stall,
  output logic                     frame_done,
  // raw image to the DSP
  output logic                     raw_valid,
  output logic                     raw_sol,
  output logic                     raw_sof,
  output pix_t                     raw_pix,
  // edge features to the DSP
  output logic                     edge_valid,
  output edge_feat_t               edge_o,
  output logic [$clog2(W)-1:0]     edge_x,
  output logic [$clog2(H)-1:0]     edge_y,
  // image output unit: DSP write side
  input  logic                     out_wr_en,
  input  logic [$clog2(W*H)-1:0]   out_wr_addr,
  input  pix_t                     out_wr_data,
  input  logic                     out_swap,
  output logic                     out_swap_pending,
  // image output unit: video encoder side
  input  logic                     disp_sof,
  input  logic                     disp_rd,
  output pix_t                     disp_pix,
  output logic                     disp_valid,
  output logic                     disp_bank,
  // I2C configuration master
  input  logic                     i2c_cmd_valid,
  output logic                     i2c_cmd_ready,
  input  logic [6:0]               i2c_dev_addr,
  input  logic [7:0]               i2c_reg_addr,
  input  logic [7:0]               i2c_wr_data,
  output logic                     i2c_done,
  output logic                     i2c_ack_err,
  output logic                     scl_o,
  output logic                     sda_o,
  input  logic                     sda_i
);
  // ---------------- image capturing unit ----------------
  logic            fifo_clr, even_we, odd_we, even_done, odd_done;
  pix_t            wr_pix;
  logic            even_rd, odd_rd;
  pix_t            even_data, odd_data;
  logic [FIFO_AW:0] even_count, odd_count;
  logic            even_empty, even_full, odd_empty, odd_full;
  logic            mux_done, mux_busy;

  capture_ctrl #(.W(W), .H(H), .READ_LINE(READ_LINE)) u_cap (
    .clk, .rst_n, .grab, .dec_vs, .dec_odd, .dec_valid, .dec_pix,
    .fifo_clr, .even_we, .odd_we, .wr_pix, .even_done, .odd_done,
    .busy(capture_busy), .read_irq
  );

  field_fifo #(.AW(FIFO_AW), .DW(PIX_W)) u_even (
    .clk, .rst_n, .clr(fifo_clr), .wr_en(even_we), .wr_data(wr_pix),
    .rd_en(even_rd), .rd_data(even_data), .count(even_count),
    .empty(even_empty), .full(even_full)
  );

  field_fifo #(.AW(FIFO_AW), .DW(PIX_W)) u_odd (
    .clk, .rst_n, .clr(fifo_clr), .wr_en(odd_we), .wr_data(wr_pix),
    .rd_en(odd_rd), .rd_data(odd_data), .count(odd_count),
    .empty(odd_empty), .full(odd_full)
  );

  field_mux #(.W(W), .H(H), .AW(FIFO_AW), .MIN_GAP(MIN_GAP)) u_mux (
    .clk, .rst_n, .start(proc_start),
    .even_count, .odd_count, .even_done, .odd_done, .even_data, .odd_data,
    .even_rd, .odd_rd,
    .out_valid(raw_valid), .out_pix(raw_pix), .out_sol(raw_sol),
    .out_sof(raw_sof), .frame_done(mux_done), .busy(mux_busy),
    .stall(read_stall)
  );

  // ---------------- image pre-processing unit ----------------

  preproc_unit #(.W(W), .H(H)) u_pre (
    .clk, .rst_n, .in_valid(raw_valid), .in_sol(raw_sol), .in_sof(raw_sof),
    .in_pix(raw_pix), .edge_valid, .edge_o, .edge_x, .edge_y
  );

  // The last edge record leaves the pre-processor a fixed time after the
  // last pixel of the frame; frame_done is raised with it.
  localparam int DONE_LAT = 6;
  logic [DONE_LAT-1:0] done_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done_d <= '0;
    else        done_d <= {done_d[DONE_LAT-2:0], mux_done};
  end

  assign frame_done = done_d[DONE_LAT-1];
  assign proc_busy  = mux_busy || (done_d != '0);

  // ---------------- image output unit ----------------
  output_bank_buffer #(.W(W), .H(H)) u_out (
    .clk, .rst_n, .wr_en(out_wr_en), .wr_addr(out_wr_addr),
    .wr_data(out_wr_data), .swap(out_swap), .swap_pending(out_swap_pending),
    .disp_sof, .disp_rd, .disp_pix, .disp_valid, .disp_bank
  );

  i2c_master #(.DIV(I2C_DIV)) u_i2c (
    .clk, .rst_n, .cmd_valid(i2c_cmd_valid), .cmd_ready(i2c_cmd_ready),
    .dev_addr(i2c_dev_addr), .reg_addr(i2c_reg_addr), .wr_data(i2c_wr_data),
    .done(i2c_done), .ack_err(i2c_ack_err), .scl_o, .sda_o, .sda_i
  );
endmodule
