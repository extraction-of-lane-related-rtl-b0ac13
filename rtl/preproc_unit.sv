// preproc_unit: the image pre-processing unit. Two line buffers, the 3x3
// Sobel edge detector and the orientation look-up table turn the raster
// intensity stream of one frame into per-pixel edge features.
//
// The incoming line is N. Line buffer 1 holds line N-1 and line buffer 2
// holds line N-2, so each clock the detector receives one column of three
// lines. Both buffers are fed for every line; the detector is fed only
// from the third line of the frame on, because before that the buffers do
// not yet hold two real lines. Within a line the detector's own output
// enable drops the first two columns. The result is one feature record per
// interior pixel, (W-2) x (H-2) per frame, in raster order, each tagged
// with the coordinates (x, y) of the window centre Z5.
//
// The gradients are presented to the ROM on the clock the magnitude is
// computed and the ROM output is registered on that same clock, so
// magnitude, orientation and signs leave together.
//
// Interface: in_valid/in_pix with in_sol (first pixel of a line) and in_sof
// (first pixel of the frame, with in_sol). Output edge_valid/edge/edge_x/
// edge_y. Latency from the pixel that completes a window to its record:
// 6 clocks (1 staging, 3 gradient, 1 magnitude/ROM, plus the input
// register that follows the line buffers). One pixel per clock.
module preproc_unit
  import lane_pkg::*;
#(
  parameter int W = IMG_W,
  parameter int H = IMG_H
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_sol,
  input  logic                  in_sof,
  input  pix_t                  in_pix,
  output logic                  edge_valid,
  output edge_feat_t            edge_o,
  output logic [$clog2(W)-1:0]  edge_x,
  output logic [$clog2(H)-1:0]  edge_y
);
  localparam int XW = $clog2(W);
  localparam int YW = $clog2(H);
  localparam int TAG_LAT = 5;      // staging register to ROM output

  pix_t          n1, n2;
  logic [XW-1:0] col;
  logic [YW-1:0] row;
  logic [XW-1:0] cur_col;
  logic [YW-1:0] cur_row;

  // column and row of the incoming pixel
  assign cur_col = in_sol ? '0 : col;
  assign cur_row = in_sof ? '0 : (in_sol ? row + 1'b1 : row);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0;
      row <= '0;
    end else if (in_valid) begin
      col <= cur_col + 1'b1;
      row <= cur_row;
    end
  end

  line_buffer #(.W(W), .DW(PIX_W)) u_lb1 (
    .clk, .rst_n, .in_valid, .sol(in_sol), .din(in_pix), .dout(n1)
  );
  line_buffer #(.W(W), .DW(PIX_W)) u_lb2 (
    .clk, .rst_n, .in_valid, .sol(in_sol), .din(n1), .dout(n2)
  );

  // register the three lines into the detector
  logic          s_valid, s_sol;
  pix_t          s_n0, s_n1, s_n2;
  logic [XW-1:0] s_col;
  logic [YW-1:0] s_row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid <= 1'b0;
      s_sol   <= 1'b0;
      s_n0    <= '0;
      s_n1    <= '0;
      s_n2    <= '0;
      s_col   <= '0;
      s_row   <= '0;
    end else begin
      s_valid <= in_valid && (cur_row >= YW'(2));
      s_sol   <= in_sol;
      s_n0    <= in_pix;
      s_n1    <= n1;
      s_n2    <= n2;
      s_col   <= cur_col;
      s_row   <= cur_row;
    end
  end

  logic  lut_valid, out_valid;
  grad_t lut_gx, lut_gy, gx, gy;
  mag_t  mag;
  pix_t  pix;
  ang_t  ang;

  sobel_edge_detector u_sobel (
    .clk, .rst_n, .in_valid(s_valid), .sol(s_sol),
    .n0(s_n0), .n1(s_n1), .n2(s_n2),
    .lut_valid, .lut_gx, .lut_gy,
    .out_valid, .mag, .gx, .gy, .pix
  );

  orient_lut u_lut (
    .clk, .en(lut_valid), .addr(lut_addr(lut_gx, lut_gy)), .data(ang)
  );

  // window-centre coordinates travel alongside the detector pipeline
  logic [XW-1:0] x_d [TAG_LAT];
  logic [YW-1:0] y_d [TAG_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_d <= '{default: '0};
      y_d <= '{default: '0};
    end else begin
      x_d[0] <= s_col - 1'b1;
      y_d[0] <= s_row - 1'b1;
      for (int i = 1; i < TAG_LAT; i++) begin
        x_d[i] <= x_d[i-1];
        y_d[i] <= y_d[i-1];
      end
    end
  end

  assign edge_valid    = out_valid;
  assign edge_o.pix    = pix;
  assign edge_o.mag    = mag;
  assign edge_o.ang    = ang;
  assign edge_o.gx_neg = gx[GRAD_W-1];
  assign edge_o.gy_neg = gy[GRAD_W-1];
  assign edge_x        = x_d[TAG_LAT-1];
  assign edge_y        = y_d[TAG_LAT-1];
endmodule
