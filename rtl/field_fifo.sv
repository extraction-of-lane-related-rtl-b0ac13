// field_fifo: dual-port FIFO field memory. One instance holds the even
// field of the region of interest and another the odd field.
//
// The write side (video decoder) and the read side (pre-processing read
// control) work independently, which is why a FIFO rather than a random
// access memory is used for the fields. It is a circular memory of
// 2**AW pixels with separate read and write pointers and a fill count.
// clr empties it at the start of a grab.
//
// Interface: wr_en/wr_data writes one pixel; rd_en pops one pixel. rd_data
// shows the oldest pixel (first-word fall-through) whenever empty is low.
// count is the number of pixels held. Writing when full or reading when
// empty is an error, flagged by the assertions and ignored by the logic.
// Timing: a written pixel is readable on the next clock.
module field_fifo #(
  parameter int AW = 16,   // 65536 pixels, enough for one 320x120 field
  parameter int DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_data,
  input  logic          rd_en,
  output logic [DW-1:0] rd_data,
  output logic [AW:0]   count,
  output logic          empty,
  output logic          full
);
  logic [DW-1:0] mem [2**AW];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(2**AW));
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else if (clr) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !clr));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty && !clr));
endmodule
