// i2c_master: write-only I2C bus master through which the DSP sets up the
// video decoder (region-of-interest registers VDELAY, VACTIVE, HDELAY,
// HACTIVE and the like) and the other video chips.
//
// One command writes one register: START, device address with the write
// bit, register address, data, STOP. Each byte is followed by an
// acknowledge bit during which the master releases SDA and samples it; a
// high level there (no acknowledge) sets ack_err for that command. Both
// lines are open drain: scl_o/sda_o low means "pull low", high means
// "release", and sda_i is the level on the wire.
//
// Each bit takes four phases of DIV clocks (SCL low with data change, SCL
// rising, SCL high with sampling, SCL falling), so SCL runs at
// f_clk / (4*DIV); DIV = 83 gives about 100 kHz from a 33 MHz clock. The
// bus speed and the command handshake are this design's choices.
//
// Command handshake: cmd_valid with dev_addr/reg_addr/wr_data is taken
// when cmd_ready is high. done pulses for one clock at the end of the
// STOP condition; ack_err is valid from then until the next command.
module i2c_master #(
  parameter int DIV = 83
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  logic [6:0] dev_addr,
  input  logic [7:0] reg_addr,
  input  logic [7:0] wr_data,
  output logic       done,
  output logic       ack_err,
  output logic       scl_o,
  output logic       sda_o,
  input  logic       sda_i
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_BITS, S_STOP} state_t;
  localparam int NBITS = 27;                     // 3 x (8 data + 1 ack)
  localparam int DW    = $clog2(DIV + 1);

  state_t        state;
  logic [DW-1:0] div;
  logic [1:0]    phase;
  logic [4:0]    bitn;
  logic [NBITS-1:0] sh;     // bit to send, MSB first; 1 = release
  logic          ack_slot; // the current bit is an acknowledge
  logic          tick;

  assign cmd_ready = (state == S_IDLE);
  assign tick      = (div == DW'(DIV - 1));
  assign ack_slot  = (bitn == 5'd8) || (bitn == 5'd17) || (bitn == 5'd26);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      div     <= '0;
      phase   <= '0;
      bitn    <= '0;
      sh      <= '1;
      scl_o   <= 1'b1;
      sda_o   <= 1'b1;
      done    <= 1'b0;
      ack_err <= 1'b0;
    end else begin
      done <= 1'b0;
      div  <= (state == S_IDLE || tick) ? '0 : div + 1'b1;
      unique case (state)
        S_IDLE: begin
          scl_o <= 1'b1;
          sda_o <= 1'b1;
          phase <= '0;
          if (cmd_valid) begin
            sh      <= {dev_addr, 1'b0, 1'b1, reg_addr, 1'b1, wr_data, 1'b1};
            ack_err <= 1'b0;
            bitn    <= '0;
            state   <= S_START;
          end
        end
        S_START: if (tick) begin
          phase <= phase + 1'b1;
          unique case (phase)
            2'd0: sda_o <= 1'b0;            // SDA falls while SCL is high
            2'd1: scl_o <= 1'b0;
            default: begin
              phase <= '0;
              state <= S_BITS;
            end
          endcase
        end
        S_BITS: if (tick) begin
          phase <= phase + 1'b1;
          unique case (phase)
            2'd0: sda_o <= sh[NBITS-1];      // data changes while SCL is low
            2'd1: scl_o <= 1'b1;
            2'd2: if (ack_slot && sda_i) ack_err <= 1'b1;
            default: begin
              scl_o <= 1'b0;
              sh    <= {sh[NBITS-2:0], 1'b1};
              if (bitn == 5'(NBITS - 1)) state <= S_STOP;
              bitn  <= bitn + 1'b1;
            end
          endcase
        end
        S_STOP: if (tick) begin
          phase <= phase + 1'b1;
          unique case (phase)
            2'd0: sda_o <= 1'b0;
            2'd1: scl_o <= 1'b1;
            2'd2: sda_o <= 1'b1;             // SDA rises while SCL is high
            default: begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
          endcase
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
