// tb_i2c_master: an I2C slave model watches the open-drain bus, detects
// START and STOP (SDA changing while SCL is high), shifts in bits on SCL
// rising edges and pulls SDA low in the acknowledge slots when the address
// is its own; it refuses (does not acknowledge) register addresses from
// F0h up. A run of random register writes follows, some to another device
// address and some to refused registers. For each command the 27 bits on
// the wire must be the device address with a write bit, the register
// address and the data; ack_err must be set exactly when an acknowledge
// was missing; exactly one START and one STOP must frame it; and one bit
// must take 4*DIV clocks. At the end the slave's registers must hold the
// last value written to each.
module tb_i2c_master;
  localparam int DIV = 5;
  localparam logic [6:0] SLAVE = 7'h45;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0, cmd_ready, done, ack_err, scl_o, sda_o, sda_i;
  logic [6:0] dev_addr = '0;
  logic [7:0] reg_addr = '0, wr_data = '0;
  int checks = 0, failures = 0;

  // slave model state
  logic slave_ack = 1'b0, addr_ok = 1'b0;
  logic scl_q = 1'b1, sda_q = 1'b1;
  int   nbit = 0, starts = 0, stops = 0;
  int   first_rise = -1, ninth_rise = -1, cyc = 0;
  logic [26:0] bits, frame;
  logic [7:0]  regs [256];

  i2c_master #(.DIV(DIV)) dut (.*);

  assign sda_i = sda_o && !slave_ack;   // wired AND of the open-drain bus

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    scl_q <= scl_o;
    sda_q <= sda_i;
    if (scl_q && scl_o && sda_q && !sda_i) begin        // START
      starts <= starts + 1;
      nbit <= 0;
    end else if (scl_q && scl_o && !sda_q && sda_i) begin // STOP
      stops <= stops + 1;
      if (nbit >= 27 && frame[26:20] == SLAVE && frame[17:14] != 4'hF) regs[frame[17:10]] <= frame[8:1];
    end
    if (!scl_q && scl_o) begin                           // rising SCL: sample
      bits <= {bits[25:0], sda_i};
      nbit <= nbit + 1;
      if (nbit == 0) first_rise <= cyc;
      if (nbit == 9) ninth_rise <= cyc;
      if (nbit == 26) frame <= {bits[25:0], sda_i};
    end
    if (scl_q && !scl_o) begin                           // falling SCL: drive ACK
      // after the 8 bits of each byte, acknowledge if the address is ours
      if (nbit == 8) addr_ok <= (bits[7:1] == SLAVE);
      slave_ack <= (nbit == 8) ? (bits[7:1] == SLAVE)
                 : (nbit == 17) ? (addr_ok && bits[7:4] != 4'hF)
                 : (nbit == 26) ? (addr_ok && bits[16:13] != 4'hF)
                 : 1'b0;
    end
  end

  task automatic write_reg(logic [6:0] dev, logic [7:0] ra, logic [7:0] d);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1'b1; dev_addr = dev; reg_addr = ra; wr_data = d;
    @(negedge clk);
    cmd_valid = 1'b0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    logic [6:0] dev;
    logic [7:0] ra, d;
    logic       exp_err;
    int         st0, sp0;
    logic [7:0] model [256];
    logic       written [256];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 256; i++) begin
      regs[i] = 8'h00;
      model[i] = 8'h00;
      written[i] = 1'b0;
    end
    for (int n = 0; n < 24; n++) begin
      dev = ($urandom_range(2) == 0) ? 7'($urandom_range(127)) : SLAVE;
      ra  = (n == 0) ? 8'h04 : 8'($urandom_range(255));   // e.g. a VDELAY register
      d   = 8'($urandom_range(255));
      if (n == 1) begin
        dev = 7'h12;                   // nobody answers
        ra  = 8'h05;
      end
      if (n == 2) begin
        dev = SLAVE;
        ra  = 8'hF3;                   // slave refuses the register
      end
      exp_err = (dev != SLAVE) || (ra[7:4] == 4'hF);
      st0 = starts;
      sp0 = stops;
      write_reg(dev, ra, d);
      repeat (2) @(negedge clk);
      checks++;
      if (frame[26:19] != {dev, 1'b0} || frame[17:10] != ra || frame[8:1] != d) begin
        failures++;
        $display("command %0d: frame %h, sent dev %h reg %h data %h", n, frame, dev, ra, d);
      end
      checks++;
      if (ack_err != exp_err) begin
        failures++;
        $display("command %0d: ack_err %0b, expected %0b", n, ack_err, exp_err);
      end
      checks++;
      if (starts - st0 != 1 || stops - sp0 != 1) begin
        failures++;
        $display("command %0d: %0d starts %0d stops", n, starts - st0, stops - sp0);
      end
      checks++;
      if (ninth_rise - first_rise != 9 * 4 * DIV) begin
        failures++;
        $display("command %0d: 9 bits took %0d clocks", n, ninth_rise - first_rise);
      end
      if (!exp_err) begin
        model[ra] = d;
        written[ra] = 1'b1;
      end
    end
    repeat (10) @(negedge clk);
    for (int i = 0; i < 256; i++) if (written[i]) begin
      checks++;
      if (regs[i] != model[i]) begin
        failures++;
        $display("slave register %h: %h, expected %h", i, regs[i], model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
