// owm_master_tb: self-checking test of the 1-Wire master on its own.
//
// The register bus is driven directly. A behavioural board-ID device sits on
// the line (line = not(master pull-down or device pull-down)). The test sets
// the divider to 0x0D (24 clocks per us) and the enables to 0x17, then
//   * sends a reset pulse, checks INTR, PD and PDR and that the reset lasts
//     T_RSTL + T_RSTH us, and that reading the flag register clears PD;
//   * sends read ROM (0x33) and reads eight bytes by writing 0xFF, comparing
//     them with the ROM bytes and CRC-8 worked out here;
//   * measures the low time of 0 and 1 slots and the length of a byte;
//   * repeats the reset with the device disconnected (PDR must be 0);
//   * checks INTR polarity with IAS = 0, TBE/TEMT during a byte, RBF
//     clear-on-read and that soft_clr clears the registers.
module owm_master_tb;
  import flasher_pkg::*;

  localparam int US = 24;

  logic     clk = 0, rst_n = 0, soft_clr = 0;
  reg_bus_t bus;
  addr_t    rd_addr;
  data_t    rdata;
  logic     rd_hit, intr, dq_low, line, dev_pull, dev_en;
  int       checks = 0, failures = 0;

  always #5 clk = ~clk;

  owm_master dut (
    .clk, .rst_n, .soft_clr, .bus, .rd_addr, .rdata, .rd_hit,
    .intr, .dq_low, .dq_in(line)
  );

  assign line = !(dq_low || (dev_pull && dev_en));

  ow_slave_model #(.US(US), .KIND(1), .ROM_ID(56'hA1B2C3D4E5F6_01)) dev (
    .clk, .line, .pull(dev_pull)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(input logic [2:0] off, input data_t d);
    @(negedge clk);
    bus.wr = 1; bus.addr = ADDR_OWM_COMMAND + addr_t'(off); bus.wdata = d;
    @(negedge clk);
    bus.wr = 0;
  endtask

  task automatic rd(input logic [2:0] off, output data_t d);
    @(negedge clk);
    rd_addr = ADDR_OWM_COMMAND + addr_t'(off);
    #1 d = rdata;
    bus.rd = 1; bus.addr = rd_addr;
    @(negedge clk);
    bus.rd = 0;
  endtask

  function automatic byte unsigned crc8(input byte unsigned crc, input byte unsigned d);
    byte unsigned c;
    c = crc ^ d;
    for (int i = 0; i < 8; i++) c = c[0] ? ((c >> 1) ^ 8'h8C) : (c >> 1);
    return c;
  endfunction

  // low-time measurement of the master's pulses
  int low_len, last_low;
  always @(posedge clk) begin
    if (dq_low) low_len <= low_len + 1;
    else begin
      if (low_len != 0) last_low <= low_len;
      low_len <= 0;
    end
  end

  // the host's wait: INTR high and TBE set
  task automatic wait_intr(output int cycles);
    cycles = 0;
    while (!intr || !dut.tbe) begin
      @(posedge clk);
      cycles++;
    end
  endtask

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned exp_rom[8];
  data_t d;
  int    cyc;

  initial begin
    bus = '0; rd_addr = '0; dev_en = 1; low_len = 0; last_low = 0;
    begin
      byte unsigned c; logic [55:0] id;
      id = 56'hA1B2C3D4E5F6_01;
      c = 0;
      for (int i = 0; i < 7; i++) begin exp_rom[i] = id[8*i +: 8]; c = crc8(c, id[8*i +: 8]); end
      exp_rom[7] = c;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // set-up as in the host's initialisation sequence
    wr(OWM_REG_CLKDIV, 8'h0D);
    wr(OWM_REG_INTEN, 8'h17);
    rd(OWM_REG_CLKDIV, d); check(d == 8'h0D, "clkdiv read-back");
    rd(OWM_REG_INTEN, d);  check(d == 8'h17, "inten read-back");
    rd(OWM_REG_INT, d);    check(d[2] && d[3] && !d[0] && !d[4], "idle flags TBE=1 TEMT=1 PD=0 RBF=0");

    // reset and presence
    wr(OWM_REG_CMD, OWM_CMD_RESET);
    check(!intr, "INTR drops while the reset runs");
    repeat (2) @(posedge clk);
    check(dq_low, "reset pulls line low");
    wait_intr(cyc);
    check(last_low >= 480*US - US && last_low <= 480*US + US, $sformatf("reset low %0d cycles", last_low));
    check(cyc >= 960*US - 2*US && cyc <= 960*US + 2*US, $sformatf("reset+presence window %0d cycles", cyc));
    rd(OWM_REG_INT, d);
    check(d[0] == 1'b1, "PD set after reset");
    check(d[1] == 1'b1, "PDR: presence seen");
    rd(OWM_REG_INT, d);
    check(d[0] == 1'b0, "PD cleared by read");
    check(dev.presences == 1, "device saw one reset");

    // read ROM command, then eight read bytes
    wr(OWM_REG_CMD, 8'h33);
    repeat (4) @(posedge clk);
    rd(OWM_REG_INT, d);
    check(d[2] == 1'b0 && d[3] == 1'b0, "TBE=0 TEMT=0 while the byte shifts");
    wait_intr(cyc);
    check(cyc >= 560*US - 4*US && cyc <= 560*US + 2*US, $sformatf("byte time %0d cycles", cyc));
    check(dev.bytes_rx == 1, "device received the command byte");
    rd(OWM_REG_DATA, d);   // discard the echo of the command byte
    for (int i = 0; i < 8; i++) begin
      wr(OWM_REG_DATA, 8'hFF);
      wait_intr(cyc);
      rd(OWM_REG_INT, d);
      check(d[4] == 1'b1, "RBF after read byte");
      rd(OWM_REG_DATA, d);
      check(d == exp_rom[i], $sformatf("ROM byte %0d: got %02h want %02h", i, d, exp_rom[i]));
    end
    rd(OWM_REG_INT, d);
    check(d[4] == 1'b0, "RBF cleared by data read");

    // slot low times: 0x00 gives 0-slots, 0xFF 1-slots
    wr(OWM_REG_DATA, 8'h00);
    wait_intr(cyc);
    check(last_low >= 60*US - 2 && last_low <= 60*US + 2, $sformatf("0-slot low %0d cycles", last_low));
    wr(OWM_REG_DATA, 8'hFF);
    wait_intr(cyc);
    check(last_low >= 6*US - 2 && last_low <= 6*US + 2, $sformatf("1-slot low %0d cycles", last_low));
    rd(OWM_REG_DATA, d);
    check(d == 8'hFF, "idle device reads 0xFF");

    // no device: no presence
    dev_en = 0;
    wr(OWM_REG_CMD, OWM_CMD_RESET);
    @(posedge clk);
    wait_intr(cyc);
    rd(OWM_REG_INT, d);
    check(d[0] == 1'b1 && d[1] == 1'b0, "PD set, PDR clear without a device");
    dev_en = 1;

    // INTR polarity
    wr(OWM_REG_INTEN, 8'h15);   // IAS = 0
    @(posedge clk);
    check(intr == 1'b0, "INTR active low with IAS=0 and TBE set");
    wr(OWM_REG_INTEN, 8'h02);   // IAS = 1, nothing enabled
    @(posedge clk);
    check(intr == 1'b0, "INTR inactive with no enables");

    // soft clear
    @(negedge clk); soft_clr = 1; @(negedge clk); soft_clr = 0;
    rd(OWM_REG_CLKDIV, d); check(d == 8'h00, "soft_clr clears clkdiv");
    rd(OWM_REG_INTEN, d);  check(d == 8'h00, "soft_clr clears inten");
    // with the divider stopped nothing starts
    wr(OWM_REG_CMD, OWM_CMD_RESET);
    repeat (50) @(posedge clk);
    check(!dq_low, "no reset pulse with the divider stopped");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
