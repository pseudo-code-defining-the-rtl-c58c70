// flasher_cpld_tb: end-to-end test of the flasher CPLD at its default size.
//
// A host model drives the 8-bit bus (nWR / nRD strobes of 4 clocks). On the
// 1-Wire side six calibration-PROM models sit on DQ0..DQ5, a board-ID model
// on DQ6 and nothing on DQ7; eight SPI shift-register devices hang on the SPI
// channels. With a divider of 0x0D one 1-Wire microsecond is 24 clocks.
// The host runs the interface procedures:
//   trigger delay   set enables and the six 3-bit codes, check the pins
//   Read_ID         select DQ6, set up the master, reset, 0x33, 8 bytes
//   Read_ROM        select a PROM channel, reset, 0xCC, 0xF0 + address,
//                   CRC byte (checked against a CRC-8 computed here), data
//   Read_Status     same with 0xAA
//   Write_ROM       0x0F + address + data, CRC, read back the programmed
//                   byte, a second byte at the next address
//   Write_Status    same with 0x55
//   no device       reset on DQ7 gives no presence
//   SPI             active list, SPI_mode, a byte through the bit-banged pins,
//                   writes blocked while in SPI_mode, SPI_mode end
// It counts how often each mechanism occurred (presence found and absent,
// channel change clearing the master, INTR high and low, bytes sent and
// received, CRC matches, SPI_mode entries, blocked writes, delay updates)
// and counts a failure for any that never happened.
module flasher_cpld_tb;
  import flasher_pkg::*;

  logic            clk = 0, rst_n = 0;
  addr_t           host_addr;
  data_t           host_data_i, host_data_o, host_data_oe;
  logic            host_nwr, host_nrd, owm_intr;
  logic [7:0]      owm_dq_low, owm_dq_in, dev_pull;
  logic            spi_sclk, spi_mosi;
  logic [7:0]      spi_ncs, spi_miso;
  logic [5:0]      del_ena;
  logic [5:0][2:0] del_code;
  int              checks = 0, failures = 0;

  always #5 clk = ~clk;

  flasher_cpld dut (
    .clk, .rst_n, .host_addr, .host_data_i, .host_data_o, .host_data_oe,
    .host_nwr, .host_nrd, .owm_intr, .owm_dq_low, .owm_dq_in,
    .spi_sclk, .spi_mosi, .spi_ncs, .spi_miso, .del_ena, .del_code
  );

  // 1-Wire lines with pull-ups
  localparam logic [55:0] BOARD_ID = 56'h0123456789AB_01;
  assign owm_dq_in = ~(owm_dq_low | dev_pull);
  for (genvar c = 0; c < 6; c++) begin : g_prom
    ow_slave_model #(.US(24), .KIND(0), .SEED(c * 16)) prom (
      .clk, .line(owm_dq_in[c]), .pull(dev_pull[c]));
  end
  ow_slave_model #(.US(24), .KIND(1), .ROM_ID(BOARD_ID)) board_id (
    .clk, .line(owm_dq_in[6]), .pull(dev_pull[6]));
  assign dev_pull[7] = 1'b0;

  // SPI devices
  logic [7:0] sdev [8];
  for (genvar c = 0; c < 8; c++) begin : g_spi
    always @(posedge spi_sclk) if (!spi_ncs[c]) sdev[c] <= {sdev[c][6:0], spi_mosi};
    assign spi_miso[c] = !spi_ncs[c] && sdev[c][7];
  end

  // ------------------------------------------------------------------
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_presence, n_no_presence, n_chan_clear, n_intr_hi, n_intr_lo, n_tx, n_rx,
      n_crc_ok, n_spi_mode, n_blocked, n_delay, n_prog;

  task automatic bus_wr(input addr_t a, input data_t d);
    @(negedge clk);
    host_addr = a; host_data_i = d; host_nwr = 0;
    repeat (4) @(negedge clk);
    host_nwr = 1;
    repeat (4) @(negedge clk);
  endtask

  task automatic bus_rd(input addr_t a, output data_t d);
    @(negedge clk);
    host_addr = a; host_nrd = 0;
    repeat (4) @(negedge clk);
    d = host_data_o;
    if (host_data_oe != 8'hFF) begin failures++; $display("FAIL: data bus not driven on read"); end
    host_nrd = 1;
    repeat (4) @(negedge clk);
  endtask

  // wait for INTR, then for the flag register to show TBE
  task automatic ow_wait(output data_t flags);
    int guard = 0;
    forever begin
      while (!owm_intr) @(negedge clk);
      bus_rd(ADDR_OWM_COMMAND + 8'd2, flags);
      if (flags[2]) break;
      guard++;
      if (guard > 100000) break;
    end
  endtask

  task automatic ow_init_master();
    data_t d;
    bus_wr(ADDR_OWM_COMMAND + 8'd4, 8'h0D);
    bus_wr(ADDR_OWM_COMMAND + 8'd3, 8'h17);
    bus_rd(ADDR_OWM_COMMAND + 8'd4, d);
    check(d == 8'h0D, "divider set");
  endtask

  task automatic ow_select(input int ch);
    data_t d;
    bus_wr(ADDR_OWM_SLVSEL, 8'(1 << ch));
    bus_rd(ADDR_OWM_SLVSEL, d);
    check(d == 8'(1 << ch), "channel select read-back");
    bus_rd(ADDR_OWM_COMMAND + 8'd4, d);
    if (d == 8'h00) n_chan_clear++;
  endtask

  task automatic ow_reset(output bit present);
    data_t f;
    bus_wr(ADDR_OWM_COMMAND, 8'h01);
    if (!owm_intr) n_intr_lo++;
    ow_wait(f);
    n_intr_hi++;
    check(f[0], "PD after reset");
    present = f[1];
    if (present) n_presence++; else n_no_presence++;
  endtask

  task automatic ow_tx(input logic [2:0] off, input data_t b);
    data_t f, d;
    bus_wr(ADDR_OWM_COMMAND + 8'(off), b);
    ow_wait(f);
    bus_rd(ADDR_OWM_COMMAND + 8'd1, d);   // drop the echo, clears RBF
    n_tx++;
  endtask

  task automatic ow_rx(output data_t b);
    data_t f;
    bus_wr(ADDR_OWM_COMMAND + 8'd1, 8'hFF);
    ow_wait(f);
    check(f[4], "RBF after read slots");
    bus_rd(ADDR_OWM_COMMAND + 8'd1, b);
    n_rx++;
  endtask

  function automatic byte unsigned crc8(input byte unsigned crc, input byte unsigned d);
    byte unsigned c;
    c = crc ^ d;
    for (int i = 0; i < 8; i++) c = c[0] ? ((c >> 1) ^ 8'h8C) : (c >> 1);
    return c;
  endfunction

  function automatic byte unsigned mem_init(input int ch, input int a);
    return 8'(a * 37 + 5 + ch * 16);
  endfunction

  // ------------------------------------------------------------------
  initial begin : watchdog
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t d, c;
    bit    pres;
    logic [2:0] code [6];
    host_addr = '0; host_data_i = '0; host_nwr = 1; host_nrd = 1;
    {n_presence, n_no_presence, n_chan_clear, n_intr_hi, n_intr_lo, n_tx, n_rx,
     n_crc_ok, n_spi_mode, n_blocked, n_delay, n_prog} = '0;
    for (int k = 0; k < 8; k++) sdev[k] = 8'(k * 17 + 3);
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);

    // ---- trigger delay ----
    for (int n = 0; n < 4; n++) begin
      d = 8'($urandom);
      bus_wr(ADDR_DEL_ENA, d);
      for (int r = 0; r < 3; r++) begin
        c = 8'($urandom);
        code[2*r] = c[2:0]; code[2*r+1] = c[5:3];
        bus_wr(ADDR_DEL_DAT0 + 8'(r), c);
      end
      check(del_ena == d[5:0], "delay enables on the pins");
      for (int m = 0; m < 6; m++) check(del_code[m] == code[m], $sformatf("delay code module %0d", m));
      bus_rd(ADDR_DEL_DAT1, c);
      check(c == {2'b00, code[3], code[2]}, "delay code read-back");
      n_delay++;
    end

    // ---- Read_ID on DQ6 ----
    ow_select(6);
    ow_init_master();
    ow_reset(pres);
    check(pres, "board ID answers reset");
    ow_tx(0, 8'h33);
    c = 0;
    for (int i = 0; i < 8; i++) begin
      ow_rx(d);
      if (i < 7) begin
        check(d == BOARD_ID[8*i +: 8], $sformatf("ID byte %0d", i));
        c = crc8(c, d);
      end else begin
        check(d == c, "ID CRC");
        if (d == c) n_crc_ok++;
      end
    end

    // ---- Read_ROM and Read_Status on two PROM channels ----
    for (int k = 0; k < 2; k++) begin
      int ch; int a;
      ch = (k == 0) ? 2 : 5;
      a  = 10 + k * 40;
      ow_select(ch);
      ow_init_master();
      // Read_ROM
      ow_reset(pres);
      check(pres, "PROM answers reset");
      ow_tx(0, 8'hCC);
      ow_tx(0, 8'hF0);
      ow_tx(1, 8'(a));
      ow_tx(1, 8'h00);
      ow_rx(d);
      c = crc8(crc8(crc8(0, 8'hF0), 8'(a)), 8'h00);
      check(d == c, "read-memory CRC");
      if (d == c) n_crc_ok++;
      for (int i = 0; i < 4; i++) begin
        ow_rx(d);
        check(d == mem_init(ch, a + i), $sformatf("PROM %0d byte %0d: %02h want %02h", ch, a + i, d, mem_init(ch, a + i)));
      end
      ow_reset(pres);
      // Read_Status
      ow_tx(0, 8'hCC);
      ow_tx(0, 8'hAA);
      ow_tx(1, 8'h01);
      ow_tx(1, 8'h00);
      ow_rx(d);
      c = crc8(crc8(crc8(0, 8'hAA), 8'h01), 8'h00);
      check(d == c, "read-status CRC");
      if (d == c) n_crc_ok++;
      ow_rx(d);
      check(d == 8'hFF, "status byte unprogrammed");
      ow_reset(pres);
    end

    // ---- Write_ROM on DQ0: two bytes ----
    ow_select(0);
    ow_init_master();
    ow_reset(pres);
    ow_tx(0, 8'hCC);
    ow_tx(0, 8'h0F);
    ow_tx(1, 8'h20);
    ow_tx(1, 8'h00);
    ow_tx(1, 8'h5A);
    ow_rx(d);
    c = crc8(crc8(crc8(crc8(0, 8'h0F), 8'h20), 8'h00), 8'h5A);
    check(d == c, "write-memory CRC");
    if (d == c) n_crc_ok++;
    ow_rx(d);
    check(d == (mem_init(0, 32) & 8'h5A), "programmed byte read back");
    n_prog++;
    ow_tx(1, 8'h0F);
    ow_rx(d);
    c = crc8(crc8(crc8(0, 8'h21), 8'h00), 8'h0F);
    check(d == c, "second write CRC");
    ow_rx(d);
    check(d == (mem_init(0, 33) & 8'h0F), "second programmed byte");
    n_prog++;
    ow_reset(pres);
    // Write_Status
    ow_tx(0, 8'hCC);
    ow_tx(0, 8'h55);
    ow_tx(1, 8'h00);
    ow_tx(1, 8'h00);
    ow_tx(1, 8'hFC);
    ow_rx(d);
    c = crc8(crc8(crc8(crc8(0, 8'h55), 8'h00), 8'h00), 8'hFC);
    check(d == c, "write-status CRC");
    ow_rx(d);
    check(d == 8'hFC, "status byte programmed");
    n_prog++;
    ow_reset(pres);
    // read the programmed memory byte back through Read_ROM
    ow_tx(0, 8'hCC);
    ow_tx(0, 8'hF0);
    ow_tx(1, 8'h20);
    ow_tx(1, 8'h00);
    ow_rx(d);
    ow_rx(d);
    check(d == (mem_init(0, 32) & 8'h5A), "programmed byte in memory");
    ow_reset(pres);

    // ---- empty channel ----
    ow_select(7);
    ow_init_master();
    ow_reset(pres);
    check(!pres, "no presence on the empty channel");
    check(g_prom[0].prom.presences == 4 && board_id.presences == 1, "resets reach only the selected device");

    // ---- SPI ----
    for (int n = 0; n < 3; n++) begin
      logic [7:0] act, tx, rx, old [8], e;
      act = (n == 0) ? 8'h04 : 8'($urandom);
      bus_wr(ADDR_SPI_ACTIVE_LIST, act);
      bus_wr(ADDR_DEL_ENA, 8'h15);
      bus_wr(ADDR_SPI_OPERATE, SPI_OPERATE_START);
      check(host_data_oe == 8'h02, "only data(1) driven in SPI_mode");
      n_spi_mode++;
      // a register write while in SPI_mode is ignored
      bus_wr(ADDR_DEL_ENA, 8'h00);
      check(del_ena == 6'h15, "delay enables unchanged in SPI_mode");
      if (del_ena == 6'h15) n_blocked++;
      for (int k = 0; k < 8; k++) old[k] = sdev[k];
      tx = 8'($urandom); rx = 0;
      host_addr = ADDR_DEL_ENA;
      @(negedge clk); host_nwr = 0; host_data_i = 8'h04;   // nCS high
      @(negedge clk); host_data_i = 8'h00;                  // nCS low
      @(negedge clk);
      check(spi_ncs == ~act, "chip selects of the active channels");
      for (int b = 7; b >= 0; b--) begin
        host_data_i = {7'd0, tx[b]};
        repeat (2) @(negedge clk);
        rx = {rx[6:0], host_data_o[1]};
        host_nwr = 1;
        repeat (2) @(negedge clk);
        host_nwr = 0;
      end
      host_data_i = 8'h04;
      repeat (2) @(negedge clk);
      host_nwr = 1;
      repeat (4) @(negedge clk);
      e = 0;
      for (int k = 0; k < 8; k++) begin
        if (act[k]) e |= old[k];
        check(sdev[k] == (act[k] ? tx : old[k]), $sformatf("SPI device %0d", k));
      end
      check(rx == e, $sformatf("MISO byte %02h want %02h", rx, e));
      bus_wr(ADDR_SPI_OPERATE, SPI_OPERATE_END);
      bus_rd(ADDR_SPI_OPERATE, d);
      check(d == 8'h00 && spi_ncs == 8'hFF, "SPI_mode ended");
    end
    // delay registers still writable after SPI_mode
    bus_wr(ADDR_DEL_ENA, 8'h2A);
    check(del_ena == 6'h2A, "writes accepted after SPI_mode");

    // ---- mechanism coverage ----
    $display("presence=%0d no_presence=%0d chan_clear=%0d intr_hi=%0d intr_lo=%0d tx=%0d rx=%0d crc_ok=%0d prog=%0d spi_mode=%0d blocked=%0d delay=%0d",
             n_presence, n_no_presence, n_chan_clear, n_intr_hi, n_intr_lo, n_tx, n_rx,
             n_crc_ok, n_prog, n_spi_mode, n_blocked, n_delay);
    check(n_presence > 0, "presence pulse seen");
    check(n_no_presence > 0, "missing presence seen");
    check(n_chan_clear > 0, "channel change cleared the master");
    check(n_intr_hi > 0 && n_intr_lo > 0, "INTR both levels");
    check(n_tx > 0 && n_rx > 0, "bytes sent and received");
    check(n_crc_ok > 0, "CRC matched");
    check(n_prog > 0, "PROM programmed");
    check(n_spi_mode > 0, "SPI_mode entered");
    check(n_blocked > 0, "write blocked in SPI_mode");
    check(n_delay > 0, "delay codes set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
