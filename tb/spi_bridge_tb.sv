// spi_bridge_tb: checks the SPI pass-through mode.
//
// Outside SPI_mode SCLK/MOSI must rest at 0, every nCS high and the MISO
// return line low whatever the host pins do. The test then sets a random
// active list, enters SPI_mode with 0xFF, and clocks a byte to a small SPI
// shift-register device model on each active channel by toggling the host
// pins (nWR = SCLK, data(0) = MOSI, data(2) = nCS), reading the device's
// previous contents back on data(1). Inactive channels must keep nCS high.
// Writes of other values to the operate register must not change the mode;
// 0x00 ends it, and the active list must not change while in SPI_mode.
module spi_bridge_tb;
  import flasher_pkg::*;

  logic       clk = 0, rst_n = 0;
  reg_bus_t   bus;
  addr_t      rd_addr;
  data_t      rdata;
  logic       rd_hit, spi_mode;
  logic       host_nwr, host_d0, host_d2, host_d1;
  logic       spi_sclk, spi_mosi;
  logic [7:0] spi_ncs, spi_miso;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  spi_bridge dut (.clk, .rst_n, .bus, .rd_addr, .rdata, .rd_hit, .spi_mode,
                  .host_nwr, .host_d0, .host_d2, .host_d1,
                  .spi_sclk, .spi_mosi, .spi_ncs, .spi_miso);

  // one 8-bit SPI shift register per channel (mode 0: sample on rising SCLK)
  logic [7:0] dev [8];
  for (genvar c = 0; c < 8; c++) begin : g_dev
    always @(posedge spi_sclk) if (!spi_ncs[c]) dev[c] <= {dev[c][6:0], spi_mosi};
    assign spi_miso[c] = !spi_ncs[c] && dev[c][7];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input addr_t a, input data_t d);
    @(negedge clk); bus.wr = 1; bus.addr = a; bus.wdata = d;
    @(negedge clk); bus.wr = 0;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] act, tx, rx, old [8];
    bus = '0; rd_addr = '0; host_nwr = 1; host_d0 = 0; host_d2 = 1;
    for (int c = 0; c < 8; c++) dev[c] = 8'(c * 29 + 1);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // idle outside SPI_mode
    for (int k = 0; k < 20; k++) begin
      host_nwr = $urandom_range(0, 1); host_d0 = $urandom_range(0, 1); host_d2 = $urandom_range(0, 1); #1;
      check(!spi_sclk && !spi_mosi && spi_ncs == 8'hFF && !host_d1 && !spi_mode, "idle outside SPI_mode");
    end
    for (int n = 0; n < 20; n++) begin
      act = 8'($urandom);
      if (n == 0) act = 8'h00;
      wr(ADDR_SPI_ACTIVE_LIST, act);
      rd_addr = ADDR_SPI_ACTIVE_LIST; #1;
      check(rd_hit && rdata == act, "active list read-back");
      wr(ADDR_SPI_OPERATE, 8'h5A);
      check(!spi_mode, "other operate value does not start SPI_mode");
      wr(ADDR_SPI_OPERATE, SPI_OPERATE_START);
      check(spi_mode, "0xFF starts SPI_mode");
      rd_addr = ADDR_SPI_OPERATE; #1;
      check(rdata == 8'hFF, "operate read-back");
      wr(ADDR_SPI_ACTIVE_LIST, ~act);
      rd_addr = ADDR_SPI_ACTIVE_LIST; #1;
      check(rdata == act, "active list frozen in SPI_mode");
      // one byte transfer, MSB first
      for (int c = 0; c < 8; c++) old[c] = dev[c];
      tx = 8'($urandom); rx = 0;
      host_nwr = 0; host_d2 = 1; #5;
      check(spi_ncs == 8'hFF, "nCS high while data(2) high");
      host_d2 = 0; #5;
      check(spi_ncs == ~act, "nCS low on exactly the active channels");
      for (int b = 7; b >= 0; b--) begin
        host_d0 = tx[b]; #5;
        check(spi_mosi == tx[b], "MOSI follows data(0)");
        rx = {rx[6:0], host_d1};
        host_nwr = 1; #5;
        check(spi_sclk, "SCLK follows nWR");
        host_nwr = 0; #5;
      end
      host_d2 = 1; #5;
      for (int c = 0; c < 8; c++) begin
        check(dev[c] == (act[c] ? tx : old[c]), $sformatf("channel %0d contents", c));
      end
      begin
        logic [7:0] e; e = 0;
        for (int c = 0; c < 8; c++) if (act[c]) e |= old[c];
        check(rx == e, $sformatf("MISO byte %02h want %02h", rx, e));
      end
      host_nwr = 1;
      wr(ADDR_SPI_OPERATE, 8'h12);
      check(spi_mode, "other value does not end SPI_mode");
      wr(ADDR_SPI_OPERATE, SPI_OPERATE_END);
      check(!spi_mode, "0x00 ends SPI_mode");
      host_d2 = 0; #1;
      check(spi_ncs == 8'hFF, "nCS high after SPI_mode");
      host_d2 = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
