// host_bus_if_tb: checks the host-bus front end.
//
// Random host writes and reads with strobes of random length (2..8 clocks)
// and random gaps; after every access exactly one wr or rd strobe must
// appear, 3 cycles after the rising edge of nWR / nRD, carrying the address
// (and for writes the data) the host drove. Strobes that are not present must
// stay low, and the address is changed right after the rising edge to make
// sure the value sampled while the strobe was low is the one reported.
module host_bus_if_tb;
  import flasher_pkg::*;

  logic     clk = 0, rst_n = 0;
  addr_t    host_addr;
  data_t    host_wdata;
  logic     host_nwr, host_nrd;
  reg_bus_t bus;
  int       checks = 0, failures = 0;

  always #5 clk = ~clk;

  host_bus_if dut (.clk, .rst_n, .host_addr, .host_wdata, .host_nwr, .host_nrd, .bus);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int wr_seen, rd_seen;
  always @(posedge clk) begin
    if (bus.wr) wr_seen++;
    if (bus.rd) rd_seen++;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr_t a; data_t d; bit is_wr; int lat;
    host_addr = '0; host_wdata = '0; host_nwr = 1; host_nrd = 1;
    wr_seen = 0; rd_seen = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(wr_seen == 0 && rd_seen == 0, "no strobe after reset");
    for (int n = 0; n < 300; n++) begin
      a = addr_t'($urandom); d = data_t'($urandom); is_wr = $urandom_range(0, 1);
      @(negedge clk);
      host_addr = a; host_wdata = d;
      if (is_wr) host_nwr = 0; else host_nrd = 0;
      repeat ($urandom_range(2, 8)) @(negedge clk);
      host_nwr = 1; host_nrd = 1;
      @(posedge clk);   // edge that samples the rising strobe
      lat = 1;
      #1 host_addr = ~a; host_wdata = ~d;
      wr_seen = 0; rd_seen = 0;
      while (!(bus.wr || bus.rd) && lat < 10) begin @(posedge clk); #1 lat++; end
      check(lat == 3, $sformatf("strobe latency %0d", lat));
      check(bus.wr == is_wr && bus.rd == !is_wr, "strobe kind");
      check(bus.addr == a, "captured address");
      if (is_wr) check(bus.wdata == d, "captured data");
      @(posedge clk); #1;
      check(!bus.wr && !bus.rd, "strobe lasts one cycle");
      repeat ($urandom_range(0, 5)) @(posedge clk);
      check(wr_seen + rd_seen == 1, "exactly one strobe per access");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
