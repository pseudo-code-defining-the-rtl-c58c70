// owm_channel_sel_tb: checks the 1-Wire slave-channel selector.
//
// Writes every one-hot word, 0x00 and words with several bits set, and
// checks the selection, its read-back, the new_sel pulse on a change (and
// none on a repeated or refused word), that the master's pull-down reaches
// only the selected line and that the master sees the selected line's level
// (1 when nothing is selected), with random line levels.
module owm_channel_sel_tb;
  import flasher_pkg::*;

  logic       clk = 0, rst_n = 0;
  reg_bus_t   bus;
  addr_t      rd_addr;
  data_t      rdata;
  logic       rd_hit, new_sel, m_dq_low, m_dq_in;
  logic [7:0] sel, dq_low, dq_in;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  owm_channel_sel dut (.clk, .rst_n, .bus, .rd_addr, .rdata, .rd_hit, .sel, .new_sel,
                       .m_dq_low, .m_dq_in, .dq_low, .dq_in);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] exp_sel;
  int         pulses;
  always @(posedge clk) if (new_sel) pulses++;

  task automatic wsel(input addr_t a, input logic [7:0] w);
    logic [7:0] prev_sel;
    bit ok;
    prev_sel = exp_sel;
    ok = ((w & (w - 8'd1)) == 0);
    if (ok && a == ADDR_OWM_SLVSEL) exp_sel = w;
    pulses = 0;
    @(negedge clk); bus.wr = 1; bus.addr = a; bus.wdata = w;
    @(negedge clk); bus.wr = 0;
    repeat (2) @(negedge clk);
    check(sel == exp_sel, $sformatf("sel %02h want %02h after writing %02h", sel, exp_sel, w));
    check(pulses == ((exp_sel != prev_sel) ? 1 : 0), "new_sel pulse only on change");
    rd_addr = ADDR_OWM_SLVSEL; #1;
    check(rd_hit && rdata == exp_sel, "read-back");
    // mux
    for (int k = 0; k < 8; k++) begin
      dq_in = 8'($urandom); m_dq_low = $urandom_range(0, 1); #1;
      check(dq_low == (m_dq_low ? exp_sel : 8'h00), "pull-down only on the selected line");
      check(m_dq_in == ((exp_sel == 0) ? 1'b1 : ((dq_in & exp_sel) != 0)), "selected line level");
    end
  endtask

  initial begin
    bus = '0; rd_addr = '0; m_dq_low = 0; dq_in = '1; exp_sel = 0; pulses = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) wsel(ADDR_OWM_SLVSEL, 8'(1 << i));
    wsel(ADDR_OWM_SLVSEL, 8'h80);          // same channel again: no pulse
    wsel(ADDR_OWM_SLVSEL, 8'h00);          // none
    wsel(ADDR_OWM_SLVSEL, 8'h40);
    wsel(ADDR_OWM_SLVSEL, 8'h41);          // two channels: refused
    wsel(ADDR_OWM_SLVSEL, 8'hFF);          // refused
    wsel(ADDR_OWM_SLVSEL + 8'd1, 8'h01);   // other address: ignored
    rd_addr = ADDR_OWM_SLVSEL + 8'd1; #1;
    check(!rd_hit, "no read hit at another address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
