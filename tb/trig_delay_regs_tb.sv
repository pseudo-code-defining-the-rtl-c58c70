// trig_delay_regs_tb: checks the LED trigger-delay registers.
//
// Random writes to the enable and the three code registers (and to
// neighbouring addresses, which must change nothing); after each one the
// six enables and six 3-bit codes are compared with a model of the register
// map (bits 2:0 -> even module, bits 5:3 -> odd module) and every register
// is read back.
module trig_delay_regs_tb;
  import flasher_pkg::*;

  logic                clk = 0, rst_n = 0;
  reg_bus_t            bus;
  addr_t               rd_addr;
  data_t               rdata;
  logic                rd_hit;
  logic [5:0]          del_ena;
  logic [5:0][2:0]     del_code;
  int                  checks = 0, failures = 0;

  always #5 clk = ~clk;

  trig_delay_regs dut (.clk, .rst_n, .bus, .rd_addr, .rdata, .rd_hit, .del_ena, .del_code);

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

  logic [5:0] e_ena;
  logic [2:0] e_code [6];

  initial begin
    addr_t a; data_t d;
    bus = '0; rd_addr = '0; e_ena = 0;
    for (int i = 0; i < 6; i++) e_code[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(del_ena == 0 && del_code == 0, "reset values");
    for (int n = 0; n < 400; n++) begin
      a = ADDR_DEL_ENA + addr_t'($urandom_range(0, 4)) - addr_t'($urandom_range(0, 1));
      d = data_t'($urandom);
      case (a)
        ADDR_DEL_ENA:  e_ena = d[5:0];
        ADDR_DEL_DAT0: begin e_code[0] = d[2:0]; e_code[1] = d[5:3]; end
        ADDR_DEL_DAT1: begin e_code[2] = d[2:0]; e_code[3] = d[5:3]; end
        ADDR_DEL_DAT2: begin e_code[4] = d[2:0]; e_code[5] = d[5:3]; end
        default: ;
      endcase
      @(negedge clk); bus.wr = 1; bus.addr = a; bus.wdata = d;
      @(negedge clk); bus.wr = 0;
      check(del_ena == e_ena, "enables");
      for (int i = 0; i < 6; i++) check(del_code[i] == e_code[i], $sformatf("code of module %0d", i));
      rd_addr = ADDR_DEL_ENA; #1;
      check(rd_hit && rdata == {2'b00, e_ena}, "enable read-back");
      for (int r = 0; r < 3; r++) begin
        rd_addr = ADDR_DEL_DAT0 + addr_t'(r); #1;
        check(rd_hit && rdata == {2'b00, e_code[2*r+1], e_code[2*r]}, "code read-back");
      end
    end
    rd_addr = ADDR_DEL_DAT2 + 8'd1; #1;
    check(!rd_hit, "no hit past the last register");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
