// trig_delay_regs: trigger-delay control registers for the six LED modules.
//
// Each LED module has an adjustable trigger-delay device outside the CPLD,
// set by a 3-bit code and switched on by an enable line. The host writes:
//   ADDR_DEL_ENA   bit n enables LED module n (n = 0..5)
//   ADDR_DEL_DAT0  bits 2:0 code of module 0, bits 5:3 code of module 1
//   ADDR_DEL_DAT1  bits 2:0 code of module 2, bits 5:3 code of module 3
//   ADDR_DEL_DAT2  bits 2:0 code of module 4, bits 5:3 code of module 5
// The registers drive the codes and enables straight to the device pins and
// read back as written (bits 7:6 read 0).
//
// Follows the description: the four registers and the bit packing of the
// codes. This design's choices: the enable word as a bit mask (one bit per
// module, so several modules may be enabled together), reset values of 0.
//
// Timing: outputs change the cycle after bus.wr.
module trig_delay_regs
  import flasher_pkg::*;
#(
  parameter int unsigned N_LED = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  reg_bus_t         bus,
  input  addr_t            rd_addr,
  output data_t            rdata,
  output logic             rd_hit,
  output logic [N_LED-1:0] del_ena,
  output logic [N_LED-1:0][2:0] del_code
);

  localparam int unsigned N_DAT = (N_LED + 1) / 2;   // two modules per register

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      del_ena  <= '0;
      del_code <= '0;
    end else if (bus.wr) begin
      if (bus.addr == ADDR_DEL_ENA) del_ena <= bus.wdata[N_LED-1:0];
      for (int unsigned r = 0; r < N_DAT; r++) begin
        if (bus.addr == ADDR_DEL_DAT0 + addr_t'(r)) begin
          del_code[2*r] <= bus.wdata[2:0];
          if (2*r + 1 < N_LED) del_code[2*r+1] <= bus.wdata[5:3];
        end
      end
    end
  end

  always_comb begin
    rd_hit = 1'b0;
    rdata  = '0;
    if (rd_addr == ADDR_DEL_ENA) begin
      rd_hit = 1'b1;
      rdata  = data_t'(del_ena);
    end
    for (int unsigned r = 0; r < N_DAT; r++) begin
      if (rd_addr == ADDR_DEL_DAT0 + addr_t'(r)) begin
        rd_hit     = 1'b1;
        rdata[2:0] = del_code[2*r];
        if (2*r + 1 < N_LED) rdata[5:3] = del_code[2*r+1];
      end
    end
  end

endmodule
