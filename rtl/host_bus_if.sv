// host_bus_if: DOMMB host-bus front end of the flasher CPLD.
//
// The host drives an address, data and active-low nWR / nRD strobes that
// are asynchronous to the CPLD clock. Both strobes pass through a
// two-flop synchroniser. While a raw strobe is low the address (and for
// writes the data) is sampled every cycle, so the last sample is the one
// taken just before the rising edge; once the synchronised strobe has risen,
// a one-cycle wr or rd strobe is issued on the register bus with that
// sample. The host must hold address and data stable for at least one clock
// period before the rising edge and start its next access no sooner than
// 3 clock periods after it.
//
// Timing: bus.wr / bus.rd appear 3 clock cycles after the host's rising
// edge of nWR / nRD. A strobe low for fewer than 2 clock cycles may be
// missed. Read data itself is returned combinationally by the top; bus.rd
// only drives clear-on-read side effects.
//
// The description names the nWR/nRD/Addr/Data bus; the synchroniser, the
// rising-edge capture and the timing above are this design's choices.
module host_bus_if
  import flasher_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  addr_t    host_addr,
  input  data_t    host_wdata,
  input  logic     host_nwr,
  input  logic     host_nrd,
  output reg_bus_t bus
);

  logic [1:0] nwr_sync, nrd_sync;
  logic       nwr_q, nrd_q;
  addr_t      addr_cap;
  data_t      data_cap;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nwr_sync <= 2'b11;
      nrd_sync <= 2'b11;
      nwr_q    <= 1'b1;
      nrd_q    <= 1'b1;
      addr_cap <= '0;
      data_cap <= '0;
      bus      <= '0;
    end else begin
      nwr_sync <= {nwr_sync[0], host_nwr};
      nrd_sync <= {nrd_sync[0], host_nrd};
      nwr_q    <= nwr_sync[1];
      nrd_q    <= nrd_sync[1];
      if (!host_nwr || !host_nrd) addr_cap <= host_addr;
      if (!host_nwr) data_cap <= host_wdata;
      bus.wr    <= nwr_sync[1] && !nwr_q;
      bus.rd    <= nrd_sync[1] && !nrd_q;
      bus.addr  <= addr_cap;
      bus.wdata <= data_cap;
    end
  end

  // Bus rule: the host never asserts nWR and nRD together.
  a_no_rd_wr_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(!nwr_sync[1] && !nrd_sync[1]));

endmodule
