// owm_channel_sel: 1-Wire slave-channel selector of the flasher CPLD.
//
// One 1-Wire master serves eight slave channels DQ0..DQ7 (DQ0-DQ5 carry the
// LED modules' calibration PROMs, DQ6 the board-ID device). The host picks
// the channel by writing a one-hot word to ADDR_OWM_SLVSEL: bit n selects
// channel n, 0x00 selects none. Only one channel may be selected at a time,
// so a word with more than one bit set is ignored and the previous
// selection stays. When the selection changes, new_sel pulses for one cycle;
// the top uses it to clear the master, which the host must then set up
// again. The master's pull-down goes only to the selected line; the line
// level returned to the master is that of the selected line, or 1 (idle,
// pulled up) when none is selected.
//
// Follows the description: the one-hot coding of the select word and the
// single-channel rule. This design's choices: ignoring words with several
// bits set, and clearing the master on a change of channel.
//
// Timing: sel changes, and new_sel pulses, the cycle after bus.wr. The
// DQ mux is combinational.
module owm_channel_sel
  import flasher_pkg::*;
#(
  parameter int unsigned N_CH = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  reg_bus_t        bus,
  input  addr_t           rd_addr,
  output data_t           rdata,
  output logic            rd_hit,
  output logic [N_CH-1:0] sel,
  output logic            new_sel,
  input  logic            m_dq_low,     // master pulls the line low
  output logic            m_dq_in,      // selected line level to the master
  output logic [N_CH-1:0] dq_low,       // per-channel open-drain pull-down
  input  logic [N_CH-1:0] dq_in         // per-channel line level
);

  logic [N_CH-1:0] wsel;
  logic            one_or_none;
  assign wsel        = bus.wdata[N_CH-1:0];
  assign one_or_none = ((wsel & (wsel - 1'b1)) == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel     <= '0;
      new_sel <= 1'b0;
    end else begin
      new_sel <= 1'b0;
      if (bus.wr && bus.addr == ADDR_OWM_SLVSEL && one_or_none) begin
        sel     <= wsel;
        new_sel <= (wsel != sel);
      end
    end
  end

  assign dq_low  = m_dq_low ? sel : '0;
  assign m_dq_in = (sel == '0) ? 1'b1 : ((sel & dq_in) != '0);

  // Never more than one channel selected.
  a_one_channel: assert property (@(posedge clk) disable iff (!rst_n) (sel & (sel - 1'b1)) == '0);

  assign rd_hit = (rd_addr == ADDR_OWM_SLVSEL);
  assign rdata  = data_t'(sel);

endmodule
