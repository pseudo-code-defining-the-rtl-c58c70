// owm_master: 1-Wire bus master of the flasher CPLD.
//
// The host sees five byte registers at ADDR_OWM_COMMAND + 0..4:
//   0x00 command   write 0x01: send a reset pulse and look for a presence
//                  pulse; write any other value: transmit it as a byte
//                  (the host writes ROM/function commands such as 0xCC,
//                  0xF0, 0x33 here). Reads bit 0 = reset still in progress.
//   0x01 data      write: transmit buffer; read: receive buffer (clears RBF).
//                  Writing 0xFF produces eight read time slots, and the
//                  received byte appears in the receive buffer.
//   0x02 interrupt flags {0,0,RSRF,RBF,TEMT,TBE,PDR,PD}; a read clears PD.
//   0x03 interrupt enables {DQOE,ENBSY,ESINT,ERBF,ETMT,ETBE,IAS,EPD}.
//   0x04 clock divider; 0 stops the master.
//
// How it works: the clock divider turns the CPLD clock into a 1 us tick,
// divide ratio = {1,3,5,7}[div[1:0]] * 2**div[4:2], so the host's set-up
// value 0x0D divides by 24 (a 24 MHz clock gives 1 us). A small state
// machine counts ticks: a reset is T_RSTL us low, then T_RSTH us released
// with the line sampled T_MSP us after release (a low level = a slave's
// presence pulse, PDR=1), after which PD is set. A byte moves from the
// transmit buffer into the shift register (TEMT=0) and is sent LSB first in
// eight T_SLOT us time slots: a 1 is T_W1L us low, a 0 is T_W0L
// us low, and every slot samples the line at T_MSR us, so the bits a slave
// holds low read back as 0. After the eighth slot the sampled byte is
// loaded into the receive buffer (RBF=1) and TEMT returns to 1.
// TBE means the whole transmitter is free: it is 0 from a write to the
// buffer (or a reset command) until the byte (or reset) has finished, so a
// host that writes 0xFF, waits for INTR and sees TBE=1 knows the received
// byte is ready. ENBSY's "not busy" condition is the same as TBE.
// INTR is the OR of the enabled flags (EPD-PD, ETBE-TBE, ETMT-TEMT,
// ERBF-RBF, ENBSY-TBE), active high when IAS=1, active low otherwise.
// ESINT and DQOE are stored and read back but have no effect.
//
// The register offsets, command values, the reset / write-0xFF-to-read
// protocol, PD in bit 0, TBE in bit 2 and the interrupt-enable bit order
// follow the interface description. The divider coding, the other flag
// positions, the slot timing (standard 1-Wire values) and the rule that
// any byte other than 0x01 written to 0x00 is transmitted are this design's
// choices. soft_clr (pulse) returns every register to its reset value; the
// top pulses it when a new slave channel is selected.
//
// Bus timing: registers change the cycle after bus.wr; rdata is
// combinational from rd_addr.
module owm_master
  import flasher_pkg::*;
#(
  parameter int unsigned T_RSTL = 480,  // reset low time, us
  parameter int unsigned T_RSTH = 480,  // reset high (presence window), us
  parameter int unsigned T_MSP  = 70,   // presence sample point after release, us
  parameter int unsigned T_SLOT = 70,   // time slot length incl. recovery, us
  parameter int unsigned T_W1L  = 6,    // low time of a 1 / read slot, us
  parameter int unsigned T_W0L  = 60,   // low time of a 0 slot, us
  parameter int unsigned T_MSR  = 15    // read sample point in a slot, us
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     soft_clr,
  input  reg_bus_t bus,
  input  addr_t    rd_addr,
  output data_t    rdata,
  output logic     rd_hit,
  output logic     intr,
  output logic     dq_low,     // 1: pull the selected DQ line low
  input  logic     dq_in       // level of the selected DQ line
);

  typedef enum logic [1:0] {S_IDLE, S_RST_LOW, S_RST_HIGH, S_SLOT} state_t;

  state_t     state;
  owm_inten_t inten;
  data_t      clkdiv;
  data_t      txbuf, rxbuf, shreg, rxsh;
  logic       txfull, tbe, rbf, pd, pdr, rst_req;
  logic [2:0] bitcnt;
  logic [9:0] div_cnt, div_ratio;
  logic [9:0] us_cnt;
  logic       tick;
  logic [1:0] dq_sync;

  // Register decode for writes and clear-on-read.
  logic       bus_hit;
  logic [2:0] bus_off;
  assign bus_hit = (bus.addr[AW-1:3] == ADDR_OWM_COMMAND[AW-1:3]) && (bus.addr[2:0] <= 3'd4);
  assign bus_off = bus.addr[2:0];

  // 1 us tick.
  always_comb begin
    unique case (clkdiv[1:0])
      2'd0: div_ratio = 10'd1;
      2'd1: div_ratio = 10'd3;
      2'd2: div_ratio = 10'd5;
      default: div_ratio = 10'd7;
    endcase
    div_ratio = div_ratio << clkdiv[4:2];
  end
  assign tick = (clkdiv != '0) && (div_cnt == div_ratio - 10'd1);

  logic slot_bit;
  assign slot_bit = shreg[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      dq_sync <= 2'b11;
    end else begin
      dq_sync <= {dq_sync[0], dq_in};
      if (clkdiv == '0 || tick || soft_clr) div_cnt <= '0;
      else                                  div_cnt <= div_cnt + 10'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      inten   <= '0;
      clkdiv  <= '0;
      txbuf   <= '0;
      rxbuf   <= '0;
      shreg   <= '0;
      rxsh    <= '0;
      txfull  <= 1'b0;
      rbf     <= 1'b0;
      pd      <= 1'b0;
      pdr     <= 1'b0;
      rst_req <= 1'b0;
      bitcnt  <= '0;
      us_cnt  <= '0;
    end else if (soft_clr) begin
      state   <= S_IDLE;
      inten   <= '0;
      clkdiv  <= '0;
      txbuf   <= '0;
      rxbuf   <= '0;
      shreg   <= '0;
      rxsh    <= '0;
      txfull  <= 1'b0;
      rbf     <= 1'b0;
      pd      <= 1'b0;
      pdr     <= 1'b0;
      rst_req <= 1'b0;
      bitcnt  <= '0;
      us_cnt  <= '0;
    end else begin
      // Host side: clear-on-read, then writes.
      if (bus.rd && bus_hit) begin
        if (bus_off == OWM_REG_INT)  pd  <= 1'b0;
        if (bus_off == OWM_REG_DATA) rbf <= 1'b0;
      end
      if (bus.wr && bus_hit) begin
        unique case (bus_off)
          OWM_REG_CMD: begin
            if (bus.wdata == OWM_CMD_RESET) rst_req <= 1'b1;
            else begin
              txbuf  <= bus.wdata;
              txfull <= 1'b1;
            end
          end
          OWM_REG_DATA: begin
            txbuf  <= bus.wdata;
            txfull <= 1'b1;
          end
          OWM_REG_INTEN:  inten  <= owm_inten_t'(bus.wdata);
          OWM_REG_CLKDIV: clkdiv <= bus.wdata;
          default: ;
        endcase
      end

      // Line side.
      unique case (state)
        S_IDLE: begin
          us_cnt <= '0;
          if (clkdiv != '0) begin
            if (rst_req) begin
              rst_req <= 1'b0;
              pd      <= 1'b0;
              state   <= S_RST_LOW;
            end else if (txfull) begin
              shreg  <= txbuf;
              txfull <= 1'b0;
              bitcnt <= '0;
              state  <= S_SLOT;
            end
          end
        end
        S_RST_LOW: if (tick) begin
          if (us_cnt == 10'(T_RSTL - 1)) begin
            us_cnt <= '0;
            state  <= S_RST_HIGH;
          end else us_cnt <= us_cnt + 10'd1;
        end
        S_RST_HIGH: if (tick) begin
          if (us_cnt == 10'(T_MSP)) pdr <= !dq_sync[1];
          if (us_cnt == 10'(T_RSTH - 1)) begin
            us_cnt <= '0;
            pd     <= 1'b1;
            state  <= S_IDLE;
          end else us_cnt <= us_cnt + 10'd1;
        end
        S_SLOT: if (tick) begin
          if (us_cnt == 10'(T_MSR)) rxsh <= {dq_sync[1], rxsh[7:1]};
          if (us_cnt == 10'(T_SLOT - 1)) begin
            us_cnt <= '0;
            shreg  <= {1'b0, shreg[7:1]};
            bitcnt <= bitcnt + 3'd1;
            if (bitcnt == 3'd7) begin
              rxbuf <= rxsh;
              rbf   <= 1'b1;
              state <= S_IDLE;
            end
          end else us_cnt <= us_cnt + 10'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Line driver: low during the reset pulse and the low part of a slot.
  always_comb begin
    unique case (state)
      S_RST_LOW: dq_low = 1'b1;
      S_SLOT:    dq_low = (us_cnt < 10'(slot_bit ? T_W1L : T_W0L));
      default:   dq_low = 1'b0;
    endcase
  end

  // Flags and interrupt.
  owm_int_t flags;
  logic     temt, idle, any_int;
  assign temt  = (state != S_SLOT);
  assign tbe   = !txfull && (state == S_IDLE) && !rst_req;
  assign idle  = tbe;
  always_comb begin
    flags      = '0;
    flags.pd   = pd;
    flags.pdr  = pdr;
    flags.tbe  = tbe;
    flags.temt = temt;
    flags.rbf  = rbf;
  end
  assign any_int = (inten.epd & pd) | (inten.etbe & tbe) | (inten.etmt & temt) |
                   (inten.erbf & rbf) | (inten.enbsy & idle);
  assign intr = inten.ias ? any_int : !any_int;

  // Read-back.
  always_comb begin
    rd_hit = (rd_addr[AW-1:3] == ADDR_OWM_COMMAND[AW-1:3]) && (rd_addr[2:0] <= 3'd4);
    unique case (rd_addr[2:0])
      OWM_REG_CMD:    rdata = {7'd0, rst_req || state == S_RST_LOW || state == S_RST_HIGH};
      OWM_REG_DATA:   rdata = rxbuf;
      OWM_REG_INT:    rdata = flags;
      OWM_REG_INTEN:  rdata = inten;
      OWM_REG_CLKDIV: rdata = clkdiv;
      default:        rdata = '0;
    endcase
  end

endmodule
