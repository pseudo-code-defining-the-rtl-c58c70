// flasher_cpld: host-interface CPLD of an LED flasher board.
//
// The board's host (the DOM main board, "DOMMB") controls three things
// through one small register bus (8-bit address, 8-bit data, active-low
// nWR and nRD):
//   * a 1-Wire master (owm_master) that reaches, through the channel
//     selector (owm_channel_sel), one of eight 1-Wire lines: DQ0-DQ5 hold
//     the LED modules' calibration PROMs, DQ6 the board-ID device;
//   * an SPI pass-through mode (spi_bridge) in which the bus pins nWR,
//     data(0), data(1) and data(2) become SCLK, MOSI, MISO and nCS for the
//     active SPI channels;
//   * the delay codes and enables of the six LED modules' external
//     trigger-delay devices (trig_delay_regs).
// host_bus_if synchronises the strobes and issues one-cycle register-bus
// strobes; each block decodes its own addresses (see flasher_pkg).
//
// Reads: while nRD is low the CPLD drives all eight data lines
// (host_data_oe = 0xFF) with the register at host_addr, combinationally;
// unmapped addresses read 0. In SPI_mode only data(1) (MISO) is driven and
// every register write except one to ADDR_SPI_OPERATE is ignored, since nWR
// is then the SPI clock. Changing the 1-Wire channel clears the master.
// INTR (owm_intr) is the 1-Wire master's interrupt line to the host.
//
// The register functions, the pin roles in SPI_mode and the channel
// assignment follow the interface description; the absolute addresses, the
// bus synchronisation and the read timing are this design's choices.
module flasher_cpld
  import flasher_pkg::*;
#(
  parameter int unsigned N_OW  = 8,   // 1-Wire slave channels
  parameter int unsigned N_SPI = 8,   // SPI channels
  parameter int unsigned N_LED = 6    // LED modules with a trigger delay
) (
  input  logic             clk,
  input  logic             rst_n,
  // host bus
  input  addr_t            host_addr,
  input  data_t            host_data_i,
  output data_t            host_data_o,
  output data_t            host_data_oe,
  input  logic             host_nwr,
  input  logic             host_nrd,
  output logic             owm_intr,
  // 1-Wire channels (open drain: dq_low = 1 pulls the line down)
  output logic [N_OW-1:0]  owm_dq_low,
  input  logic [N_OW-1:0]  owm_dq_in,
  // SPI channels
  output logic             spi_sclk,
  output logic             spi_mosi,
  output logic [N_SPI-1:0] spi_ncs,
  input  logic [N_SPI-1:0] spi_miso,
  // trigger-delay devices
  output logic [N_LED-1:0]      del_ena,
  output logic [N_LED-1:0][2:0] del_code
);

  reg_bus_t bus_raw, bus;
  logic     spi_mode, spi_d1;
  logic     new_sel, m_dq_low, m_dq_in;
  data_t    rd_owm, rd_sel, rd_spi, rd_del;
  logic     hit_owm, hit_sel, hit_spi, hit_del;

  host_bus_if u_bus (
    .clk, .rst_n,
    .host_addr, .host_wdata(host_data_i), .host_nwr, .host_nrd,
    .bus(bus_raw)
  );

  // In SPI_mode nWR is SCLK: only the SPI_mode exit write gets through.
  always_comb begin
    bus    = bus_raw;
    bus.wr = bus_raw.wr && (!spi_mode || bus_raw.addr == ADDR_SPI_OPERATE);
    bus.rd = bus_raw.rd && !spi_mode;
  end

  owm_master u_owm (
    .clk, .rst_n, .soft_clr(new_sel), .bus,
    .rd_addr(host_addr), .rdata(rd_owm), .rd_hit(hit_owm),
    .intr(owm_intr), .dq_low(m_dq_low), .dq_in(m_dq_in)
  );

  owm_channel_sel #(.N_CH(N_OW)) u_sel (
    .clk, .rst_n, .bus,
    .rd_addr(host_addr), .rdata(rd_sel), .rd_hit(hit_sel),
    .sel(), .new_sel, .m_dq_low, .m_dq_in,
    .dq_low(owm_dq_low), .dq_in(owm_dq_in)
  );

  spi_bridge #(.N_SPI(N_SPI)) u_spi (
    .clk, .rst_n, .bus,
    .rd_addr(host_addr), .rdata(rd_spi), .rd_hit(hit_spi), .spi_mode,
    .host_nwr, .host_d0(host_data_i[0]), .host_d2(host_data_i[2]), .host_d1(spi_d1),
    .spi_sclk, .spi_mosi, .spi_ncs, .spi_miso
  );

  trig_delay_regs #(.N_LED(N_LED)) u_del (
    .clk, .rst_n, .bus,
    .rd_addr(host_addr), .rdata(rd_del), .rd_hit(hit_del),
    .del_ena, .del_code
  );

  always_comb begin
    if (spi_mode) begin
      host_data_oe = 8'h02;
      host_data_o  = {6'd0, spi_d1, 1'b0};
    end else begin
      host_data_oe = host_nrd ? 8'h00 : 8'hFF;
      unique case (1'b1)
        hit_owm: host_data_o = rd_owm;
        hit_sel: host_data_o = rd_sel;
        hit_spi: host_data_o = rd_spi;
        hit_del: host_data_o = rd_del;
        default: host_data_o = '0;
      endcase
    end
  end

endmodule
