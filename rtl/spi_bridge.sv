// spi_bridge: SPI pass-through mode of the flasher CPLD.
//
// The host does not run SPI through a shift register in the CPLD; it bit-
// bangs SPI on its own bus lines and the CPLD routes them. The host first
// writes an active-channel list to ADDR_SPI_ACTIVE_LIST (bit n = 1 makes
// SPI channel n active), then writes 0xFF to ADDR_SPI_OPERATE to enter
// SPI_mode. In SPI_mode the bus pins take new meanings:
//   nWR     -> SCLK
//   data(0) -> MOSI
//   data(1) <- MISO (the CPLD drives this data line)
//   data(2) -> nCS; while it is low, the chip select of every active
//              channel is low as well.
// Writing 0x00 to ADDR_SPI_OPERATE leaves SPI_mode; other values are
// ignored. Outside SPI_mode SCLK and MOSI rest at 0 and all chip selects
// are high.
//
// Follows the description: the two registers, the 0xFF/0x00 control words
// and the pin mapping. This design's choices: the channel count N_SPI (one
// per bit of the data word), SCLK and MOSI shared by all channels, MISO
// taken as the OR of the active channels' MISO lines (only one device is
// expected to answer), and the rule that in SPI_mode the top still accepts
// a write to ADDR_SPI_OPERATE, so the host must keep the address elsewhere
// while it clocks SPI data.
//
// Timing: the registers change the cycle after bus.wr; the pin mapping is
// combinational, so the SPI rate is set by the host.
module spi_bridge
  import flasher_pkg::*;
#(
  parameter int unsigned N_SPI = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  reg_bus_t         bus,
  input  addr_t            rd_addr,
  output data_t            rdata,
  output logic             rd_hit,
  output logic             spi_mode,
  // raw host pins used in SPI_mode
  input  logic             host_nwr,
  input  logic             host_d0,
  input  logic             host_d2,
  output logic             host_d1,
  // SPI channels
  output logic             spi_sclk,
  output logic             spi_mosi,
  output logic [N_SPI-1:0] spi_ncs,
  input  logic [N_SPI-1:0] spi_miso
);

  logic [N_SPI-1:0] active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= '0;
      spi_mode <= 1'b0;
    end else if (bus.wr) begin
      if (bus.addr == ADDR_SPI_ACTIVE_LIST && !spi_mode) active <= bus.wdata[N_SPI-1:0];
      if (bus.addr == ADDR_SPI_OPERATE) begin
        if (bus.wdata == SPI_OPERATE_START) spi_mode <= 1'b1;
        else if (bus.wdata == SPI_OPERATE_END) spi_mode <= 1'b0;
      end
    end
  end

  assign spi_sclk = spi_mode & host_nwr;
  assign spi_mosi = spi_mode & host_d0;
  assign spi_ncs  = (spi_mode && !host_d2) ? ~active : '1;
  assign host_d1  = spi_mode && ((spi_miso & active) != '0);

  always_comb begin
    rd_hit = 1'b1;
    unique case (rd_addr)
      ADDR_SPI_ACTIVE_LIST: rdata = data_t'(active);
      ADDR_SPI_OPERATE:     rdata = spi_mode ? SPI_OPERATE_START : SPI_OPERATE_END;
      default: begin
        rd_hit = 1'b0;
        rdata  = '0;
      end
    endcase
  end

endmodule
