// flasher_pkg: register map, register-bus type and 1-Wire register layout
// shared by the flasher-board CPLD modules.
//
// The host (the DOM main board, "DOMMB") reaches the CPLD through an 8-bit
// address / 8-bit data bus with active-low nWR and nRD strobes. Inside the
// CPLD every register block sees the same reg_bus_t: a one-cycle write
// strobe, a one-cycle read strobe (issued when nRD returns high, used for
// clear-on-read flags), the address and the write data.
//
// The 1-Wire offsets (0x00..0x04 from ADDR_OWM_COMMAND), the command values
// and the interrupt-enable bit order follow the interface description. The
// absolute addresses of the register groups are this design's own choice:
// the description names them (addr_owm_slvsel, addr_spi_operate, ...) but
// does not give their values.
package flasher_pkg;

  localparam int unsigned AW = 8;   // host address width
  localparam int unsigned DW = 8;   // host data width

  typedef logic [AW-1:0] addr_t;
  typedef logic [DW-1:0] data_t;

  // Register map (absolute host addresses).
  localparam addr_t ADDR_OWM_COMMAND     = 8'h00;  // 1-Wire master base, 5 registers
  localparam addr_t ADDR_OWM_SLVSEL      = 8'h08;
  localparam addr_t ADDR_SPI_ACTIVE_LIST = 8'h10;
  localparam addr_t ADDR_SPI_OPERATE     = 8'h11;
  localparam addr_t ADDR_DEL_ENA         = 8'h18;
  localparam addr_t ADDR_DEL_DAT0        = 8'h19;
  localparam addr_t ADDR_DEL_DAT1        = 8'h1A;
  localparam addr_t ADDR_DEL_DAT2        = 8'h1B;

  // 1-Wire master register offsets.
  localparam logic [2:0] OWM_REG_CMD    = 3'd0;  // command (0x01 = reset pulse)
  localparam logic [2:0] OWM_REG_DATA   = 3'd1;  // transmit / receive buffer
  localparam logic [2:0] OWM_REG_INT    = 3'd2;  // interrupt flags
  localparam logic [2:0] OWM_REG_INTEN  = 3'd3;  // interrupt enables
  localparam logic [2:0] OWM_REG_CLKDIV = 3'd4;  // clock divider

  localparam data_t OWM_CMD_RESET = 8'h01;

  // SPI_mode control words.
  localparam data_t SPI_OPERATE_START = 8'hFF;
  localparam data_t SPI_OPERATE_END   = 8'h00;

  // Interrupt flag register (offset 0x02).
  typedef struct packed {
    logic [1:0] rsvd;   // bits 7:6, read as 0
    logic       rsrf;   // bit 5: receive shift register full (always 0 here)
    logic       rbf;    // bit 4: receive buffer full
    logic       temt;   // bit 3: transmit shift register empty
    logic       tbe;    // bit 2: transmit buffer empty
    logic       pdr;    // bit 1: presence-detect result, 1 = a slave answered
    logic       pd;     // bit 0: presence-detect cycle finished
  } owm_int_t;

  // Interrupt enable register (offset 0x03), bit order of the description.
  typedef struct packed {
    logic dqoe;    // bit 7
    logic enbsy;   // bit 6: not-busy interrupt
    logic esint;   // bit 5: slave interrupt (stored only)
    logic erbf;    // bit 4
    logic etmt;    // bit 3
    logic etbe;    // bit 2
    logic ias;     // bit 1: 1 = INTR active high
    logic epd;     // bit 0
  } owm_inten_t;

  // Internal register bus.
  typedef struct packed {
    logic  wr;     // one-cycle write strobe
    logic  rd;     // one-cycle strobe at the end of a host read
    addr_t addr;
    data_t wdata;
  } reg_bus_t;

endpackage
