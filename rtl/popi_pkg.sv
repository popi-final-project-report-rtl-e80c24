// popi_pkg: widths, types and constants shared by the POPi FPGA peripherals.
//
// The OPB side keeps the bus's big-endian bit numbering: bit 0 is the most
// significant bit of an address or data word, byte lane 0 is bits 0..7 and
// holds the byte at the lowest address. The board-side peripheral bus (the
// SRAM and the Ethernet chip share it) is 16 data bits and 18 halfword
// address bits, numbered the same way (bit 17 is the least significant).
package popi_pkg;

  localparam int OPB_AW = 32;   // OPB address width
  localparam int OPB_DW = 32;   // OPB data width
  localparam int OPB_BEW = OPB_DW / 8;
  localparam int PB_AW  = 18;   // SRAM A0-A17 (256K halfwords)
  localparam int PB_DW  = 16;   // SRAM D0-D15 / Ethernet SD0-SD15

  typedef logic [0:OPB_AW-1]  opb_addr_t;
  typedef logic [0:OPB_DW-1]  opb_data_t;
  typedef logic [0:OPB_BEW-1] opb_be_t;
  typedef logic [0:PB_AW-1]   pb_addr_t;
  typedef logic [0:PB_DW-1]   pb_data_t;

  // Control strobes of the shared peripheral bus, all active low. d_t is the
  // tristate control of the data pins: 1 leaves them released (read / idle),
  // 0 drives the write data.
  typedef struct packed {
    logic ram_ce_n;  // SRAM CE#
    logic eth_cs_n;  // Ethernet CS#
    logic oe_n;      // SRAM OE# / Ethernet IOR#
    logic we_n;      // SRAM WE# / Ethernet IOW#
    logic ub_n;      // SRAM UB# / Ethernet BHE
    logic lb_n;      // SRAM LB# / Ethernet AEN
    logic d_t;       // 1 = data pins released
  } pb_ctrl_t;

  localparam pb_ctrl_t PB_CTRL_IDLE = '{ram_ce_n: 1'b1, eth_cs_n: 1'b1, oe_n: 1'b1,
                                        we_n: 1'b1, ub_n: 1'b1, lb_n: 1'b1, d_t: 1'b1};

  // States of the bridge controller.
  typedef enum logic [4:0] {
    ST_IDLE,
    ST_SEL_RAM,
    ST_SEL_ETH,
    ST_RD16_A,
    ST_RD16_B,
    ST_RD32_A,
    ST_RD32_B,
    ST_RD32_C,
    ST_WR32,
    ST_WRE_A,
    ST_WRE_B,
    ST_WRE_C,
    ST_WRE_D,
    ST_RDE_A,
    ST_RDE_B,
    ST_RDE_C,
    ST_RDE_D,
    ST_XFER
  } bridge_state_t;

endpackage
