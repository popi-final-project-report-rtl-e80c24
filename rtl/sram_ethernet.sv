// sram_ethernet: OPB slave bridge from the MicroBlaze to the board's SRAM and
// Ethernet chip.
//
// The program and data of the processor live in the external 256K x 16
// SRAM, so the bridge must serve byte, halfword and word accesses; the
// NE2000-style Ethernet chip sits on the same pins (address, data, OE#/IOR#,
// WE#/IOW#, UB#/BHE, LB#/AEN) with its own chip select. The bridge decodes a
// 1 MB window (bridge_decode): the lower half is the SRAM, the upper half
// (base + 0x80000) the Ethernet chip, whose registers are 16 bits wide at
// every second byte address. A controller (bridge_fsm) sequences the bus
// cycles, the datapath (bridge_datapath) registers the request, splits a
// word into two halfwords and joins two halfwords into a word, and a
// register stage at the pins (bridge_io_regs) launches and captures the
// bus. Word accesses take two SRAM cycles at consecutive halfword
// addresses, the even halfword in OPB bits 0..15. Ethernet cycles are
// stretched over several clocks because that chip is much slower.
//
// OPB handshake: the master holds OPB_select, address, byte enables, RNW and
// write data until Sln_xferAck, which is high for one clock, together with
// the read data on Sln_DBus (zero at all other times). Latency from the
// first clock of OPB_select to Sln_xferAck, both included: SRAM write 3
// clocks (word 4), SRAM read 5 (word 6), Ethernet read or write 7. errAck,
// retry and timeout suppress are never raised. The other devices on the
// board's shared bus (Flash, SDRAM, ADC, audio, USB, NVRAM) are held
// deselected. The bidirectional data pads are left to the FPGA's I/O
// buffers: pb_dout is driven when pb_ctrl.d_t is 0, pb_din is what the pins
// carry.
module sram_ethernet
  import popi_pkg::*;
#(
  parameter opb_addr_t C_BASEADDR = 32'h0000_0000
) (
  input  logic      opb_clk,
  input  logic      opb_rst,
  input  opb_addr_t opb_abus,
  input  opb_be_t   opb_be,
  input  opb_data_t opb_dbus,
  input  logic      opb_rnw,
  input  logic      opb_select,
  output opb_data_t sln_dbus,
  output logic      sln_errack,
  output logic      sln_retry,
  output logic      sln_toutsup,
  output logic      sln_xferack,
  // shared peripheral bus
  output pb_addr_t  pb_a,
  output pb_ctrl_t pb_ctrl,     // RAM_CE, ETH_CS, OE/IOR, WE/IOW, UB/BHE, LB/AEN, data tristate
  output pb_data_t  pb_dout,
  input  pb_data_t  pb_din,
  // other devices on the shared bus, held deselected
  output logic      flash_ce_n,
  output logic      sdram_ce_n,
  output logic      adc_oe_n,
  output logic      au_cs_n,
  output logic      usb_cs_n,
  output logic      nv_cs0_n,
  output logic      nv_cs1_n
);

  logic     ram_cs, eth_cs;
  opb_be_t  be;
  logic     rnw, ub_req_n, lb_req_n;
  logic     sel32, ld_hi, ld_lo;
  pb_ctrl_t ctrl;
  pb_addr_t addr_d;
  pb_data_t wdata_d, din_q;

  bridge_decode #(.C_BASEADDR(C_BASEADDR)) u_decode (
    .opb_abus, .opb_select, .cs(), .ram_cs, .eth_cs
  );

  bridge_datapath u_datapath (
    .clk(opb_clk), .rst(opb_rst),
    .opb_abus, .opb_be, .opb_dbus, .opb_rnw,
    .sel32, .ld_hi, .ld_lo,
    .pad_din(din_q),
    .be, .rnw, .ub_req_n, .lb_req_n,
    .pb_addr(addr_d), .pb_wdata(wdata_d),
    .sln_dbus
  );

  bridge_fsm u_fsm (
    .clk(opb_clk), .rst(opb_rst),
    .opb_select, .ram_cs, .eth_cs, .rnw, .be, .ub_req_n, .lb_req_n,
    .ctrl, .sel32, .ld_hi, .ld_lo, .xfer_ack(sln_xferack), .state()
  );

  bridge_io_regs u_io (
    .clk(opb_clk), .rst(opb_rst),
    .addr_d, .ctrl_d(ctrl), .wdata_d,
    .pb_a, .pb_ctrl, .pb_dout, .pb_din, .din_q
  );

  assign sln_errack  = 1'b0;
  assign sln_retry   = 1'b0;
  assign sln_toutsup = 1'b0;
  assign flash_ce_n  = 1'b1;
  assign sdram_ce_n  = 1'b1;
  assign adc_oe_n    = 1'b1;
  assign au_cs_n     = 1'b1;
  assign usb_cs_n    = 1'b1;
  assign nv_cs0_n    = 1'b1;
  assign nv_cs1_n    = 1'b1;

endmodule
