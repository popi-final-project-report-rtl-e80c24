// popi_top: FPGA hardware of POPi, a board that fetches a text message from
// a POP3 mail server over Ethernet and shows it on a VGA monitor.
//
// Two OPB slaves serve the processor. sram_ethernet bridges the OPB to the
// board's shared peripheral bus, on which sit the 256K x 16 SRAM that holds
// the processor's program and data and the NE2000-style Ethernet chip
// through which the TCP/IP stack talks to the mail server. vga_text is the
// 80-column text display the received message is written to. The processor
// and the OPB arbiter are library parts outside this module: the top takes
// the OPB master signals as inputs and returns the slaves' replies ORed
// together, as the OPB combines its slaves (a slave that is not addressed
// drives zeros). The shared bus and the VGA signals are the top's pins; the
// shared data bus is split into pb_dout / pb_din, driven when pb_ctrl.d_t
// is 0.
//
// Address map with the defaults: SRAM at 0x0000_0000 - 0x0007_FFFF,
// Ethernet registers at 0x0008_0000 (register n at byte offset 2n), video
// at 0xFEFF_1000 - 0xFEFF_1FFF (characters at 0x000, font at 0xA00).
module popi_top
  import popi_pkg::*;
#(
  parameter opb_addr_t BRIDGE_BASEADDR = 32'h0000_0000,
  parameter opb_addr_t VGA_BASEADDR    = 32'hFEFF_1000
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
  // shared peripheral bus (SRAM and Ethernet chip)
  output pb_addr_t  pb_a,
  output pb_ctrl_t  pb_ctrl,
  output pb_data_t  pb_dout,
  input  pb_data_t  pb_din,
  output logic      flash_ce_n,
  output logic      sdram_ce_n,
  output logic      adc_oe_n,
  output logic      au_cs_n,
  output logic      usb_cs_n,
  output logic      nv_cs0_n,
  output logic      nv_cs1_n,
  // VGA
  output logic      vga_pixel,
  output logic      vga_hsync_n,
  output logic      vga_vsync_n,
  output logic      vga_blank_n
);

  opb_data_t br_dbus, vga_dbus;
  logic      br_ack, vga_ack;

  sram_ethernet #(.C_BASEADDR(BRIDGE_BASEADDR)) u_bridge (
    .opb_clk, .opb_rst, .opb_abus, .opb_be, .opb_dbus, .opb_rnw, .opb_select,
    .sln_dbus(br_dbus), .sln_errack, .sln_retry, .sln_toutsup, .sln_xferack(br_ack),
    .pb_a, .pb_ctrl, .pb_dout, .pb_din,
    .flash_ce_n, .sdram_ce_n, .adc_oe_n, .au_cs_n, .usb_cs_n, .nv_cs0_n, .nv_cs1_n
  );

  vga_text #(.C_BASEADDR(VGA_BASEADDR)) u_video (
    .opb_clk, .opb_rst, .opb_abus, .opb_dbus, .opb_rnw, .opb_select,
    .sln_dbus(vga_dbus), .sln_xferack(vga_ack),
    .vga_pixel, .vga_hsync_n, .vga_vsync_n, .vga_blank_n
  );

  assign sln_dbus    = br_dbus | vga_dbus;
  assign sln_xferack = br_ack | vga_ack;

endmodule
