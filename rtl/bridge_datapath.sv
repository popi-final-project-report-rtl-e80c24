// bridge_datapath: address, byte-enable and data paths of the SRAM/Ethernet
// bridge.
//
// Every clock the OPB address bits 13..30 (the halfword address), the byte
// enables, the read/write flag and both halves of the write data are
// registered; the OPB holds them steady for the whole transfer. The SRAM
// halfword address is that register with its least significant bit ORed
// with sel32, so a 32-bit access reaches the second halfword in its second
// bus cycle. The active-low UB#/LB# requests come from the registered byte
// enables: lanes 0 and 2 are the upper byte of a halfword, lanes 1 and 3 the
// lower. The halfword sent to the bus is the upper OPB half (bits 0..15)
// unless sel32 picks the lower half (bits 16..31); the processor repeats a
// byte or halfword store on every lane, so a narrow write always finds its
// data in bits 0..15.
//
// Read data: the 32-bit OPB return register loads bits 0..15 when ld_lo is
// high and bits 16..31 when ld_hi is high, from the halfword captured at the
// pads; in any cycle with neither load it returns to zero, as an OPB slave
// must drive zero when it is not answering. A 16-bit read loads both halves
// so the processor finds the halfword on either lane.
//
// Reset (asynchronous, active high) clears every register. All of this
// follows the bridge of the design; the module split is this design's own.
module bridge_datapath
  import popi_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  // OPB request
  input  opb_addr_t opb_abus,
  input  opb_be_t   opb_be,
  input  opb_data_t opb_dbus,
  input  logic      opb_rnw,
  // from the controller
  input  logic      sel32,     // second halfword of a 32-bit access
  input  logic      ld_hi,     // load read data into bits 16..31
  input  logic      ld_lo,     // load read data into bits 0..15
  // halfword captured at the data pads
  input  pb_data_t  pad_din,
  // registered request
  output opb_be_t   be,
  output logic      rnw,
  output logic      ub_req_n,  // upper byte wanted (active low)
  output logic      lb_req_n,  // lower byte wanted (active low)
  // towards the pad registers
  output pb_addr_t  pb_addr,
  output pb_data_t  pb_wdata,
  // OPB return data
  output opb_data_t sln_dbus
);

  pb_addr_t addr;
  pb_data_t data_upper;  // OPB bits 0..15
  pb_data_t data_lower;  // OPB bits 16..31

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      addr       <= '0;
      be         <= '0;
      rnw        <= 1'b0;
      data_upper <= '0;
      data_lower <= '0;
    end else begin
      addr       <= opb_abus[13:30];
      be         <= opb_be;
      rnw        <= opb_rnw;
      data_upper <= opb_dbus[0:15];
      data_lower <= opb_dbus[16:31];
    end
  end

  always_comb begin
    pb_addr  = {addr[0:16], addr[17] | sel32};
    lb_req_n = !(be[3] || be[1]);
    ub_req_n = !(be[2] || be[0]);
    pb_wdata = sel32 ? data_lower : data_upper;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sln_dbus <= '0;
    end else if (!ld_hi && !ld_lo) begin
      sln_dbus <= '0;
    end else begin
      if (ld_hi) sln_dbus[16:31] <= pad_din;
      if (ld_lo) sln_dbus[0:15]  <= pad_din;
    end
  end

endmodule
