// bridge_fsm: controller of the SRAM/Ethernet bridge.
//
// It turns one OPB transfer into the bus cycles of the chip addressed and
// raises Sln_xferAck for exactly one clock at the end. The outputs are
// combinational from the state and go through the pad registers, so they
// reach the pins one clock later.
//
//   SRAM 16-bit read : SEL_RAM, RD16_A, RD16_B (load both halves), XFER
//   SRAM 32-bit read : SEL_RAM, RD32_A (sel32), RD32_B (load bits 0..15),
//                      RD32_C (load bits 16..31), XFER
//   SRAM 8/16 write  : SEL_RAM (WE#, drive), XFER
//   SRAM 32-bit write: SEL_RAM (WE#, first halfword), WR32 (WE#, sel32,
//                      second halfword), XFER
//   Ethernet write   : SEL_ETH (CS#), WRE_A..WRE_C (IOW#, drive),
//                      WRE_D (drive, IOW# released: data hold), XFER
//   Ethernet read    : SEL_ETH (CS#), RDE_A..RDE_D (IOR#), load in RDE_D, XFER
//
// A transfer is 32-bit when all four byte enables are set; any other
// pattern is a byte or halfword access whose UB#/LB# come from the byte
// enables. Ethernet accesses are always 16 bits (BHE and AEN low). If
// OPB_select falls before the end, the controller returns to IDLE without
// acknowledging. Cycle counts from OPB_select to the acknowledge, both
// included: SRAM write 3 (32-bit: 4), SRAM read 5 (32-bit: 6), Ethernet
// write 7, Ethernet read 7.
//
// The sequences follow the bridge of the design. Three points are this
// design's own: RD32_B/RD32_C keep OE# low (a read must never pulse WE#),
// the Ethernet read runs through RDE_D and loads the read data there so
// that IOR# has been low for two clocks when the data is sampled, and
// Ethernet read data is loaded at all, so the processor can read the chip.
// Reset is asynchronous, active high, to IDLE.
module bridge_fsm
  import popi_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     opb_select,
  input  logic     ram_cs,
  input  logic     eth_cs,
  input  logic     rnw,        // registered OPB_RNW
  input  opb_be_t  be,         // registered OPB_BE
  input  logic     ub_req_n,
  input  logic     lb_req_n,
  output pb_ctrl_t ctrl,
  output logic     sel32,
  output logic     ld_hi,
  output logic     ld_lo,
  output logic     xfer_ack,
  output bridge_state_t state
);

  bridge_state_t next;
  logic          word;

  assign word = (be == 4'b1111);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= ST_IDLE;
    else     state <= next;
  end

  always_comb begin
    ctrl     = PB_CTRL_IDLE;
    sel32    = 1'b0;
    ld_hi    = 1'b0;
    ld_lo    = 1'b0;
    xfer_ack = 1'b0;
    next     = ST_IDLE;

    // Strobes shared by all cycles of one chip's access.
    unique case (state)
      ST_SEL_RAM, ST_RD16_A, ST_RD16_B, ST_RD32_A, ST_RD32_B, ST_RD32_C, ST_WR32: begin
        ctrl.ram_ce_n = 1'b0;
        ctrl.ub_n     = ub_req_n;
        ctrl.lb_n     = lb_req_n;
      end
      ST_SEL_ETH, ST_WRE_A, ST_WRE_B, ST_WRE_C, ST_WRE_D,
      ST_RDE_A, ST_RDE_B, ST_RDE_C, ST_RDE_D: begin
        ctrl.eth_cs_n = 1'b0;
        ctrl.ub_n     = 1'b0;
        ctrl.lb_n     = 1'b0;
      end
      default: ;
    endcase

    unique case (state)
      ST_IDLE: begin
        if (ram_cs)      next = ST_SEL_RAM;
        else if (eth_cs) next = ST_SEL_ETH;
      end
      ST_SEL_RAM: begin
        if (rnw) begin
          ctrl.oe_n = 1'b0;
          next = word ? ST_RD32_A : ST_RD16_A;
        end else begin
          ctrl.we_n = 1'b0;
          ctrl.d_t  = 1'b0;
          next = word ? ST_WR32 : ST_XFER;
        end
      end
      ST_RD16_A: begin
        ctrl.oe_n = 1'b0;
        next = ST_RD16_B;
      end
      ST_RD16_B: begin
        ctrl.oe_n = 1'b0;
        ld_hi = 1'b1;
        ld_lo = 1'b1;
        next = ST_XFER;
      end
      ST_RD32_A: begin
        ctrl.oe_n = 1'b0;
        sel32 = 1'b1;
        next = ST_RD32_B;
      end
      ST_RD32_B: begin
        ctrl.oe_n = 1'b0;
        ld_lo = 1'b1;
        next = ST_RD32_C;
      end
      ST_RD32_C: begin
        ctrl.oe_n = 1'b0;
        ld_hi = 1'b1;
        next = ST_XFER;
      end
      ST_WR32: begin
        ctrl.we_n = 1'b0;
        ctrl.d_t  = 1'b0;
        sel32 = 1'b1;
        next = ST_XFER;
      end
      ST_SEL_ETH: next = rnw ? ST_RDE_A : ST_WRE_A;
      ST_WRE_A, ST_WRE_B, ST_WRE_C: begin
        ctrl.we_n = 1'b0;
        ctrl.d_t  = 1'b0;
        next = (state == ST_WRE_A) ? ST_WRE_B :
               (state == ST_WRE_B) ? ST_WRE_C : ST_WRE_D;
      end
      ST_WRE_D: begin
        ctrl.d_t = 1'b0;
        next = ST_XFER;
      end
      ST_RDE_A, ST_RDE_B, ST_RDE_C: begin
        ctrl.oe_n = 1'b0;
        next = (state == ST_RDE_A) ? ST_RDE_B :
               (state == ST_RDE_B) ? ST_RDE_C : ST_RDE_D;
      end
      ST_RDE_D: begin
        ctrl.oe_n = 1'b0;
        ld_hi = 1'b1;
        ld_lo = 1'b1;
        next = ST_XFER;
      end
      ST_XFER: begin
        xfer_ack = 1'b1;
        next = ST_IDLE;
      end
      default: next = ST_IDLE;
    endcase

    // A transfer the master abandons ends without acknowledge.
    if (state != ST_IDLE && state != ST_XFER && !opb_select) begin
      ctrl  = PB_CTRL_IDLE;
      sel32 = 1'b0;
      ld_hi = 1'b0;
      ld_lo = 1'b0;
      next  = ST_IDLE;
    end
  end

  // Bus rules: never both chips, never read and write strobes together.
  a_one_chip : assert property (@(posedge clk) disable iff (rst)
                                !(!ctrl.ram_ce_n && !ctrl.eth_cs_n));
  a_oe_we    : assert property (@(posedge clk) disable iff (rst)
                                !(!ctrl.oe_n && !ctrl.we_n));
  a_drive_rd : assert property (@(posedge clk) disable iff (rst)
                                !(!ctrl.d_t && !ctrl.oe_n));
  a_ack_once : assert property (@(posedge clk) disable iff (rst)
                                xfer_ack |=> !xfer_ack);

endmodule
