// bridge_decode: address decode of the SRAM/Ethernet bridge.
//
// The bridge owns a 1 MB window of the OPB address space: the upper twelve
// address bits (0..11, big-endian numbering) must equal those of C_BASEADDR
// while OPB_select is high. Bit 12 then splits the window: 0 selects the
// SRAM (lower 512 KB), 1 selects the Ethernet chip (upper 512 KB, so the
// chip's registers sit at base + 0x80000). Purely combinational; the
// outputs follow the OPB inputs in the same cycle.
module bridge_decode
  import popi_pkg::*;
#(
  parameter opb_addr_t C_BASEADDR = 32'h0000_0000
) (
  input  opb_addr_t opb_abus,
  input  logic      opb_select,
  output logic      cs,       // this peripheral is addressed
  output logic      ram_cs,   // ... and the access is for the SRAM
  output logic      eth_cs    // ... and the access is for the Ethernet chip
);

  always_comb begin
    cs     = opb_select && (opb_abus[0:11] == C_BASEADDR[0:11]);
    eth_cs = cs &&  opb_abus[12];
    ram_cs = cs && !opb_abus[12];
  end

endmodule
