// sram_model: behavioural model of the board's 256K x 16 asynchronous SRAM
// (CE#, OE#, WE#, UB#, LB#, A0-A17, D0-D15), for simulation only.
//
// Reads are combinational: while CE# and OE# are low the addressed halfword
// is driven, each byte only when its UB#/LB# is low (an undriven byte reads
// as zero here, the two-state stand-in for high impedance). Writes are
// level-sensitive like the real part, sampled once per clk period: at each
// rising clk edge with CE# and WE# low the enabled bytes take the data on
// the pins. D0-D15 use the big-endian numbering of the bus: bits 0..7 are
// the upper byte (UB#), bits 8..15 the lower byte (LB#).
module sram_model #(
  parameter int AW = 18
) (
  input  logic          clk,
  input  logic          ce_n,
  input  logic          oe_n,
  input  logic          we_n,
  input  logic          ub_n,
  input  logic          lb_n,
  input  logic [0:AW-1] a,
  input  logic [0:15]   din,
  output logic [0:15]   dout,
  output logic          drive
);

  logic [0:15] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = 16'h0000;
  end

  always_comb begin
    drive = !ce_n && !oe_n && we_n;
    dout  = '0;
    if (drive) begin
      if (!ub_n) dout[0:7]  = mem[a][0:7];
      if (!lb_n) dout[8:15] = mem[a][8:15];
    end
  end

  always @(posedge clk) begin
    if (!ce_n && !we_n) begin
      if (!ub_n) mem[a][0:7]  <= din[0:7];
      if (!lb_n) mem[a][8:15] <= din[8:15];
    end
  end

endmodule
