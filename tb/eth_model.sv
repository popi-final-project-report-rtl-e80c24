// eth_model: behavioural model of the host interface of an NE2000-style
// Ethernet chip, for simulation only: 32 sixteen-bit registers selected by
// the low five halfword address bits, with the chip's slowness modelled.
//
// Reads: while CS# and IOR# are low the chip drives the register, but the
// data is valid only from the RD_WAIT-th clock of IOR# on; before that it
// drives 16'hDEAD. Writes: the data on the pins is taken when IOW# rises,
// and only if IOW# was low for at least WR_WAIT clocks and CS# is still
// low; a shorter pulse is ignored and counted in short_writes. Register 0
// (the command register) is read back as written; nothing else of the real
// chip (paging, DMA, the MAC) is modelled.
module eth_model #(
  parameter int RD_WAIT = 2,
  parameter int WR_WAIT = 3
) (
  input  logic        clk,
  input  logic        cs_n,
  input  logic        ior_n,
  input  logic        iow_n,
  input  logic [0:17] a,
  input  logic [0:15] din,
  output logic [0:15] dout,
  output logic        drive,
  output int          short_writes
);

  logic [0:15] regs [32];
  int rd_cnt, wr_cnt;
  logic iow_q;
  logic [4:0] idx;

  assign idx = a[13:17];

  initial begin
    for (int i = 0; i < 32; i++) regs[i] = 16'h0000;
    rd_cnt = 0;
    wr_cnt = 0;
    iow_q = 1'b1;
    short_writes = 0;
  end

  always @(posedge clk) begin
    rd_cnt <= (!cs_n && !ior_n) ? rd_cnt + 1 : 0;
    wr_cnt <= (!cs_n && !iow_n) ? wr_cnt + 1 : 0;
    iow_q  <= iow_n;
    if (iow_n && !iow_q && !cs_n) begin
      if (wr_cnt >= WR_WAIT) regs[idx] <= din;
      else short_writes <= short_writes + 1;
    end
  end

  always_comb begin
    drive = !cs_n && !ior_n;
    dout  = '0;
    if (drive) dout = (rd_cnt + 1 >= RD_WAIT) ? regs[idx] : 16'hDEAD;
  end

endmodule
