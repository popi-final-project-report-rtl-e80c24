// ne2000_model: behavioural model, for simulation only, of the parts of an
// NE2000-compatible Ethernet controller that a driver's initialisation and
// packet transmission touch, seen through its 16-bit host interface
// (CS#, IOR#, IOW#, SA, SD).
//
// Registers are 16 bits apart on the host bus: register n answers at
// halfword address n (low five address bits). Pages 0 and 1 are chosen by
// command register bits 7:6. Modelled: the command register; interrupt
// status (write one to clear; bit 7 reset done, bit 6 remote DMA complete,
// bit 1 packet transmitted); remote start address and byte count; transmit
// page and byte count; the data port at 0x10, which in word mode
// (DCR bit 0) moves one 16-bit word per access into the 16 KB buffer
// memory, low byte (SD bits 7..0) at the even address; a read of the reset
// port at 0x1F, which sets the reset-done bit; and a transmit started by
// command bit 2 that copies TBCR bytes from page TPSR into tx_bytes and
// raises the transmitted bit TX_CLOCKS clocks later. Registers 0x12, 0x13
// and 0x16 read as the fixed values 0x0C, 0x12 and 0x15 that the driver's
// default-value diagnostic expects of the board's chip. Any other register
// below 0x10 reads back as last written. Host timing as in eth_model: IOR# must be
// low RD_WAIT clocks before data is valid, IOW# pulses shorter than
// WR_WAIT clocks are ignored and counted.
module ne2000_model #(
  parameter int RD_WAIT   = 2,
  parameter int WR_WAIT   = 3,
  parameter int TX_CLOCKS = 200
) (
  input  logic        clk,
  input  logic        cs_n,
  input  logic        ior_n,
  input  logic        iow_n,
  input  logic [0:17] a,
  input  logic [0:15] din,
  output logic [0:15] dout,
  output logic        drive,
  output int          short_writes,
  output int          packets_sent,
  output int          tx_len
);

  logic [7:0]  mem [16384];
  logic [7:0]  tx_bytes [2048];
  logic [7:0]  page0 [16];
  logic [7:0]  page1 [16];
  logic [7:0]  isr;
  logic [15:0] rsar, rbcr;
  int rd_cnt, wr_cnt, tx_timer;
  logic iow_q, ior_q;
  logic [4:0] idx;
  logic [1:0] pg;
  logic [15:0] din_v;

  assign idx   = a[13:17];
  assign pg    = page0[0][7:6];
  assign din_v = din;

  initial begin
    for (int i = 0; i < 16; i++) begin
      page0[i] = 8'h00;
      page1[i] = 8'h00;
    end
    page0[0] = 8'h21;
    isr = 8'h00;
    rsar = '0;
    rbcr = '0;
    rd_cnt = 0;
    wr_cnt = 0;
    tx_timer = 0;
    iow_q = 1'b1;
    ior_q = 1'b1;
    short_writes = 0;
    packets_sent = 0;
    tx_len = 0;
  end

  function automatic logic [7:0] reg_value(logic [4:0] r);
    if (r == 5'h00) return page0[0];
    if (pg == 2'b01 && r < 5'h10) return page1[r[3:0]];
    if (r == 5'h07) return isr;
    if (r < 5'h10) return page0[r[3:0]];
    if (r == 5'h12) return 8'h0C;
    if (r == 5'h13) return 8'h12;
    if (r == 5'h16) return 8'h15;
    return 8'h00;
  endfunction

  always @(posedge clk) begin
    rd_cnt <= (!cs_n && !ior_n) ? rd_cnt + 1 : 0;
    wr_cnt <= (!cs_n && !iow_n) ? wr_cnt + 1 : 0;
    iow_q  <= iow_n;
    ior_q  <= ior_n;
    // end of a read of the reset port
    if (ior_n && !ior_q && idx == 5'h1F) isr <= isr | 8'h80;
    // end of a write
    if (iow_n && !iow_q && !cs_n) begin
      if (wr_cnt < WR_WAIT) short_writes <= short_writes + 1;
      else if (idx == 5'h10) begin
        if (page0[4'hE][0]) begin
          mem[14'(rsar)]     <= din_v[7:0];
          mem[14'(rsar + 1)] <= din_v[15:8];
          rsar <= rsar + 16'd2;
          rbcr <= rbcr - 16'd2;
          if (rbcr <= 16'd2) isr <= isr | 8'h40;
        end else begin
          mem[14'(rsar)] <= din_v[7:0];
          rsar <= rsar + 16'd1;
          rbcr <= rbcr - 16'd1;
          if (rbcr <= 16'd1) isr <= isr | 8'h40;
        end
      end else if (idx == 5'h00) begin
        page0[0] <= din_v[7:0];
        if (din_v[2]) tx_timer <= TX_CLOCKS;
      end else if (pg == 2'b01 && idx < 5'h10) begin
        page1[idx[3:0]] <= din_v[7:0];
      end else if (idx == 5'h07) begin
        isr <= isr & ~din_v[7:0];
      end else if (idx < 5'h10) begin
        page0[idx[3:0]] <= din_v[7:0];
        if (idx == 5'h08) rsar[7:0]  <= din_v[7:0];
        if (idx == 5'h09) rsar[15:8] <= din_v[7:0];
        if (idx == 5'h0A) rbcr[7:0]  <= din_v[7:0];
        if (idx == 5'h0B) rbcr[15:8] <= din_v[7:0];
      end
    end
    // transmission
    if (tx_timer > 0) begin
      tx_timer <= tx_timer - 1;
      if (tx_timer == 1) begin
        tx_len = {page0[6], page0[5]};
        for (int i = 0; i < 2048; i++)
          if (i < tx_len) tx_bytes[i] = mem[14'({page0[4], 8'h00} + 16'(i))];
        packets_sent <= packets_sent + 1;
        isr <= isr | 8'h02;
      end
    end
  end

  always_comb begin
    drive = !cs_n && !ior_n;
    dout  = '0;
    if (drive) dout = (rd_cnt + 1 >= RD_WAIT) ? {8'h00, reg_value(idx)} : 16'hDEAD;
  end

endmodule
