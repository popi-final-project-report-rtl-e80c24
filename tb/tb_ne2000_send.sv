// tb_ne2000_send: the packet-transmit workload of the system. The bench
// plays the processor running the NE2000 driver over the whole design at
// its default sizes, with an NE2000 controller model on the shared bus:
//   * chip reset through a read of the reset port, check of the reset bit;
//   * controller initialisation (stop, word-wide data, byte counts,
//     interrupt mask/status, receive/transmit configuration, receive ring
//     from page 0x49 to 0x7E, boundary, transmit page 0x41, start);
//   * the page-switching register test (0x4E written in page 1 must read
//     back in page 1, not in page 0) and the default-value test (registers
//     0x16, 0x12 and 0x13 read 0x15, 0x0C and 0x12);
//   * two packets of 204 bytes sent the driver's way: remote start address
//     and byte counts, remote-DMA write command, one byte-swapped 16-bit
//     store per two bytes to the data port, check of the DMA-complete bit,
//     transmit command, polling for the transmitted bit (at most 1000
//     polls), interrupt status cleared.
// Each transmitted packet must equal the bytes handed to the driver, in
// order. Every Ethernet access must take 7 clocks and no write strobe may
// be too short for the chip.
module tb_ne2000_send;
  import popi_pkg::*;

  localparam logic [31:0] NIC = 32'h0008_0000;
  localparam int PACKET_SIZE = 204;
  localparam logic [7:0] TXSTART = 8'h41, RXSTART = 8'h49, RXSTOP = 8'h7E;

  logic clk = 0, rst = 1;
  opb_addr_t abus = '0;
  opb_be_t   be = '0;
  opb_data_t dbus = '0, sln_dbus;
  logic      rnw = 0, select = 0;
  logic      errack, retry, toutsup, xferack;
  pb_addr_t  pb_a;
  pb_ctrl_t  pb_ctrl;
  pb_data_t  pb_dout, pb_din, sram_dout, eth_dout;
  logic      sram_drive, eth_drive;
  logic      flash_ce_n, sdram_ce_n, adc_oe_n, au_cs_n, usb_cs_n, nv_cs0_n, nv_cs1_n;
  logic      pixel, hsync_n, vsync_n, blank_n;
  int        short_writes, packets_sent, tx_len;
  int checks = 0, failures = 0;
  int n_dma_done = 0, n_tx_done = 0, n_polls = 0;

  popi_top dut (
    .opb_clk(clk), .opb_rst(rst), .opb_abus(abus), .opb_be(be), .opb_dbus(dbus),
    .opb_rnw(rnw), .opb_select(select), .sln_dbus, .sln_errack(errack),
    .sln_retry(retry), .sln_toutsup(toutsup), .sln_xferack(xferack),
    .pb_a, .pb_ctrl, .pb_dout, .pb_din,
    .flash_ce_n, .sdram_ce_n, .adc_oe_n, .au_cs_n, .usb_cs_n, .nv_cs0_n, .nv_cs1_n,
    .vga_pixel(pixel), .vga_hsync_n(hsync_n), .vga_vsync_n(vsync_n), .vga_blank_n(blank_n)
  );

  sram_model u_sram (.clk, .ce_n(pb_ctrl.ram_ce_n), .oe_n(pb_ctrl.oe_n), .we_n(pb_ctrl.we_n),
                     .ub_n(pb_ctrl.ub_n), .lb_n(pb_ctrl.lb_n), .a(pb_a), .din(pb_din),
                     .dout(sram_dout), .drive(sram_drive));

  ne2000_model u_eth (.clk, .cs_n(pb_ctrl.eth_cs_n), .ior_n(pb_ctrl.oe_n), .iow_n(pb_ctrl.we_n),
                      .a(pb_a), .din(pb_din), .dout(eth_dout), .drive(eth_drive),
                      .short_writes, .packets_sent, .tx_len);

  assign pb_din = (pb_ctrl.d_t ? 16'h0000 : pb_dout) | sram_dout | eth_dout;

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic opb(input logic [31:0] a, input logic [3:0] b, input logic [31:0] d,
                     input logic r, output logic [31:0] q);
    int n;
    @(negedge clk);
    abus = a; be = b; dbus = d; rnw = r; select = 1;
    n = 1;
    forever begin
      #1;
      if (xferack) break;
      @(negedge clk);
      n++;
      if (n > 40) break;
    end
    expect_eq("Ethernet transfer clocks", n, 7);
    q = sln_dbus;
    @(posedge clk);
    #1;
    select = 0;
  endtask

  // 16-bit register access at byte offset 2 * r, as the driver's macros do
  task automatic outnic(int r, logic [15:0] v);
    logic [31:0] q;
    opb(NIC + 32'(2 * r), r[0] ? 4'b0011 : 4'b1100, {2{v}}, 0, q);
  endtask
  task automatic innic(int r, output logic [15:0] v);
    logic [31:0] q;
    opb(NIC + 32'(2 * r), r[0] ? 4'b0011 : 4'b1100, 0, 1, q);
    v = r[0] ? q[15:0] : q[31:16];
  endtask

  task automatic send(logic [7:0] pkt[PACKET_SIZE], logic [15:0] addr, logic [15:0] len);
    logic [15:0] v, word;
    int j;
    outnic(8'h08, 16'(addr[7:0]));   // remote start address
    outnic(8'h09, 16'(addr[15:8]));
    outnic(8'h07, 16'h00FF);         // clear interrupt status
    outnic(8'h0A, 16'(len[7:0]));    // remote byte count
    outnic(8'h0B, 16'(len[15:8]));
    outnic(8'h05, 16'(len[7:0]));    // transmit byte count
    outnic(8'h06, 16'(len[15:8]));
    outnic(8'h00, 16'h0012);         // remote DMA write
    for (int i = 0; i < len / 2; i++) begin
      // the processor's memory holds pkt[2i] in the high byte; the driver
      // swaps the bytes because the chip takes the low byte first
      word = {pkt[2 * i + 1], pkt[2 * i]};
      outnic(8'h10, word);
    end
    innic(8'h07, v);
    checks++;
    if (!v[6]) begin
      failures++;
      $display("FAIL remote DMA did not finish");
    end else n_dma_done++;
    outnic(8'h04, 16'(TXSTART));
    outnic(8'h00, 16'h0024);         // transmit
    j = 1000;
    do begin
      innic(8'h07, v);
      n_polls++;
      j--;
    end while (j > 0 && !v[1]);
    checks++;
    if (!v[1]) begin
      failures++;
      $display("FAIL transmission did not complete");
    end else n_tx_done++;
    outnic(8'h07, 16'h00FF);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    logic [7:0] pkt [PACKET_SIZE];
    repeat (3) @(posedge clk);
    rst = 0;

    // reset: read the reset port and write the value back
    innic(8'h1F, v);
    outnic(8'h1F, v);
    repeat (20) @(negedge clk);
    innic(8'h07, v);
    expect_eq("reset bit", 32'(v[7]), 1);

    // initialisation
    outnic(8'h00, 16'h0021);
    outnic(8'h0E, 16'h0001);
    outnic(8'h0A, 16'h0000);
    outnic(8'h0B, 16'h0000);
    outnic(8'h0F, 16'h0000);
    outnic(8'h07, 16'h00FF);
    outnic(8'h0C, 16'h0020);
    outnic(8'h0D, 16'h0002);
    outnic(8'h01, 16'(RXSTART));
    outnic(8'h02, 16'(RXSTOP));
    outnic(8'h03, 16'(RXSTOP - 1));
    outnic(8'h04, 16'(TXSTART));
    outnic(8'h07, 16'h00FF);
    outnic(8'h0F, 16'h0000);
    outnic(8'h00, 16'h0022);
    outnic(8'h0D, 16'h0000);
    innic(8'h07, v);
    expect_eq("status cleared", 32'(v[7:0]), 0);
    innic(8'h02, v);
    expect_eq("PSTOP", 32'(v[7:0]), 32'(RXSTOP));

    // page-switching register test
    outnic(8'h00, 16'h0061);
    outnic(8'h0D, 16'h004E);
    innic(8'h0D, v);
    expect_eq("page 1 reg 0x0D", 32'(v[7:0]), 32'h4E);
    outnic(8'h00, 16'h0021);
    innic(8'h0D, v);
    checks++;
    if (v[7:0] == 8'h4E) begin
      failures++;
      $display("FAIL page 0 shows the page 1 register");
    end
    outnic(8'h00, 16'h0061);
    innic(8'h0D, v);
    expect_eq("page 1 reg 0x0D again", 32'(v[7:0]), 32'h4E);

    // default-value test: fixed registers above the data port, page 0
    outnic(8'h00, 16'h0021);
    innic(8'h16, v);
    expect_eq("reg 0x16", 32'(v[7:0]), 32'h15);
    innic(8'h12, v);
    expect_eq("reg 0x12", 32'(v[7:0]), 32'h0C);
    innic(8'h13, v);
    expect_eq("reg 0x13", 32'(v[7:0]), 32'h12);
    outnic(8'h00, 16'h0022);

    // two packets
    for (int p = 0; p < 2; p++) begin
      for (int i = 0; i < PACKET_SIZE; i++) pkt[i] = (p == 0) ? 8'(i) : 8'($urandom);
      send(pkt, {TXSTART, 8'h00}, 16'(PACKET_SIZE));
      expect_eq("packets sent", packets_sent, p + 1);
      expect_eq("packet length", tx_len, PACKET_SIZE);
      for (int i = 0; i < PACKET_SIZE; i++)
        expect_eq("packet byte", 32'(u_eth.tx_bytes[i]), 32'(pkt[i]));
    end

    expect_eq("short Ethernet writes", short_writes, 0);
    checks++;
    if (n_dma_done == 0 || n_tx_done == 0 || n_polls <= n_tx_done) begin
      failures++;
      $display("FAIL a mechanism never happened: dma=%0d tx=%0d polls=%0d",
               n_dma_done, n_tx_done, n_polls);
    end
    $display("packets=%0d dma_done=%0d tx_done=%0d status_polls=%0d",
             packets_sent, n_dma_done, n_tx_done, n_polls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
