// tb_popi_top: one complete POPi operation on the whole FPGA design at its
// default sizes, with models of the SRAM and the Ethernet chip on the
// shared bus. The bench plays the processor's part over the OPB:
//   1. initialises the Ethernet chip with the NE2000 register sequence of
//      the driver (command, data configuration, byte counts, interrupt
//      mask/status, receive/transmit configuration, ring pages) and reads
//      every register back, including the register test write of 0x4E;
//   2. stores a received text message in the SRAM one character per 16-bit
//      store at every fourth byte address, as the main program does, and
//      reads it back with 16-bit loads;
//   3. exercises the program-memory accesses the bridge exists for: word,
//      halfword and byte stores and loads over a block of SRAM, and loads
//      the master abandons;
//   4. loads a font into the video memory and writes the message to the
//      screen as the terminal software does (carriage return to column 0,
//      line feed to the next row), reads part of the screen back;
//   5. checks every visible pixel of one frame against the expected text.
// Data on the OPB is checked against shadow copies and the length of each
// bridge transfer against its clock count (SRAM store 3, word store 4, SRAM
// load 5, word load 6, Ethernet 7, video 2). Each mechanism is counted and
// one that never happened is a failure.
module tb_popi_top;
  import popi_pkg::*;

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
  int        short_writes;
  int checks = 0, failures = 0;

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

  eth_model u_eth (.clk, .cs_n(pb_ctrl.eth_cs_n), .ior_n(pb_ctrl.oe_n), .iow_n(pb_ctrl.we_n),
                   .a(pb_a), .din(pb_din), .dout(eth_dout), .drive(eth_drive), .short_writes);

  assign pb_din = (pb_ctrl.d_t ? 16'h0000 : pb_dout) | sram_dout | eth_dout;

  always #5 clk = ~clk;

  // mechanism counters
  typedef enum int {M_SRAM_WR8, M_SRAM_WR16, M_SRAM_WR32, M_SRAM_RD8, M_SRAM_RD16,
                    M_SRAM_RD32, M_ETH_WR, M_ETH_RD, M_ABORT, M_VID_WR, M_VID_RD,
                    M_FRAME, M_NUM} mech_t;
  int mech[M_NUM];
  int contention = 0;

  always @(posedge clk)
    if (!rst && 32'(!pb_ctrl.d_t) + 32'(sram_drive) + 32'(eth_drive) > 1) begin
      contention++;
      $display("contention at %0t ctrl=%b", $time, pb_ctrl);
    end

  logic [7:0]  shadow [2**19];
  logic [15:0] eth_shadow [32];
  logic [7:0]  screen [2400];
  logic [7:0]  font [1536];

  localparam logic [31:0] SRAM = 32'h0000_0000, NIC = 32'h0008_0000, VGA = 32'hFEFF_1000;

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic opb(input logic [31:0] a, input logic [3:0] b, input logic [31:0] d,
                     input logic r, input int exp_n, output logic [31:0] q);
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
    expect_eq("transfer clocks", n, exp_n);
    q = sln_dbus;
    @(posedge clk);
    #1;
    select = 0;
  endtask

  // processor-style accesses: narrow stores repeat their data on every lane
  task automatic st8(logic [18:0] a, logic [7:0] v);
    logic [31:0] q;
    opb(SRAM + 32'(a), 4'b1000 >> a[1:0], {4{v}}, 0, 3, q);
    shadow[a] = v;
    mech[M_SRAM_WR8]++;
  endtask
  task automatic st16(logic [18:0] a, logic [15:0] v);
    logic [31:0] q;
    opb(SRAM + 32'(a), a[1] ? 4'b0011 : 4'b1100, {2{v}}, 0, 3, q);
    shadow[a] = v[15:8];
    shadow[a + 1] = v[7:0];
    mech[M_SRAM_WR16]++;
  endtask
  task automatic st32(logic [18:0] a, logic [31:0] v);
    logic [31:0] q;
    opb(SRAM + 32'(a), 4'b1111, v, 0, 4, q);
    for (int k = 0; k < 4; k++) shadow[a + 19'(k)] = v[31 - 8*k -: 8];
    mech[M_SRAM_WR32]++;
  endtask
  task automatic ld8(logic [18:0] a);
    logic [31:0] q;
    opb(SRAM + 32'(a), 4'b1000 >> a[1:0], 0, 1, 5, q);
    expect_eq("ld8", 32'(q[31 - 8*a[1:0] -: 8]), 32'(shadow[a]));
    mech[M_SRAM_RD8]++;
  endtask
  task automatic ld16(logic [18:0] a, output logic [15:0] v);
    logic [31:0] q;
    opb(SRAM + 32'(a), a[1] ? 4'b0011 : 4'b1100, 0, 1, 5, q);
    v = a[1] ? q[15:0] : q[31:16];
    expect_eq("ld16", 32'(v), {16'h0, shadow[a], shadow[a + 1]});
    mech[M_SRAM_RD16]++;
  endtask
  task automatic ld32(logic [18:0] a);
    logic [31:0] q;
    opb(SRAM + 32'(a), 4'b1111, 0, 1, 6, q);
    expect_eq("ld32", q, {shadow[a], shadow[a + 1], shadow[a + 2], shadow[a + 3]});
    mech[M_SRAM_RD32]++;
  endtask
  task automatic outnic(int r, logic [15:0] v);
    logic [31:0] q;
    opb(NIC + 32'(2 * r), r[0] ? 4'b0011 : 4'b1100, {2{v}}, 0, 7, q);
    eth_shadow[r] = v;
    mech[M_ETH_WR]++;
  endtask
  task automatic innic(int r);
    logic [31:0] q;
    opb(NIC + 32'(2 * r), r[0] ? 4'b0011 : 4'b1100, 0, 1, 7, q);
    expect_eq("innic", 32'(r[0] ? q[15:0] : q[31:16]), 32'(eth_shadow[r]));
    mech[M_ETH_RD]++;
  endtask
  task automatic vid_wr(int off, logic [7:0] v);
    logic [31:0] q;
    opb(VGA + 32'(off), 4'b1000 >> off[1:0], {4{v}}, 0, 2, q);
    mech[M_VID_WR]++;
  endtask
  task automatic vid_rd(int off, logic [7:0] exp);
    logic [31:0] q;
    opb(VGA + 32'(off), 4'b1000 >> off[1:0], 0, 1, 2, q);
    expect_eq("video read", 32'(q[31 - 8*off[1:0] -: 8]), 32'(exp));
    mech[M_VID_RD]++;
  endtask

  function automatic logic expected_pixel(int x, int y);
    logic [7:0] c, g;
    c = screen[(y / 16) * 80 + x / 8];
    if (c < 32 || c > 127) return 1'b0;
    g = font[(c - 32) * 16 + y % 16];
    return g[7 - x % 8];
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string msg;
    logic [15:0] v;
    int row, col, k, n_on;
    for (int i = 0; i < 2**19; i++) shadow[i] = 8'h00;
    for (int i = 0; i < 32; i++) eth_shadow[i] = 16'h0000;
    repeat (3) @(posedge clk);
    rst = 0;

    // 1. Ethernet chip initialisation (register n at byte offset 2n)
    outnic(8'h00, 16'h0061);  // command: page 1
    outnic(8'h0D, 16'h004E);  // register test value
    innic(8'h0D);
    outnic(8'h00, 16'h0021);  // stop, abort DMA
    outnic(8'h0E, 16'h0001);  // data configuration: word wide
    outnic(8'h0A, 16'h0000);  // remote byte count
    outnic(8'h0B, 16'h0000);
    outnic(8'h0F, 16'h0000);  // interrupt mask
    outnic(8'h07, 16'h00FF);  // interrupt status clear
    outnic(8'h0C, 16'h0020);  // receive configuration: monitor
    outnic(8'h0D, 16'h0002);  // transmit configuration
    outnic(8'h01, 16'h0049);  // receive ring start page
    outnic(8'h02, 16'h007E);  // receive ring stop page
    outnic(8'h03, 16'h007D);  // boundary
    outnic(8'h04, 16'h0041);  // transmit page start
    outnic(8'h00, 16'h0022);  // start
    outnic(8'h0D, 16'h0000);
    for (int r = 0; r < 16; r++) innic(r);

    // 2. the message, one character per 16-bit store at every fourth byte;
    //    63 characters plus the terminator fill the software's 64-byte buffer
    msg = "Hi from POPi!\r\nMeet at 6pm at the lab, bring the XSB board.\r\nA.";
    expect_eq("message length", msg.len(), 63);
    for (int i = 0; i <= msg.len(); i++)
      st16(19'(i << 2), (i < msg.len()) ? 16'(msg[i]) : 16'h0000);
    for (int i = 0; i <= msg.len(); i++) ld16(19'(i << 2), v);

    // 3. program-memory style traffic
    for (int i = 0; i < 64; i++) st32(19'('h4000 + 4 * i), $urandom);
    for (int i = 0; i < 64; i++) st16(19'('h4000 + 2 * $urandom_range(0, 127)), 16'($urandom));
    for (int i = 0; i < 64; i++) st8(19'('h4000 + $urandom_range(0, 255)), 8'($urandom));
    for (int i = 0; i < 64; i++) ld32(19'('h4000 + 4 * i));
    for (int i = 0; i < 64; i++) ld8(19'('h4000 + $urandom_range(0, 255)));
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      abus = SRAM + 32'h4000; be = 4'b1111; rnw = 1; select = 1;
      repeat (i + 1) begin
        @(negedge clk);
        checks++;
        if (xferack) failures++;
      end
      select = 0;
      repeat (2) @(negedge clk);
      mech[M_ABORT]++;
    end
    ld32(19'h4000);

    // 4. font and screen
    for (int i = 0; i < 1536; i++) begin
      font[i] = 8'((i / 16) * 7 + (i % 16) * 29) ^ 8'((i % 16) << 3);
      vid_wr('hA00 + i, font[i]);
    end
    for (int i = 0; i < 2400; i++) begin
      screen[i] = 8'h20;
      vid_wr(i, 8'h20);
    end
    row = 0;
    col = 0;
    for (int i = 0; i < msg.len(); i++) begin
      logic [7:0] c;
      c = shadow[(i << 2) + 1];
      if (c == 8'h0D) col = 0;
      else if (c == 8'h0A) row++;
      else begin
        screen[row * 80 + col] = c;
        vid_wr(row * 80 + col, c);
        col = (col == 79) ? 0 : col + 1;
      end
    end
    for (int i = 0; i < 40; i++) vid_rd(i, screen[i]);
    for (int i = 0; i < 40; i++) vid_rd('hA00 + 16 * 33 + i, font[16 * 33 + i]);

    // 5. one frame, sampled once per pixel period
    @(negedge vsync_n);
    @(posedge vsync_n);
    @(posedge blank_n);
    #1;
    k = 0;
    n_on = 0;
    while (k < 640 * 480) begin
      if (blank_n) begin
        expect_eq("pixel", 32'(pixel), 32'(expected_pixel(k % 640, k / 640)));
        n_on += 32'(pixel);
        k++;
      end
      repeat (2) @(posedge clk);
      #1;
    end
    mech[M_FRAME]++;
    checks++;
    if (n_on == 0) failures++;

    expect_eq("bus contention", contention, 0);
    expect_eq("short Ethernet writes", short_writes, 0);
    expect_eq("other devices deselected", {flash_ce_n, sdram_ce_n, adc_oe_n, au_cs_n,
              usb_cs_n, nv_cs0_n, nv_cs1_n, errack, retry, toutsup}, 10'b1111111000);
    for (int m = 0; m < M_NUM; m++) begin
      $display("%s: %0d", mech_t'(m), mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_t'(m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
