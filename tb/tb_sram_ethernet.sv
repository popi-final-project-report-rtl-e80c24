// tb_sram_ethernet: the bridge with models of the SRAM and of the Ethernet
// chip on its shared bus, driven like the processor drives the OPB (byte and
// halfword stores repeated on every lane). Random byte, halfword and word
// stores and loads are checked against a byte-addressed shadow memory
// (big-endian: the byte at the lowest address is OPB bits 0..7), Ethernet
// register writes and reads against a shadow register file, and every
// transfer's length from the first clock of OPB_select to the acknowledge:
// SRAM store 3 clocks (word 4), SRAM load 5 (word 6), Ethernet 7. The chip
// model rejects IOW# pulses shorter than three clocks and returns garbage
// before IOR# has been low two clocks, so too short Ethernet cycles fail.
// The test also abandons transfers, checks that no two devices drive the
// data bus at once and that the other board devices stay deselected.
module tb_sram_ethernet;
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
  int        short_writes;
  int checks = 0, failures = 0;
  int n_wr8, n_wr16, n_wr32, n_rd8, n_rd16, n_rd32, n_ewr, n_erd, n_abort, contention;

  sram_ethernet dut (
    .opb_clk(clk), .opb_rst(rst), .opb_abus(abus), .opb_be(be), .opb_dbus(dbus),
    .opb_rnw(rnw), .opb_select(select), .sln_dbus, .sln_errack(errack),
    .sln_retry(retry), .sln_toutsup(toutsup), .sln_xferack(xferack),
    .pb_a, .pb_ctrl, .pb_dout, .pb_din,
    .flash_ce_n, .sdram_ce_n, .adc_oe_n, .au_cs_n, .usb_cs_n, .nv_cs0_n, .nv_cs1_n
  );

  sram_model u_sram (.clk, .ce_n(pb_ctrl.ram_ce_n), .oe_n(pb_ctrl.oe_n), .we_n(pb_ctrl.we_n),
                     .ub_n(pb_ctrl.ub_n), .lb_n(pb_ctrl.lb_n), .a(pb_a), .din(pb_din),
                     .dout(sram_dout), .drive(sram_drive));

  eth_model u_eth (.clk, .cs_n(pb_ctrl.eth_cs_n), .ior_n(pb_ctrl.oe_n), .iow_n(pb_ctrl.we_n),
                   .a(pb_a), .din(pb_din), .dout(eth_dout), .drive(eth_drive), .short_writes);

  assign pb_din = (pb_ctrl.d_t ? 16'h0000 : pb_dout) | sram_dout | eth_dout;

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (!rst && 32'(!pb_ctrl.d_t) + 32'(sram_drive) + 32'(eth_drive) > 1) contention++;
    if (!rst && !(flash_ce_n && sdram_ce_n && adc_oe_n && au_cs_n && usb_cs_n && nv_cs0_n && nv_cs1_n
          && !errack && !retry && !toutsup)) contention++;
  end

  logic [7:0]  shadow [2**19];
  logic [15:0] eth_shadow [32];

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h at %0t", what, got, exp, $time);
    end
  endtask

  // One OPB transfer; returns the read data and the clocks it took.
  task automatic opb(input logic [31:0] a, input logic [3:0] b, input logic [31:0] d,
                     input logic r, output logic [31:0] q, output int n);
    @(negedge clk);
    abus = a; be = b; dbus = d; rnw = r; select = 1;
    n = 1;
    forever begin
      #1;
      if (xferack) break;
      @(negedge clk);
      n++;
      if (n > 40) begin
        failures++;
        $display("FAIL no acknowledge for %h", a);
        break;
      end
    end
    q = sln_dbus;
    @(posedge clk);
    #1;
    select = 0;
    dbus = 32'hBAD0_BAD0;
  endtask

  task automatic sram_write(int size, logic [18:0] a, logic [31:0] v);
    logic [31:0] q;
    int n;
    case (size)
      1: begin
        opb(32'(a), 4'b1000 >> a[1:0], {4{v[7:0]}}, 0, q, n);
        shadow[a] = v[7:0];
        expect_eq("wr8 clocks", n, 3);
        n_wr8++;
      end
      2: begin
        a[0] = 0;
        opb(32'(a), a[1] ? 4'b0011 : 4'b1100, {2{v[15:0]}}, 0, q, n);
        shadow[a] = v[15:8];
        shadow[a + 1] = v[7:0];
        expect_eq("wr16 clocks", n, 3);
        n_wr16++;
      end
      default: begin
        a[1:0] = 0;
        opb(32'(a), 4'b1111, v, 0, q, n);
        for (int k = 0; k < 4; k++) shadow[a + 19'(k)] = v[31 - 8*k -: 8];
        expect_eq("wr32 clocks", n, 4);
        n_wr32++;
      end
    endcase
  endtask

  task automatic sram_read(int size, logic [18:0] a);
    logic [31:0] q;
    int n;
    case (size)
      1: begin
        opb(32'(a), 4'b1000 >> a[1:0], 32'h0, 1, q, n);
        expect_eq("rd8 data", 32'(q[31 - 8*a[1:0] -: 8]), 32'(shadow[a]));
        expect_eq("rd8 clocks", n, 5);
        n_rd8++;
      end
      2: begin
        a[0] = 0;
        opb(32'(a), a[1] ? 4'b0011 : 4'b1100, 32'h0, 1, q, n);
        expect_eq("rd16 data", q, {2{shadow[a], shadow[a + 1]}});
        expect_eq("rd16 clocks", n, 5);
        n_rd16++;
      end
      default: begin
        a[1:0] = 0;
        opb(32'(a), 4'b1111, 32'h0, 1, q, n);
        expect_eq("rd32 data", q, {shadow[a], shadow[a + 1], shadow[a + 2], shadow[a + 3]});
        expect_eq("rd32 clocks", n, 6);
        n_rd32++;
      end
    endcase
  endtask

  task automatic eth_write(int r, logic [15:0] v);
    logic [31:0] q;
    int n;
    opb(32'h0008_0000 + 32'(2 * r), r[0] ? 4'b0011 : 4'b1100, {2{v}}, 0, q, n);
    eth_shadow[r] = v;
    expect_eq("eth wr clocks", n, 7);
    n_ewr++;
  endtask

  task automatic eth_read(int r);
    logic [31:0] q;
    int n;
    opb(32'h0008_0000 + 32'(2 * r), r[0] ? 4'b0011 : 4'b1100, 32'h0, 1, q, n);
    expect_eq("eth rd data", q, {2{eth_shadow[r]}});
    expect_eq("eth rd clocks", n, 7);
    n_erd++;
  endtask

  // A load the master gives up before the acknowledge (a store given up
  // half way would leave memory in an unknown state, so only loads).
  task automatic abandon(logic [31:0] a, logic r, int after);
    @(negedge clk);
    abus = a; be = 4'b1111; rnw = r; dbus = 32'h5A5A_5A5A; select = 1;
    repeat (after) begin
      @(negedge clk);
      checks++;
      if (xferack) begin
        failures++;
        $display("FAIL acknowledge during abandoned transfer");
      end
    end
    select = 0;
    repeat (2) @(negedge clk);
    n_abort++;
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2**19; i++) shadow[i] = 8'h00;
    for (int i = 0; i < 32; i++) eth_shadow[i] = 16'h0000;
    repeat (3) @(posedge clk);
    rst = 0;
    // the sequence of the design's own bench: word, halfwords, bytes, read back
    sram_write(4, 0, 32'h1234_ABCD);
    sram_read(4, 0);
    sram_write(2, 0, 32'h1234);
    sram_write(2, 2, 32'h1234);
    sram_write(1, 0, 32'hCD);
    sram_write(1, 1, 32'hEF);
    sram_write(1, 2, 32'hAB);
    sram_write(1, 3, 32'h34);
    sram_read(4, 0);
    expect_eq("byte merge", {shadow[0], shadow[1], shadow[2], shadow[3]}, 32'hCDEF_AB34);
    for (int i = 0; i < 1500; i++) begin
      logic [18:0] a;
      int op;
      a  = ($urandom_range(0, 3) == 0) ? 19'($urandom) : 19'($urandom_range(0, 255));
      op = $urandom_range(0, 9);
      if (op < 3)      sram_write(op + 1 + (op == 2 ? 1 : 0), a, $urandom);
      else if (op < 6) sram_read(op - 2 + (op == 5 ? 1 : 0), a);
      else if (op == 6) eth_write($urandom_range(0, 31), 16'($urandom));
      else if (op == 7) eth_read($urandom_range(0, 31));
      else if (op == 8 && $urandom_range(0, 3) == 0)
        abandon(($urandom_range(0, 1) ? 32'h0008_0000 : 32'h0) + 32'($urandom_range(0, 63) * 4),
                1'b1, $urandom_range(1, 3));
      else sram_read(4, a);
    end
    for (int i = 0; i < 256; i += 4) sram_read(4, 19'(i));
    expect_eq("bus contention", contention, 0);
    expect_eq("short Ethernet writes", short_writes, 0);
    begin
      int counts[9];
      counts = '{n_wr8, n_wr16, n_wr32, n_rd8, n_rd16, n_rd32, n_ewr, n_erd, n_abort};
      foreach (counts[k]) begin
        checks++;
        if (counts[k] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never exercised", k);
        end
      end
    end
    $display("wr8=%0d wr16=%0d wr32=%0d rd8=%0d rd16=%0d rd32=%0d eth_wr=%0d eth_rd=%0d abort=%0d",
             n_wr8, n_wr16, n_wr32, n_rd8, n_rd16, n_rd32, n_ewr, n_erd, n_abort);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
