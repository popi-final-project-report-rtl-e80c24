// tb_bridge_datapath: drives the bridge datapath with random OPB requests and
// controller signals every clock and compares, after each edge, the
// registered request, the halfword address (with the second-halfword OR),
// UB#/LB#, the write halfword and the OPB read register with a reference
// computed from plain integer arithmetic on the values applied. Also checks
// the reset values.
module tb_bridge_datapath;
  import popi_pkg::*;

  logic clk = 0, rst = 1;
  opb_addr_t abus;
  opb_be_t   be_in;
  opb_data_t dbus;
  logic      rnw_in, sel32, ld_hi, ld_lo;
  pb_data_t  pad_din;
  opb_be_t   be;
  logic      rnw, ub_req_n, lb_req_n;
  pb_addr_t  pb_addr;
  pb_data_t  pb_wdata;
  opb_data_t sln_dbus;
  int checks = 0, failures = 0;

  bridge_datapath dut (.clk, .rst, .opb_abus(abus), .opb_be(be_in), .opb_dbus(dbus),
                       .opb_rnw(rnw_in), .sel32, .ld_hi, .ld_lo, .pad_din,
                       .be, .rnw, .ub_req_n, .lb_req_n, .pb_addr, .pb_wdata, .sln_dbus);

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a_q, d_q, rd_model;
    logic [3:0]  be_q;
    logic        rnw_q;
    abus = '0; be_in = '0; dbus = '0; rnw_in = 0; sel32 = 0; ld_hi = 0; ld_lo = 0; pad_din = '0;
    rd_model = 0;
    repeat (2) @(posedge clk);
    #1;
    expect_eq("reset addr", 32'(pb_addr), 0);
    expect_eq("reset dbus", sln_dbus, 0);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      abus    = $urandom;
      be_in   = 4'($urandom);
      dbus    = $urandom;
      rnw_in  = 1'($urandom);
      ld_hi   = 1'($urandom);
      ld_lo   = 1'($urandom);
      pad_din = 16'($urandom);
      // the read register loads at this edge from the inputs now applied
      if (!ld_hi && !ld_lo) rd_model = 0;
      else begin
        if (ld_lo) rd_model = {pad_din, rd_model[15:0]};
        if (ld_hi) rd_model = {rd_model[31:16], pad_din};
      end
      a_q = abus; d_q = dbus; be_q = be_in; rnw_q = rnw_in;
      @(posedge clk);
      #1;
      sel32 = 1'($urandom);
      #1;
      expect_eq("be", 32'(be), 32'(be_q));
      expect_eq("rnw", 32'(rnw), 32'(rnw_q));
      expect_eq("addr", 32'(pb_addr), ((a_q >> 1) & 32'h3FFFF) | 32'(sel32));
      // byte lane k is bits 8k..8k+7 counted from the most significant end
      expect_eq("ub", 32'(ub_req_n), 32'(!(be_q[3] || be_q[1])));
      expect_eq("lb", 32'(lb_req_n), 32'(!(be_q[2] || be_q[0])));
      expect_eq("wdata", 32'(pb_wdata), sel32 ? (d_q & 32'hFFFF) : (d_q >> 16));
      expect_eq("sln_dbus", sln_dbus, rd_model);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
