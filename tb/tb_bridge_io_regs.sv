// tb_bridge_io_regs: checks the pad register stage: reset values (address
// zero, all strobes inactive, data released, captured data all ones) and,
// for random inputs, that every output equals its input one clock earlier.
module tb_bridge_io_regs;
  import popi_pkg::*;

  logic clk = 0, rst = 1;
  pb_addr_t addr_d, pb_a;
  pb_ctrl_t ctrl_d, pb_ctrl;
  pb_data_t wdata_d, pb_dout, pb_din, din_q;
  int checks = 0, failures = 0;

  bridge_io_regs dut (.clk, .rst, .addr_d, .ctrl_d, .wdata_d, .pb_a, .pb_ctrl,
                      .pb_dout, .pb_din, .din_q);

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
    logic [17:0] a_q;
    logic [6:0]  c_q;
    logic [15:0] w_q, i_q;
    addr_d = 18'h2AAAA; ctrl_d = '0; wdata_d = '0; pb_din = '0;
    #12;
    expect_eq("rst a", 32'(pb_a), 0);
    expect_eq("rst ctrl", 32'(pb_ctrl), 32'h7F);
    expect_eq("rst dout", 32'(pb_dout), 32'hFFFF);
    expect_eq("rst din", 32'(din_q), 32'hFFFF);
    rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      addr_d = 18'($urandom); ctrl_d = 7'($urandom); wdata_d = 16'($urandom); pb_din = 16'($urandom);
      a_q = addr_d; c_q = ctrl_d; w_q = wdata_d; i_q = pb_din;
      @(posedge clk);
      #1;
      addr_d = ~addr_d; ctrl_d = ~ctrl_d; wdata_d = ~wdata_d; pb_din = ~pb_din;
      #1;
      expect_eq("a", 32'(pb_a), 32'(a_q));
      expect_eq("ctrl", 32'(pb_ctrl), 32'(c_q));
      expect_eq("dout", 32'(pb_dout), 32'(w_q));
      expect_eq("din", 32'(din_q), 32'(i_q));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
