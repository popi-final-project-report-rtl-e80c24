// tb_bridge_decode: checks the bridge's address decode against a reference
// written from the address map: a 1 MB window at the base address whose
// lower half is the SRAM and upper half the Ethernet chip. Random addresses,
// addresses near the window edges and both select levels are tried, with a
// non-zero base address so that a decode ignoring the base would fail.
module tb_bridge_decode;
  import popi_pkg::*;

  localparam opb_addr_t BASE = 32'h2A30_0000;

  opb_addr_t abus;
  logic select, cs, ram_cs, eth_cs;
  int checks = 0, failures = 0;

  bridge_decode #(.C_BASEADDR(BASE)) dut (.opb_abus(abus), .opb_select(select),
                                           .cs, .ram_cs, .eth_cs);

  task automatic check(input opb_addr_t a, input logic s);
    logic in_win, exp_ram, exp_eth;
    abus = a;
    select = s;
    #1;
    in_win  = s && (a >= BASE) && (a < BASE + 32'h0010_0000);
    exp_ram = in_win && (a < BASE + 32'h0008_0000);
    exp_eth = in_win && (a >= BASE + 32'h0008_0000);
    checks++;
    if (cs !== in_win || ram_cs !== exp_ram || eth_cs !== exp_eth) begin
      failures++;
      $display("FAIL a=%h sel=%b cs=%b ram=%b eth=%b", a, s, cs, ram_cs, eth_cs);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    opb_addr_t edges[8] = '{BASE, BASE - 1, BASE + 32'h7FFFF, BASE + 32'h80000,
                            BASE + 32'hFFFFF, BASE + 32'h100000, 32'h0, 32'hFFFF_FFFF};
    foreach (edges[i]) begin
      check(edges[i], 1'b1);
      check(edges[i], 1'b0);
    end
    for (int i = 0; i < 2000; i++) begin
      opb_addr_t a;
      a = (i % 2) ? (BASE | ($urandom & 32'h000F_FFFF)) : $urandom;
      check(a, 1'($urandom_range(0, 3) != 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
