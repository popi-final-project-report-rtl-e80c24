// tb_bridge_fsm: runs every kind of bridge transfer through the controller
// and compares its outputs, clock by clock from the first clock of
// OPB_select, with the bus-cycle tables of the design written out here as
// strings (R: SRAM CE#, E: Ethernet CS#, O: OE#/IOR#, W: WE#/IOW#,
// D: drive data, B: byte strobes, S: sel32, H/L: load read halves, A: ack).
// That also checks each transfer's length. Transfers abandoned by the master
// must end without acknowledge and leave the controller ready.
module tb_bridge_fsm;
  import popi_pkg::*;

  logic clk = 0, rst = 1;
  logic select = 0, ram_cs, eth_cs, rnw = 0, ub_req_n = 1, lb_req_n = 1;
  logic is_eth = 0;
  opb_be_t be = '0;
  pb_ctrl_t ctrl;
  logic sel32, ld_hi, ld_lo, xfer_ack;
  bridge_state_t state;
  int checks = 0, failures = 0;
  int n_kind[6];

  assign ram_cs = select && !is_eth;
  assign eth_cs = select && is_eth;

  bridge_fsm dut (.clk, .rst, .opb_select(select), .ram_cs, .eth_cs, .rnw, .be,
                  .ub_req_n, .lb_req_n, .ctrl, .sel32, .ld_hi, .ld_lo, .xfer_ack, .state);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string seq_of(int kind, int c);
    string t[6][$] = '{
      '{"", "RWDB", "A"},                               // SRAM 8/16-bit write
      '{"", "RWDB", "RWDBS", "A"},                      // SRAM 32-bit write
      '{"", "ROB", "ROB", "ROBHL", "A"},                // SRAM 16-bit read
      '{"", "ROB", "ROBS", "ROBL", "ROBH", "A"},        // SRAM 32-bit read
      '{"", "EB", "EBWD", "EBWD", "EBWD", "EBD", "A"},  // Ethernet write
      '{"", "EB", "EBO", "EBO", "EBO", "EBOHL", "A"}    // Ethernet read
    };
    return (c < t[kind].size()) ? t[kind][c] : "X";
  endfunction

  function automatic bit has(string s, byte ch);
    foreach (s[i]) if (s[i] == ch) return 1;
    return 0;
  endfunction

  task automatic check_cycle(string exp);
    logic exp_ub, exp_lb;
    exp_ub = has(exp, "B") ? (has(exp, "E") ? 1'b0 : ub_req_n) : 1'b1;
    exp_lb = has(exp, "B") ? (has(exp, "E") ? 1'b0 : lb_req_n) : 1'b1;
    checks++;
    if (ctrl.ram_ce_n !== !has(exp, "R") || ctrl.eth_cs_n !== !has(exp, "E") ||
        ctrl.oe_n !== !has(exp, "O") || ctrl.we_n !== !has(exp, "W") ||
        ctrl.d_t !== !has(exp, "D") || ctrl.ub_n !== exp_ub || ctrl.lb_n !== exp_lb ||
        sel32 !== has(exp, "S") || ld_hi !== has(exp, "H") || ld_lo !== has(exp, "L") ||
        xfer_ack !== has(exp, "A")) begin
      failures++;
      $display("FAIL exp '%s' got ctrl=%b sel32=%b ld=%b%b ack=%b state=%s at %0t",
               exp, ctrl, sel32, ld_hi, ld_lo, xfer_ack, state.name(), $time);
    end
  endtask

  task automatic transfer(int kind, int abort_at);
    @(negedge clk);
    is_eth   = (kind >= 4);
    rnw      = (kind == 2 || kind == 3 || kind == 5);
    be       = (kind == 1 || kind == 3) ? 4'b1111 :
               (kind >= 4) ? 4'b0011 : opb_be_t'(4'b0001 << $urandom_range(0, 3));
    if (kind == 2 && $urandom_range(0, 1)) be = $urandom_range(0, 1) ? 4'b1100 : 4'b0011;
    ub_req_n = !(be[0] || be[2]);
    lb_req_n = !(be[1] || be[3]);
    select   = 1;
    for (int c = 0; c < 10; c++) begin
      #1;
      if (c == abort_at) begin
        select = 0;
        #1;
        checks++;
        if (xfer_ack || ctrl != PB_CTRL_IDLE || sel32 || ld_hi || ld_lo) begin
          failures++;
          $display("FAIL abort kind %0d cycle %0d", kind, c);
        end
        @(posedge clk);
        #1;
        checks++;
        if (state != ST_IDLE) begin
          failures++;
          $display("FAIL not idle after abort");
        end
        return;
      end
      check_cycle(seq_of(kind, c));
      if (xfer_ack) begin
        n_kind[kind]++;
        @(negedge clk);
        select = 0;
        return;
      end
      @(negedge clk);
    end
    failures++;
    $display("FAIL no acknowledge, kind %0d", kind);
    select = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (state != ST_IDLE || ctrl != PB_CTRL_IDLE) begin
      failures++;
      $display("FAIL reset state");
    end
    rst = 0;
    for (int k = 0; k < 6; k++) transfer(k, 99);
    for (int i = 0; i < 600; i++) begin
      int k, len;
      k = $urandom_range(0, 5);
      len = (k < 4) ? k + 3 : 7;
      // abandon some transfers before their acknowledge cycle
      transfer(k, ($urandom_range(0, 7) == 0) ? $urandom_range(1, len - 2) : 99);
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    foreach (n_kind[k]) begin
      checks++;
      if (n_kind[k] == 0) begin
        failures++;
        $display("FAIL transfer kind %0d never completed", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
