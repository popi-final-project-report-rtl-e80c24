// tb_vga_text: loads a font and a screen of characters into the text display
// over the OPB, reads parts back, and then compares every visible pixel of a
// frame with the pixel worked out from the loaded contents: cell (col, row)
// = character at offset col + 80 * row, glyph row y of character c at font
// offset 0xA00 + 16 * (c - 32) + y, bit 7 leftmost, blank for codes outside
// 32..127. It also checks the acknowledge latency (second clock of
// OPB_select), that reads outside the two memories return zero and that
// writes there change nothing. The pixel clock is set to the OPB clock to
// keep the frame short.
module tb_vga_text;
  import popi_pkg::*;

  localparam opb_addr_t BASE = 32'hFEFF_1000;

  logic clk = 0, rst = 1;
  opb_addr_t abus = '0;
  opb_data_t dbus = '0, sln_dbus;
  logic rnw = 0, select = 0, xferack;
  logic pixel, hsync_n, vsync_n, blank_n;
  int checks = 0, failures = 0;
  logic [7:0] chars [2400];
  logic [7:0] font [1536];

  vga_text #(.PIX_DIV(1)) dut (.opb_clk(clk), .opb_rst(rst), .opb_abus(abus), .opb_dbus(dbus),
                               .opb_rnw(rnw), .opb_select(select), .sln_dbus, .sln_xferack(xferack),
                               .vga_pixel(pixel), .vga_hsync_n(hsync_n), .vga_vsync_n(vsync_n),
                               .vga_blank_n(blank_n));

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%h exp=%h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic opb(input logic [11:0] off, input logic r, input logic [7:0] b,
                     output logic [7:0] q);
    int n;
    @(negedge clk);
    abus = BASE + 32'(off); rnw = r; dbus = r ? 32'h0 : {4{b}}; select = 1;
    n = 1;
    forever begin
      #1;
      if (xferack) break;
      @(negedge clk);
      n++;
      if (n > 10) break;
    end
    expect_eq("ack clocks", n, 2);
    // read data comes on the byte lane of the address (here on all lanes)
    q = sln_dbus[8 * off[1:0] +: 8];
    @(posedge clk);
    #1 select = 0;
  endtask

  function automatic logic expected_pixel(int x, int y);
    logic [7:0] c, g;
    c = chars[(y / 16) * 80 + x / 8];
    if (c < 32 || c > 127) return 1'b0;
    g = font[(c - 32) * 16 + y % 16];
    return g[7 - x % 8];
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] q;
    int k, n_on;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 1536; i++) begin
      font[i] = 8'($urandom);
      opb(12'('hA00 + i), 0, font[i], q);
    end
    for (int i = 0; i < 2400; i++) begin
      chars[i] = ($urandom_range(0, 5) == 0) ? 8'($urandom) : 8'($urandom_range(32, 127));
      opb(12'(i), 0, chars[i], q);
    end
    // writes outside both memories are dropped
    opb(12'h960, 0, 8'hFF, q);
    opb(12'h9FF, 0, 8'hFF, q);
    for (int i = 0; i < 200; i++) begin
      int a;
      a = $urandom_range(0, 2399);
      opb(12'(a), 1, 8'h00, q);
      expect_eq("char readback", 32'(q), 32'(chars[a]));
      a = $urandom_range(0, 1535);
      opb(12'('hA00 + a), 1, 8'h00, q);
      expect_eq("font readback", 32'(q), 32'(font[a]));
    end
    opb(12'h960, 1, 8'h00, q);
    expect_eq("unmapped read", 32'(q), 0);
    opb(12'h9FF, 1, 8'h00, q);
    expect_eq("unmapped read", 32'(q), 0);
    // one frame: from the end of a frame sync pulse, every visible pixel in order
    @(negedge vsync_n);
    @(posedge vsync_n);
    k = 0;
    n_on = 0;
    while (k < 640 * 480) begin
      @(posedge clk);
      #1;
      if (blank_n) begin
        expect_eq("pixel", 32'(pixel), 32'(expected_pixel(k % 640, k / 640)));
        n_on += 32'(pixel);
        k++;
      end else begin
        checks++;
        if (pixel) begin
          failures++;
          $display("FAIL pixel lit in blanking");
        end
      end
    end
    checks++;
    if (n_on == 0) begin
      failures++;
      $display("FAIL no pixel lit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
