// vga_text: OPB text-mode video peripheral.
//
// The processor writes characters into a character memory of COLS x ROWS
// bytes, one byte per screen cell, at byte offset col + 80 * row from
// C_BASEADDR, and the glyphs into a font memory at offset FONT_OFFSET: glyph
// g occupies GLYPH_H consecutive bytes (top row first, bit 7 is the leftmost
// pixel) and draws character code FONT_FIRST + g. A raster scan
// (vga_timing) reads both memories and sends one bit per pixel to the
// monitor: 1 where the glyph has a pixel, 0 elsewhere, in the blanking
// intervals and for codes the font does not hold. Screen cells are 8 x 16
// pixels, so 640 x 480 holds 80 x 30 characters.
//
// OPB side: a 4 KB window (address bits 0..19 match C_BASEADDR). One byte is
// read or written per transfer, at the byte address given, whatever the
// byte enables; write data is taken from the byte lane of that address and
// read data is returned on all four lanes. Sln_xferAck comes in the clock
// after the first clock of OPB_select; writes outside the two memories are
// dropped and such reads return zero.
//
// Video side: the pixel rate is the OPB clock divided by PIX_DIV; pixel,
// hsync_n, vsync_n and blank_n leave through registers three pixel periods
// after the raster counters, all delayed alike.
//
// The 80-column screen, the cell address col + 80 * row, the font offset
// 0xA00 and the 4 KB window follow the terminal software of the design.
// The 30 rows follow that software too (the prose calls the display 80 x
// 25). The 8 x 16 cells, the 96-glyph font from code 32 (what fits between
// 0xA00 and the end of the window), the VGA timing and the one-bit pixel
// are this design's choices. Reset is asynchronous, active high; the
// memories are not cleared, the software blanks the screen at start.
module vga_text
  import popi_pkg::*;
#(
  parameter opb_addr_t C_BASEADDR  = 32'hFEFF_1000,
  parameter int        COLS        = 80,
  parameter int        ROWS        = 30,
  parameter int        GLYPH_H     = 16,
  parameter int        FONT_OFFSET = 'hA00,
  parameter int        FONT_FIRST  = 32,
  parameter int        FONT_GLYPHS = 96,
  parameter int        PIX_DIV     = 2
) (
  input  logic      opb_clk,
  input  logic      opb_rst,
  input  opb_addr_t opb_abus,
  input  opb_data_t opb_dbus,
  input  logic      opb_rnw,
  input  logic      opb_select,
  output opb_data_t sln_dbus,
  output logic      sln_xferack,
  output logic      vga_pixel,
  output logic      vga_hsync_n,
  output logic      vga_vsync_n,
  output logic      vga_blank_n
);

  localparam int CHARS      = COLS * ROWS;
  localparam int FONT_BYTES = FONT_GLYPHS * GLYPH_H;
  localparam int GH_BITS    = $clog2(GLYPH_H);

  logic [7:0] char_mem [CHARS];
  logic [7:0] font_mem [FONT_BYTES];

  // ---------------- processor port ----------------
  logic       hit, ack_q;
  logic [11:0] offset;
  logic [1:0]  lane;
  logic [7:0]  wbyte, rd_char, rd_font;
  logic        in_char, in_font, rd_char_sel, rd_font_sel;
  logic [11:0] char_idx;
  logic [$clog2(FONT_BYTES)-1:0] font_idx;

  always_comb begin
    hit      = opb_select && (opb_abus[0:19] == C_BASEADDR[0:19]);
    offset   = opb_abus[20:31];
    lane     = offset[1:0];
    wbyte    = opb_dbus[8*lane +: 8];
    in_char  = 32'(offset) < CHARS;
    in_font  = (32'(offset) >= FONT_OFFSET) && (32'(offset) < FONT_OFFSET + FONT_BYTES);
    char_idx = in_char ? offset : '0;
    font_idx = in_font ? ($bits(font_idx))'(offset - 12'(FONT_OFFSET)) : '0;
  end

  always_ff @(posedge opb_clk) begin
    if (hit && !ack_q && !opb_rnw) begin
      if (in_char) char_mem[char_idx] <= wbyte;
      if (in_font) font_mem[font_idx] <= wbyte;
    end
    rd_char <= char_mem[char_idx];
    rd_font <= font_mem[font_idx];
  end

  always_ff @(posedge opb_clk or posedge opb_rst) begin
    if (opb_rst) begin
      ack_q       <= 1'b0;
      rd_char_sel <= 1'b0;
      rd_font_sel <= 1'b0;
    end else begin
      ack_q       <= hit && !ack_q;
      rd_char_sel <= hit && !ack_q && opb_rnw && in_char;
      rd_font_sel <= hit && !ack_q && opb_rnw && in_font;
    end
  end

  always_comb begin
    sln_xferack = ack_q;
    sln_dbus    = '0;
    if (rd_char_sel) sln_dbus = {4{rd_char}};
    if (rd_font_sel) sln_dbus = {4{rd_font}};
  end

  // ---------------- raster ----------------
  logic [$clog2(PIX_DIV+1)-1:0] div_cnt;
  logic pix_ce;

  always_ff @(posedge opb_clk or posedge opb_rst) begin
    if (opb_rst)     div_cnt <= '0;
    else if (pix_ce) div_cnt <= '0;
    else             div_cnt <= div_cnt + 1'b1;
  end
  assign pix_ce = (div_cnt == ($bits(div_cnt))'(PIX_DIV - 1));

  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        active, hsync_n, vsync_n;

  vga_timing u_timing (
    .clk(opb_clk), .rst(opb_rst), .pix_ce,
    .hcount, .vcount, .active, .hsync_n, .vsync_n, .frame_start()
  );

  // Stage 1: character code of the cell under the beam.
  logic [11:0] cell_idx;
  always_comb begin
    cell_idx = 12'((32'(vcount) / GLYPH_H) * COLS + 32'(hcount) / 8);
    if (!active || cell_idx >= 12'(CHARS)) cell_idx = '0;
  end

  typedef struct packed {
    logic         active;
    logic         hsync_n;
    logic         vsync_n;
    logic [2:0]   x;
    logic [GH_BITS-1:0] y;
  } beam_t;

  beam_t      s1, s2;
  logic [7:0] code1, glyph2;
  logic       glyph_ok2;
  logic [$clog2(FONT_BYTES)-1:0] glyph_idx;
  logic        glyph_ok;

  always_comb begin
    glyph_ok  = (code1 >= 8'(FONT_FIRST)) && (32'(code1) < FONT_FIRST + FONT_GLYPHS);
    glyph_idx = glyph_ok ? ($bits(glyph_idx))'((32'(code1) - FONT_FIRST) * GLYPH_H + 32'(s1.y)) : '0;
  end

  always_ff @(posedge opb_clk) begin
    if (pix_ce) begin
      code1  <= char_mem[cell_idx];
      glyph2 <= font_mem[glyph_idx];
    end
  end

  always_ff @(posedge opb_clk or posedge opb_rst) begin
    if (opb_rst) begin
      s1          <= '{active: 1'b0, hsync_n: 1'b1, vsync_n: 1'b1, x: '0, y: '0};
      s2          <= '{active: 1'b0, hsync_n: 1'b1, vsync_n: 1'b1, x: '0, y: '0};
      glyph_ok2   <= 1'b0;
      vga_pixel   <= 1'b0;
      vga_hsync_n <= 1'b1;
      vga_vsync_n <= 1'b1;
      vga_blank_n <= 1'b0;
    end else if (pix_ce) begin
      s1          <= '{active: active, hsync_n: hsync_n, vsync_n: vsync_n,
                       x: hcount[2:0], y: vcount[GH_BITS-1:0]};
      s2          <= s1;
      glyph_ok2   <= glyph_ok;
      vga_pixel   <= s2.active && glyph_ok2 && glyph2[3'd7 - s2.x];
      vga_hsync_n <= s2.hsync_n;
      vga_vsync_n <= s2.vsync_n;
      vga_blank_n <= s2.active;
    end
  end

endmodule
