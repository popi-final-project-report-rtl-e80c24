// vga_timing: raster counters and sync for a 640 x 480, 60 Hz VGA display.
//
// Two counters step once per pixel (pix_ce high): hcount over the H_TOTAL
// pixel periods of a line, vcount over the V_TOTAL lines of a frame. The
// outputs belong to the current counter values: active is high inside the
// visible H_ACTIVE x V_ACTIVE area, hsync_n / vsync_n are low during the
// sync pulses that follow the front porches. frame_start is high for the one
// pixel at (0, 0). The default numbers are the standard 640 x 480 industry
// timing with negative sync pulses (25 MHz pixel rate); the text display
// built on it has 80 columns and 30 rows of 8 x 16 pixel characters. Reset is
// asynchronous, active high, to (0, 0).
module vga_timing #(
  parameter int H_ACTIVE = 640,
  parameter int H_FP     = 16,
  parameter int H_SYNC   = 96,
  parameter int H_BP     = 48,
  parameter int V_ACTIVE = 480,
  parameter int V_FP     = 10,
  parameter int V_SYNC   = 2,
  parameter int V_BP     = 33
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        pix_ce,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        active,
  output logic        hsync_n,
  output logic        vsync_n,
  output logic        frame_start
);

  localparam int H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
    end else if (pix_ce) begin
      if (hcount == 11'(H_TOTAL - 1)) begin
        hcount <= '0;
        vcount <= (vcount == 10'(V_TOTAL - 1)) ? '0 : vcount + 10'd1;
      end else begin
        hcount <= hcount + 11'd1;
      end
    end
  end

  always_comb begin
    active      = (hcount < 11'(H_ACTIVE)) && (vcount < 10'(V_ACTIVE));
    hsync_n     = !((hcount >= 11'(H_ACTIVE + H_FP)) && (hcount < 11'(H_ACTIVE + H_FP + H_SYNC)));
    vsync_n     = !((vcount >= 10'(V_ACTIVE + V_FP)) && (vcount < 10'(V_ACTIVE + V_FP + V_SYNC)));
    frame_start = (hcount == '0) && (vcount == '0);
  end

endmodule
