// tb_vga_timing: runs the raster generator for two full frames with a pixel
// enable that is sometimes held low, and checks, for every pixel, the
// counters, active area and both sync pulses against the 640 x 480 timing
// (800 pixels per line: 640 visible, 16 front porch, 96 sync, 48 back porch;
// 525 lines per frame: 480, 10, 2, 33). It also counts per frame the
// visible pixels (307200), the line sync pixels (525 x 96) and the frame
// sync pixels (2 x 800).
module tb_vga_timing;
  logic clk = 0, rst = 1, pix_ce = 0;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic active, hsync_n, vsync_n, frame_start;
  int checks = 0, failures = 0;

  vga_timing dut (.clk, .rst, .pix_ce, .hcount, .vcount, .active, .hsync_n, .vsync_n, .frame_start);

  always #5 clk = ~clk;

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int h, v, n_act, n_hs, n_vs, frames, bad;
    h = 0; v = 0; n_act = 0; n_hs = 0; n_vs = 0; frames = 0; bad = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    while (frames < 2) begin
      @(negedge clk);
      // compare the current pixel
      checks++;
      if (hcount !== 11'(h) || vcount !== 10'(v) ||
          active !== (h < 640 && v < 480) ||
          hsync_n !== !(h >= 656 && h < 752) ||
          vsync_n !== !(v >= 490 && v < 492) ||
          frame_start !== (h == 0 && v == 0)) begin
        bad++;
        failures++;
        if (bad < 10) $display("FAIL at h=%0d v=%0d: %0d %0d %b %b %b", h, v, hcount, vcount,
                               active, hsync_n, vsync_n);
      end
      pix_ce = ($urandom_range(0, 9) != 0);
      if (pix_ce) begin
        n_act += 32'(active);
        n_hs  += 32'(!hsync_n);
        n_vs  += 32'(!vsync_n);
        h++;
        if (h == 800) begin
          h = 0;
          v++;
          if (v == 525) begin
            v = 0;
            frames++;
            checks += 3;
            if (n_act != 307200 || n_hs != 525 * 96 || n_vs != 2 * 800) begin
              failures++;
              $display("FAIL frame counts %0d %0d %0d", n_act, n_hs, n_vs);
            end
            n_act = 0; n_hs = 0; n_vs = 0;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
