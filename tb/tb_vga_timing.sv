// Testbench of vga_timing at its default 640x480 @ 60 Hz parameters, with a
// pixel tick every second clock. Over two frames it measures, in pixel
// ticks, the line period (800), the hsync pulse (96 ticks starting 656 ticks
// after the line start), the visible pixels per line (640) and per frame
// (307200), the frame period (420000 = 800 x 525), the vsync pulse (2 lines
// starting at line 490) and that vblank_start comes once per frame at line
// 480. Expected numbers are the standard VESA 640x480 timing.
module tb_vga_timing;
  logic clk = 0, rst_n = 0, pix_tick = 0;
  logic [9:0] hcount, vcount;
  logic hsync_n, vsync_n, active, vblank_start;
  int checks = 0, failures = 0;

  vga_timing dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) pix_tick <= !pix_tick;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int got, int want, string what);
    checks++;
    if (got != want) begin failures++; $display("%s: got %0d want %0d", what, got, want); end
  endtask

  // per-tick measurements
  int tick = 0;
  int last_hs_fall = -1, last_vs_fall = -1, last_vb = -1;
  int hs_low = 0, vs_low_ticks = 0;
  int act_line = 0, act_frame = 0;
  int line_fall_pos_err = 0, hs_width_err = 0, line_period_err = 0, act_line_err = 0;
  int frames = 0, vs_lines = 0;
  logic hs_q = 1, vs_q = 1;

  always @(posedge clk) if (rst_n && pix_tick) begin
    // sampled values belong to the current counter position
    if (active) begin act_line++; act_frame++; end
    if (!hsync_n) hs_low++;
    if (!vsync_n) vs_low_ticks++;
    if (hs_q && !hsync_n) begin
      if (hcount != 656) line_fall_pos_err++;
      if (last_hs_fall >= 0 && tick - last_hs_fall != 800) line_period_err++;
      last_hs_fall = tick;
    end
    if (!hs_q && hsync_n) begin
      if (hs_low != 96) hs_width_err++;
      hs_low = 0;
    end
    if (hcount == 799) begin
      if (vcount < 480 && act_line != 640) act_line_err++;
      act_line = 0;
    end
    if (vs_q && !vsync_n) begin
      checks++;
      if (vcount != 490 || hcount != 0) begin failures++; $display("vsync fall at %0d,%0d", hcount, vcount); end
      if (last_vs_fall >= 0) check(tick - last_vs_fall, 420000, "frame period");
      last_vs_fall = tick;
    end
    if (!vs_q && vsync_n) begin
      check(vs_low_ticks, 2 * 800, "vsync width");
      vs_low_ticks = 0;
    end
    if (vblank_start) begin
      checks++;
      if (vcount != 480 || hcount != 0) begin failures++; $display("vblank_start at %0d,%0d", hcount, vcount); end
      if (last_vb >= 0) check(tick - last_vb, 420000, "vblank period");
      else check(act_frame, 307200, "visible pixels in first frame");
      last_vb = tick;
      act_frame = 0;
      frames++;
    end
    hs_q = hsync_n;
    vs_q = vsync_n;
    tick++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (frames == 3);
    check(line_fall_pos_err, 0, "hsync start position errors");
    check(line_period_err, 0, "line period errors");
    check(hs_width_err, 0, "hsync width errors");
    check(act_line_err, 0, "visible pixels per line errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
