// Testbench of vga_controller with a tiny screen (8 x 4 visible, 15 x 8
// total) and a pixel tick every 2 clocks. A feeder pushes a numbered pixel
// sequence into the pixel buffer, as the address generator would. Frame 0
// is disabled and must be black without consuming pixels; frame 1 must show
// the sequence in raster order on r, g and b; in frame 2 only half of the
// pixels are supplied, so the second half must be black and raise underflow
// once per missing pixel. Also checks the number of visible pixels per
// frame and that the outputs change only once per pixel tick.
module tb_vga_controller;
  import edsoc_pkg::*;
  localparam int HA = 8, VA = 4, DEPTH = 8;
  localparam int CW = $clog2(DEPTH) + 1;

  logic clk = 0, rst_n = 0;
  logic display_en = 0, fifo_flush = 0, pix_push = 0;
  pix_t pix_in = 0;
  logic [CW-1:0] fifo_count;
  logic vblank_start, underflow;
  logic vga_hsync_n, vga_vsync_n, vga_de;
  logic [7:0] vga_r, vga_g, vga_b;
  int checks = 0, failures = 0;

  vga_controller #(
    .CLK_DIV(2), .FIFO_DEPTH(DEPTH), .COLOR_W(8),
    .H_ACTIVE(HA), .H_FP(2), .H_SYNC(3), .H_BP(2),
    .V_ACTIVE(VA), .V_FP(1), .V_SYNC(2), .V_BP(1)
  ) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int frame = 0;       // counts vblank_start
  int to_push = 0;     // pixels the feeder may still push this frame
  int next_push = 10;
  int expect_val = 10;
  int de_pixels = 0, mism = 0, uflows = 0, black_ok = 0;
  int frame_de [4];
  logic tick_q = 0;
  logic tdiv = 0;   // mirrors the controller's divide-by-2 pixel tick
  always @(posedge clk) tdiv <= rst_n ? !tdiv : 1'b0;

  // feeder and frame control, changes after posedge
  always @(posedge clk) begin
    pix_push   <= 1'b0;
    fifo_flush <= 1'b0;
    if (vblank_start) begin
      frame_de[frame] = de_pixels;
      de_pixels = 0;
      frame++;
      fifo_flush <= 1'b1;
      display_en <= (frame == 1 || frame == 2);
      to_push = (frame == 1) ? HA*VA : (frame == 2) ? HA*VA/2 : 0;
    end else if (!fifo_flush && to_push > 0 && int'(fifo_count) + int'(pix_push) < DEPTH) begin
      pix_push <= 1'b1;
      pix_in   <= pix_t'(next_push);
      next_push++;
      to_push--;
    end
    if (underflow) uflows++;
  end

  // output checker: outputs were updated at the edge after a pixel tick
  always @(posedge clk) begin
    if (tick_q && vga_de) begin
      de_pixels++;
      if (frame == 1 || (frame == 2 && de_pixels <= HA*VA/2)) begin
        if (vga_r != 8'(expect_val) || vga_g != vga_r || vga_b != vga_r) mism++;
        expect_val++;
      end else if (vga_r == 0 && vga_g == 0 && vga_b == 0) begin
        black_ok++;
      end else begin
        mism++;
      end
    end
    tick_q <= (tdiv == 1'b1);
  end

  int changes_off_tick = 0;
  logic [7:0] r_q = 0;
  logic hs_q = 1;
  always @(posedge clk) begin
    if (rst_n && !tick_q && (vga_r != r_q || vga_hsync_n != hs_q)) changes_off_tick++;
    r_q  <= vga_r;
    hs_q <= vga_hsync_n;
  end

  task automatic check(int got, int want, string what);
    checks++;
    if (got != want) begin failures++; $display("%s: got %0d want %0d", what, got, want); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (frame == 3);
    @(negedge clk);
    check(mism, 0, "pixel mismatches");
    check(frame_de[1], HA*VA, "visible pixels in frame 1");
    check(frame_de[2], HA*VA, "visible pixels in frame 2");
    check(expect_val - 10, HA*VA + HA*VA/2, "sequence pixels shown");
    check(uflows, HA*VA/2, "underflows");
    check(black_ok, frame_de[0] + HA*VA/2, "black pixels");
    check(changes_off_tick, 0, "output changes between ticks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
