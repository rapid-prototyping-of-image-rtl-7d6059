// Display controller: shows fetched frame-buffer pixels on a VGA monitor.
//
// A divider makes one pixel tick every CLK_DIV system clocks (50 MHz / 2 =
// 25 MHz pixel rate by default). vga_timing produces the 640x480 @ 60 Hz
// sync and blanking. Pixels read from memory by the display address
// generator are pushed into a FIFO_DEPTH-entry pixel buffer (pix_push,
// pix_in). In every visible pixel tick of a frame with display_en set, one
// pixel is taken from the buffer and shown as gray (the same value on red,
// green and blue, top COLOR_W bits); if the buffer is empty the pixel is
// black and underflow pulses. Frames with display_en low are black.
// All monitor outputs (hsync_n, vsync_n, de, r, g, b) are registered and
// change on pixel ticks, one tick after the timing counters.
// The 640x480 @ 60 Hz mode is the document's; the pixel buffer, the clock
// divider and the gray-to-colour mapping are this design's choices.
module vga_controller
  import edsoc_pkg::*;
#(
  parameter int unsigned CLK_DIV    = 2,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned COLOR_W    = 8,
  parameter int unsigned H_ACTIVE   = 640,
  parameter int unsigned H_FP       = 16,
  parameter int unsigned H_SYNC     = 96,
  parameter int unsigned H_BP       = 48,
  parameter int unsigned V_ACTIVE   = 480,
  parameter int unsigned V_FP       = 10,
  parameter int unsigned V_SYNC     = 2,
  parameter int unsigned V_BP       = 33,
  localparam int unsigned CW        = $clog2(FIFO_DEPTH) + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               display_en,
  input  logic               fifo_flush,
  input  logic               pix_push,
  input  pix_t               pix_in,
  output logic [CW-1:0]      fifo_count,
  output logic               vblank_start,
  output logic               underflow,
  output logic               vga_hsync_n,
  output logic               vga_vsync_n,
  output logic               vga_de,
  output logic [COLOR_W-1:0] vga_r,
  output logic [COLOR_W-1:0] vga_g,
  output logic [COLOR_W-1:0] vga_b
);
  // pixel tick
  logic [$clog2(CLK_DIV+1)-1:0] div;
  logic pix_tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        div <= '0;
    else if (pix_tick) div <= '0;
    else               div <= div + 1'b1;
  end
  assign pix_tick = (div == ($clog2(CLK_DIV+1))'(CLK_DIV - 1));

  // timing
  logic hsync_n, vsync_n, active;
  vga_timing #(
    .H_ACTIVE(H_ACTIVE), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(V_ACTIVE), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_timing (
    .clk, .rst_n, .pix_tick,
    .hcount(), .vcount(),
    .hsync_n, .vsync_n, .active, .vblank_start
  );

  // pixel buffer
  pix_t fifo_dout;
  logic fifo_empty, fifo_pop;

  sync_fifo #(.WIDTH(PIX_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .flush(fifo_flush),
    .push(pix_push),
    .din(pix_in),
    .pop(fifo_pop),
    .dout(fifo_dout),
    .empty(fifo_empty),
    .full(),
    .count(fifo_count)
  );

  logic show;
  assign show      = pix_tick && active && display_en;
  assign fifo_pop  = show && !fifo_empty;
  assign underflow = show && fifo_empty;

  pix_t shown;
  assign shown = fifo_pop ? fifo_dout : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vga_hsync_n <= 1'b1;
      vga_vsync_n <= 1'b1;
      vga_de      <= 1'b0;
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
    end else if (pix_tick) begin
      vga_hsync_n <= hsync_n;
      vga_vsync_n <= vsync_n;
      vga_de      <= active;
      vga_r       <= shown[PIX_W-1 -: COLOR_W];
      vga_g       <= shown[PIX_W-1 -: COLOR_W];
      vga_b       <= shown[PIX_W-1 -: COLOR_W];
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    pix_push |-> fifo_count != CW'(FIFO_DEPTH));

endmodule
