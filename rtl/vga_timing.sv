// Sync and blanking timing of a 640x480 @ 60 Hz display.
//
// Two counters step once per pixel tick (pix_tick, 25 MHz nominal): hcount
// over 800 pixel times per line (640 visible, 16 front porch, 96 sync,
// 48 back porch) and vcount over 525 lines per frame (480 visible, 10 front
// porch, 2 sync, 33 back porch); 25.175 MHz / (800 * 525) = 59.94 Hz.
// hsync and vsync are active low. active is high in the visible area, where
// (hcount, vcount) is the pixel position. vblank_start is high for the one
// tick that starts the first blank line after the visible area.
// All outputs are decoded from registered counters. The resolution and
// refresh rate are the document's; the porch and sync lengths and polarity
// are the usual values for this mode.
module vga_timing #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33,
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP,
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP,
  localparam int unsigned HW      = $clog2(H_TOTAL),
  localparam int unsigned VW      = $clog2(V_TOTAL)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pix_tick,
  output logic [HW-1:0] hcount,
  output logic [VW-1:0] vcount,
  output logic          hsync_n,
  output logic          vsync_n,
  output logic          active,
  output logic          vblank_start
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcount <= '0;
      vcount <= '0;
    end else if (pix_tick) begin
      if (hcount == HW'(H_TOTAL - 1)) begin
        hcount <= '0;
        vcount <= (vcount == VW'(V_TOTAL - 1)) ? '0 : vcount + 1'b1;
      end else begin
        hcount <= hcount + 1'b1;
      end
    end
  end

  assign hsync_n = !((hcount >= HW'(H_ACTIVE + H_FP)) && (hcount < HW'(H_ACTIVE + H_FP + H_SYNC)));
  assign vsync_n = !((vcount >= VW'(V_ACTIVE + V_FP)) && (vcount < VW'(V_ACTIVE + V_FP + V_SYNC)));
  assign active  = (hcount < HW'(H_ACTIVE)) && (vcount < VW'(V_ACTIVE));
  assign vblank_start = pix_tick && (hcount == '0) && (vcount == VW'(V_ACTIVE));

endmodule
