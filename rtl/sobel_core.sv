// Sobel edge-detection datapath.
//
// Pixels of a gray-scale image arrive one per cycle at most, in raster order
// (pix_valid/pix_in), row after row. Two line buffers keep the previous two
// image rows, so that every new pixel completes a 3x3 window. From it the
// horizontal and vertical Sobel derivatives
//     Gx = (right column) - (left column),  weights 1 2 1
//     Gy = (bottom row)   - (top row),      weights 1 2 1
// are formed, and the gradient magnitude is approximated by |Gx| + |Gy|,
// saturated to 255. The magnitude for window centre (x-1, y-1) is written one
// cycle after pixel (x, y) arrived into an output row buffer of IMG_W pixels,
// so once input row y has entered (and the two-cycle pipeline has drained,
// see pipe_busy), the buffer holds result row y-1 for the write-back logic.
// The buffer is read asynchronously (ob_rd_addr/ob_rd_data); its first and
// last columns, which have no full window, read as 0.
//
// clear restarts the raster position at (0, 0) for a new image.
// The Sobel operator follows the document; the |Gx|+|Gy| approximation, the
// saturation and the zero border are this design's choices.
module sobel_core
  import edsoc_pkg::*;
#(
  parameter int unsigned IMG_W = 640,
  parameter int unsigned IMG_H = 480
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       pix_valid,
  input  pix_t                       pix_in,
  input  logic [$clog2(IMG_W)-1:0]   ob_rd_addr,
  output pix_t                       ob_rd_data,
  output logic                       pipe_busy
);
  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned YW = $clog2(IMG_H);

  pix_t lb1 [IMG_W];   // row y-1
  pix_t lb2 [IMG_W];   // row y-2
  pix_t obuf[IMG_W];   // result row

  logic [XW-1:0] x;
  logic [YW-1:0] y;

  // window: win[row][col], row 0 = top (y-2), col 0 = left (x-2)
  pix_t          win [3][3];
  logic          win_valid;
  logic [XW-1:0] win_col;     // centre column of the window

  // raster position and line buffers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0;
      y <= '0;
    end else if (clear) begin
      x <= '0;
      y <= '0;
    end else if (pix_valid) begin
      if (x == XW'(IMG_W - 1)) begin
        x <= '0;
        y <= (y == YW'(IMG_H - 1)) ? '0 : y + 1'b1;
      end else begin
        x <= x + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (pix_valid) begin
      lb1[x] <= pix_in;
      lb2[x] <= lb1[x];
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= lb2[x];
      win[1][2] <= lb1[x];
      win[2][2] <= pix_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_valid <= 1'b0;
      win_col   <= '0;
    end else begin
      win_valid <= pix_valid && !clear && (x >= XW'(2)) && (y >= YW'(2));
      win_col   <= x - 1'b1;
    end
  end

  // gradient
  logic signed [11:0] gx, gy;
  logic        [11:0] ax, ay;
  logic        [12:0] mag;

  always_comb begin
    gx = (12'(win[0][2]) + 12'({win[1][2], 1'b0}) + 12'(win[2][2]))
       - (12'(win[0][0]) + 12'({win[1][0], 1'b0}) + 12'(win[2][0]));
    gy = (12'(win[2][0]) + 12'({win[2][1], 1'b0}) + 12'(win[2][2]))
       - (12'(win[0][0]) + 12'({win[0][1], 1'b0}) + 12'(win[0][2]));
    ax  = gx[11] ? 12'(-gx) : 12'(gx);
    ay  = gy[11] ? 12'(-gy) : 12'(gy);
    mag = 13'(ax) + 13'(ay);
  end

  always_ff @(posedge clk) begin
    if (win_valid) obuf[win_col] <= (mag > 13'd255) ? 8'hFF : mag[7:0];
  end

  assign ob_rd_data = (ob_rd_addr == '0 || ob_rd_addr == XW'(IMG_W - 1)) ? '0 : obuf[ob_rd_addr];
  assign pipe_busy  = pix_valid || win_valid;

endmodule
