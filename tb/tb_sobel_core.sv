// Testbench of sobel_core on a small image (8 x 6) of random pixels, plus an
// all-white image that must saturate nowhere and a step image that must
// saturate. Pixels are fed with random gaps; after each row y >= 2 has gone
// in and the pipeline has drained, every column of the result row y-1 is
// read and compared with a Sobel magnitude computed here from the image.
module tb_sobel_core;
  import edsoc_pkg::*;
  localparam int W = 8, H = 6;

  logic clk = 0, rst_n = 0;
  logic clear = 0, pix_valid = 0;
  pix_t pix_in = 0;
  logic [$clog2(W)-1:0] ob_rd_addr = 0;
  pix_t ob_rd_data;
  logic pipe_busy;
  int checks = 0, failures = 0;

  sobel_core #(.IMG_W(W), .IMG_H(H)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int img [H][W];

  function automatic int ref_mag(int x, int y);
    int gx, gy;
    if (x == 0 || x == W-1 || y == 0 || y == H-1) return 0;
    gx = (img[y-1][x+1] + 2*img[y][x+1] + img[y+1][x+1])
       - (img[y-1][x-1] + 2*img[y][x-1] + img[y+1][x-1]);
    gy = (img[y+1][x-1] + 2*img[y+1][x] + img[y+1][x+1])
       - (img[y-1][x-1] + 2*img[y-1][x] + img[y-1][x+1]);
    gx = gx < 0 ? -gx : gx;
    gy = gy < 0 ? -gy : gy;
    return (gx + gy > 255) ? 255 : gx + gy;
  endfunction

  task automatic run_image(int kind);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        case (kind)
          0: img[y][x] = $urandom_range(255);
          1: img[y][x] = 255;
          default: img[y][x] = (x >= W/2) ? 255 : 0;
        endcase
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        while ($urandom_range(3) == 0) begin pix_valid = 0; @(negedge clk); end
        pix_valid = 1; pix_in = pix_t'(img[y][x]);
        @(negedge clk);
      end
      pix_valid = 0;
      @(negedge clk);
      while (pipe_busy) @(negedge clk);
      if (y >= 2) begin
        for (int x = 0; x < W; x++) begin
          ob_rd_addr = x[$clog2(W)-1:0];
          #1;
          checks++;
          if (int'(ob_rd_data) != ref_mag(x, y-1)) begin
            failures++;
            $display("kind %0d row %0d col %0d: got %0d want %0d", kind, y-1, x, ob_rd_data, ref_mag(x, y-1));
          end
        end
        @(negedge clk);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3; k++) run_image(0);
    run_image(1);
    run_image(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
