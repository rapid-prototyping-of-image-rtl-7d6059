// Testbench of sobel_addr_gen: the generator drives a sobel_core and talks
// directly to the memory model (random stalls, latency 3). Images of 8 x 6
// random pixels are placed at a source address; after start, the result
// area is compared pixel by pixel with a Sobel magnitude computed here, with
// rows/columns at the border equal to 0. It also checks that nothing outside
// the result area is written, that busy is high while it works, that done
// pulses exactly once per image, and that the run ends in a bounded number
// of cycles. Two images are processed back to back.
module tb_sobel_addr_gen;
  import edsoc_pkg::*;
  localparam int W = 8, H = 6;
  localparam int SRC = 'h100, DST = 'h400;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  addr_t src_base = SRC, dst_base = DST;
  logic busy, done;
  logic req_valid, req_ready, rsp_valid;
  bus_req_t req;
  data_t rsp_rdata;
  logic core_clear, pix_valid, core_busy;
  pix_t pix_out, ob_rd_data;
  logic [$clog2(W)-1:0] ob_rd_addr;
  int stall_pct = 30;
  int checks = 0, failures = 0;

  sobel_addr_gen #(.IMG_W(W), .IMG_H(H)) dut (.*);
  sobel_core #(.IMG_W(W), .IMG_H(H)) u_core (
    .clk, .rst_n, .clear(core_clear), .pix_valid, .pix_in(pix_out),
    .ob_rd_addr, .ob_rd_data, .pipe_busy(core_busy));
  ddr_model #(.MEM_BYTES(4096), .LAT(3)) u_mem (
    .clk, .rst_n, .stall_pct, .req_valid, .req, .req_ready, .rsp_valid, .rsp_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int done_count = 0;
  int stray_writes = 0;
  always @(posedge clk) begin
    if (done) done_count++;
    if (req_valid && req_ready && req.we && (req.addr < DST || req.addr >= DST + W*H)) stray_writes++;
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

  task automatic run_image();
    int cycles = 0;
    int d0 = done_count;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        img[y][x] = $urandom_range(255);
        u_mem.mem[SRC + y*W + x] = 8'(img[y][x]);
        u_mem.mem[DST + y*W + x] = 8'hA5;
      end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    checks++;
    if (!busy) begin failures++; $display("busy not set after start"); end
    while (!done) begin @(negedge clk); cycles++; end
    @(negedge clk);
    checks++;
    if (done_count != d0 + 1 || busy) begin
      failures++; $display("done pulses %0d busy %0b", done_count - d0, busy);
    end
    // each pixel is read once and written once; with 30% stalls allow 3x
    checks++;
    if (cycles > 3 * 2 * W * H + 20 * H) begin
      failures++; $display("took %0d cycles", cycles);
    end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        checks++;
        if (int'(u_mem.mem[DST + y*W + x]) != ref_mag(x, y)) begin
          failures++;
          $display("result (%0d,%0d) got %0d want %0d", x, y, u_mem.mem[DST + y*W + x], ref_mag(x, y));
        end
      end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    run_image();
    stall_pct = 0;
    run_image();
    checks++;
    if (stray_writes != 0) begin failures++; $display("%0d stray writes", stray_writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
