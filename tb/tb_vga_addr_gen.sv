// Testbench of vga_addr_gen with the memory model (30 % random stalls,
// latency 3) and a pixel buffer that a random consumer empties, standing in
// for the display controller. vblank_start pulses every 400 cycles.
//   frame 1: enabled, base 0x100, all 12 pixels consumed
//   frame 2: enabled, base 0x200, consumer stops after 5 pixels: exactly
//            5 + DEPTH reads may be issued (buffer credit), never more
//   frame 3: disabled: no reads, display_en low
//   frame 4: enabled, base 0x100 again, all pixels consumed
// In every frame the read addresses must run from the base upward and the
// consumed pixels must equal memory contents at those addresses; the buffer
// must never be pushed while full.
module tb_vga_addr_gen;
  import edsoc_pkg::*;
  localparam int W = 4, H = 3, NPIX = W * H, DEPTH = 4;
  localparam int CW = $clog2(DEPTH) + 1;

  logic clk = 0, rst_n = 0;
  logic enable = 0;
  addr_t fb_base = 0;
  logic vblank_start = 0;
  logic [CW-1:0] fifo_count;
  logic fifo_flush, display_en;
  logic req_valid, req_ready, rsp_valid;
  bus_req_t req;
  data_t rsp_rdata;
  int stall_pct = 30;
  int checks = 0, failures = 0;

  vga_addr_gen #(.IMG_W(W), .IMG_H(H), .FIFO_DEPTH(DEPTH)) dut (.*);
  ddr_model #(.MEM_BYTES(4096), .LAT(3)) u_mem (
    .clk, .rst_n, .stall_pct, .req_valid, .req, .req_ready, .rsp_valid, .rsp_rdata);

  logic pop = 0, empty, full;
  pix_t dout;
  sync_fifo #(.WIDTH(8), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n, .flush(fifo_flush), .push(rsp_valid), .din(rsp_rdata[7:0]),
    .pop, .dout, .empty, .full, .count(fifo_count));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int frame = 0;
  int reads = 0, pops = 0, pop_limit = 0;
  int addr_err = 0, data_err = 0, overflow = 0;
  addr_t exp_base = 0;

  always @(posedge clk) if (rst_n) begin
    if (req_valid && req_ready) begin
      if (req.addr != exp_base + addr_t'(reads) || req.we) addr_err++;
      reads++;
    end
    if (rsp_valid && full) overflow++;
    if (pop) begin
      if (dout != u_mem.mem[exp_base + pops]) data_err++;
      pops++;
    end
  end

  // random consumer
  always @(negedge clk) pop = !empty && !fifo_flush && display_en && pops < pop_limit && $urandom_range(1) == 1;

  task automatic check(int got, int want, string what);
    checks++;
    if (got != want) begin failures++; $display("frame %0d %s: got %0d want %0d", frame, what, got, want); end
  endtask

  task automatic next_frame(logic en, addr_t base, int consume);
    @(negedge clk);
    enable = en; fb_base = base;
    vblank_start = 1;
    @(negedge clk);
    vblank_start = 0;
    // the generator samples base and enable once in-flight reads are done
    while (fifo_flush !== 1'b1) @(negedge clk);
    frame++;
    reads = 0; pops = 0; pop_limit = consume;
    exp_base = base;
    @(negedge clk);
    enable = !en; fb_base = base ^ 32'h0F00;   // later changes must not matter
    repeat (400) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) @(negedge clk);
    check(reads, 0, "reads before the first frame");
    next_frame(1, 32'h100, NPIX);
    check(reads, NPIX, "reads"); check(pops, NPIX, "pixels consumed"); check(display_en, 1, "display_en");
    next_frame(1, 32'h200, 5);
    check(reads, 5 + DEPTH, "reads with stalled consumer"); check(pops, 5, "pixels consumed");
    next_frame(0, 32'h300, NPIX);
    check(reads, 0, "reads while disabled"); check(display_en, 0, "display_en");
    next_frame(1, 32'h100, NPIX);
    check(reads, NPIX, "reads"); check(pops, NPIX, "pixels consumed");
    check(addr_err, 0, "address errors");
    check(data_err, 0, "data errors");
    check(overflow, 0, "pushes into a full buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
