// End-to-end testbench of edge_display_soc at its default size (640 x 480
// image and screen, 50 MHz clock, 25 MHz pixel rate), acting as the
// processor on the cpu_* port and with the memory model on the mem_* port.
//
//  1. Image A is loaded into memory behind the design's back. The processor
//     programs SRC/DST, sets START with the interrupt enabled and waits for
//     the interrupt. The result in memory is compared pixel by pixel with a
//     Sobel magnitude computed here, and the run time with the bound
//     2 x 640 x 480 transfers plus a small per-row overhead.
//  2. The display is pointed at the result and enabled; one whole frame on
//     the VGA outputs is captured and compared with the same image.
//  3. While it is displayed, image B is processed (edge detection and
//     display share the bus), then the display switches to B's result and a
//     frame is checked again.
//  4. The memory is slowed down (95 % stalls) for a frame: the display must
//     report underflow; with full speed restored the next frame must be
//     correct again (per-frame resynchronisation).
//  5. The display is disabled: a frame must be all black.
// Each mechanism (interrupt, back-to-back images, concurrent bus use,
// underflow, resynchronisation, display switch, disable) is counted and a
// failure is counted for any that never happened.
module tb_edge_display_soc;
  import edsoc_pkg::*;
  localparam int W = 640, H = 480, NPIX = W * H;
  localparam int SRC_A = 'h00000, SRC_B = 'h4B000, DST_A = 'h96000, DST_B = 'hE1000;

  logic clk = 0, rst_n = 0;
  logic cpu_req_valid = 0, cpu_req_ready, cpu_rsp_valid;
  bus_req_t cpu_req = '0;
  data_t cpu_rsp_rdata;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  bus_req_t mem_req;
  data_t mem_rsp_rdata;
  logic sobel_irq;
  logic vga_hsync_n, vga_vsync_n, vga_de;
  logic [7:0] vga_r, vga_g, vga_b;
  int stall_pct = 0;
  int checks = 0, failures = 0;

  edge_display_soc dut (.*);
  ddr_model #(.MEM_BYTES(1 << 21), .LAT(3)) u_mem (
    .clk, .rst_n, .stall_pct, .req_valid(mem_req_valid), .req(mem_req),
    .req_ready(mem_req_ready), .rsp_valid(mem_rsp_valid), .rsp_rdata(mem_rsp_rdata));

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- processor bus functional model ----------------
  task automatic cpu_access(logic we, addr_t a, data_t d, output data_t rd);
    @(negedge clk);
    cpu_req_valid = 1; cpu_req = '{we: we, addr: a, wdata: d};
    #1;
    while (!cpu_req_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cpu_req_valid = 0;
    rd = '0;
    if (!we) begin
      #1;
      while (!cpu_rsp_valid) begin @(negedge clk); #1; end
      rd = cpu_rsp_rdata;
    end
  endtask

  task automatic cpu_wr(addr_t a, data_t d);
    data_t unused;
    cpu_access(1, a, d, unused);
  endtask

  task automatic cpu_rd(addr_t a, output data_t d);
    cpu_access(0, a, '0, d);
  endtask

  // ---------------- reference ----------------
  logic [7:0] ref_a [NPIX];
  logic [7:0] ref_b [NPIX];

  function automatic int pix(int base, int x, int y);
    return int'(u_mem.mem[base + y * W + x]);
  endfunction

  task automatic make_ref(int base, output logic [7:0] r [NPIX]);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int gx, gy;
        if (x == 0 || x == W-1 || y == 0 || y == H-1) r[y*W+x] = 0;
        else begin
          gx = (pix(base,x+1,y-1) + 2*pix(base,x+1,y) + pix(base,x+1,y+1))
             - (pix(base,x-1,y-1) + 2*pix(base,x-1,y) + pix(base,x-1,y+1));
          gy = (pix(base,x-1,y+1) + 2*pix(base,x,y+1) + pix(base,x+1,y+1))
             - (pix(base,x-1,y-1) + 2*pix(base,x,y-1) + pix(base,x+1,y-1));
          gx = gx < 0 ? -gx : gx;
          gy = gy < 0 ? -gy : gy;
          r[y*W+x] = (gx + gy > 255) ? 8'd255 : 8'(gx + gy);
        end
      end
  endtask

  // ---------------- monitor capture ----------------
  logic tdiv = 0;            // mirrors the divide-by-2 pixel tick
  logic tick_q = 0;
  always @(posedge clk) begin
    tdiv   <= rst_n ? !tdiv : 1'b0;
    tick_q <= rst_n && tdiv;
  end

  logic [7:0] cap [NPIX];
  int  cap_n = 0;
  int  last_n = 0;   // visible pixels of the last complete frame
  logic vs_q = 1;
  int  vsync_falls = 0;
  int  gray_err = 0;
  always @(posedge clk) if (tick_q) begin
    if (vs_q && !vga_vsync_n) begin vsync_falls++; last_n = cap_n; cap_n = 0; end
    vs_q = vga_vsync_n;
    if (vga_de) begin
      if (cap_n < NPIX) cap[cap_n] = vga_r;
      if (vga_g != vga_r || vga_b != vga_r) gray_err++;
      cap_n++;
    end
  end

  task automatic wait_vsync();
    int v = vsync_falls;
    wait (vsync_falls != v);
  endtask

  // capture the first frame that starts after a change made now
  task automatic capture_frame();
    wait_vsync();
    wait_vsync();
    wait_vsync();
  endtask

  task automatic compare_frame(input logic [7:0] r [NPIX], string what);
    int bad = 0;
    for (int i = 0; i < NPIX; i++) if (cap[i] != r[i]) bad++;
    check(bad == 0, $sformatf("%s: %0d of %0d pixels differ", what, bad, NPIX));
  endtask

  // ---------------- mechanism counters ----------------
  int n_irq = 0, n_images = 0, n_concurrent = 0, n_underflow = 0, n_resync = 0, n_switch = 0, n_disable = 0;
  logic irq_q = 0;
  int last_src_rd = -1000, last_fb_rd = -1000, cyc = 0;
  addr_t fb_now = DST_A;
  always @(posedge clk) begin
    cyc++;
    if (sobel_irq && !irq_q) n_irq++;
    irq_q <= sobel_irq;
    if (mem_req_valid && mem_req_ready && !mem_req.we) begin
      if (mem_req.addr >= SRC_A && mem_req.addr < SRC_B + NPIX) last_src_rd = cyc;
      else last_fb_rd = cyc;
      if (mem_req.addr == fb_now) n_resync++;
    end
    if (last_src_rd == cyc && cyc - last_fb_rd < 8) n_concurrent++;
  end

  // ---------------- one image through the edge-detection IP ----------------
  task automatic run_sobel(addr_t src, addr_t dst, input logic [7:0] r [NPIX], logic bound_check);
    data_t d;
    int t0, bad;
    cpu_wr(SOBEL_REG_BASE + SOBEL_SRC, src);
    cpu_wr(SOBEL_REG_BASE + SOBEL_DST, dst);
    cpu_rd(SOBEL_REG_BASE + SOBEL_SRC, d);
    check(d == src, "SRC read back");
    cpu_wr(SOBEL_REG_BASE + SOBEL_CTRL, 32'h3);
    t0 = cyc;
    cpu_rd(SOBEL_REG_BASE + SOBEL_STATUS, d);
    check(d[1] == 1'b1, "busy while processing");
    wait (sobel_irq);
    if (bound_check)
      check(cyc - t0 <= 2 * NPIX + 20 * H,
            $sformatf("processing time %0d cycles within %0d", cyc - t0, 2 * NPIX + 20 * H));
    $display("image at %h processed in %0d cycles", src, cyc - t0);
    cpu_rd(SOBEL_REG_BASE + SOBEL_STATUS, d);
    check(d == 32'h1, "STATUS done, not busy");
    cpu_wr(SOBEL_REG_BASE + SOBEL_STATUS, 32'h1);
    @(negedge clk);
    check(!sobel_irq, "interrupt cleared");
    bad = 0;
    for (int i = 0; i < NPIX; i++) if (u_mem.mem[dst + i] != r[i]) bad++;
    check(bad == 0, $sformatf("result image in memory: %0d pixels differ", bad));
    n_images++;
  endtask

  initial begin
    data_t d;
    // image A: blocks with noise; image B: diagonal bands
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        u_mem.mem[SRC_A + y*W + x] = 8'((((x / 40) + (y / 30)) % 2 == 1 ? 180 : 40) + $urandom_range(15));
        u_mem.mem[SRC_B + y*W + x] = 8'(((x + 2 * y) / 24) % 3 * 100 + $urandom_range(7));
      end
    make_ref(SRC_A, ref_a);
    make_ref(SRC_B, ref_b);
    repeat (4) @(negedge clk);
    rst_n = 1;

    cpu_rd(SOBEL_REG_BASE + SOBEL_SIZE, d);
    check(d == {16'(H), 16'(W)}, "SIZE register");

    // 1. edge detection of A, display idle
    run_sobel(SRC_A, DST_A, ref_a, 1'b1);

    // 2. display A's result
    cpu_wr(VGA_REG_BASE + VGA_FB, DST_A);
    cpu_wr(VGA_REG_BASE + VGA_CTRL, 32'h1);
    capture_frame();
    check(last_n == NPIX, $sformatf("visible pixels per frame %0d", last_n));
    compare_frame(ref_a, "frame showing A");

    // 3. process B while A is shown, then switch
    run_sobel(SRC_B, DST_B, ref_b, 1'b0);
    cpu_rd(VGA_REG_BASE + VGA_STATUS, d);
    check(d == 32'h2, "displaying without underflow during shared bus use");
    cpu_wr(VGA_REG_BASE + VGA_FB, DST_B);
    fb_now = DST_B;
    n_switch++;
    capture_frame();
    compare_frame(ref_b, "frame showing B");

    // 4. starve the display
    stall_pct = 95;
    wait_vsync();
    wait_vsync();
    stall_pct = 0;
    cpu_rd(VGA_REG_BASE + VGA_STATUS, d);
    check(d[0] == 1'b1, "underflow reported under slow memory");
    if (d[0]) n_underflow++;
    cpu_wr(VGA_REG_BASE + VGA_STATUS, 32'h1);
    capture_frame();
    compare_frame(ref_b, "frame after recovery");
    cpu_rd(VGA_REG_BASE + VGA_STATUS, d);
    check(d == 32'h2, "no underflow after recovery");

    // 5. disable
    cpu_wr(VGA_REG_BASE + VGA_CTRL, 32'h0);
    n_disable++;
    capture_frame();
    begin
      int nonblack = 0;
      for (int i = 0; i < NPIX; i++) if (cap[i] != 0) nonblack++;
      check(nonblack == 0, "disabled display is black");
    end
    check(gray_err == 0, "r, g and b equal");

    $display("mechanisms: irq %0d images %0d concurrent %0d underflow %0d resync %0d switch %0d disable %0d",
             n_irq, n_images, n_concurrent, n_underflow, n_resync, n_switch, n_disable);
    check(n_irq >= 2, "interrupt happened");
    check(n_images >= 2, "back-to-back images happened");
    check(n_concurrent > 0, "concurrent bus use happened");
    check(n_underflow > 0, "underflow happened");
    check(n_resync >= 3, "per-frame restart happened");
    check(n_switch > 0 && n_disable > 0, "display switch and disable happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
