// Edge-detection and display subsystem around a processor bus.
//
// A processor (outside this module, on the cpu_* master port) controls two
// hardware IPs through their memory-mapped registers: an edge-detection IP
// that reads a gray-scale image from external memory (mem_* port), computes
// its Sobel gradient magnitude and writes the result image back row by row
// at a second base address, and a display IP that reads a frame buffer from
// the same memory and shows it on a 640x480 @ 60 Hz VGA monitor. Each IP is
// its control registers plus an address generator that masters the bus plus
// the logic proper; plb_bus arbitrates the three masters and decodes the
// addresses (see edsoc_pkg for the map).
//
// Software flow: load the image into memory, write SRC/DST and CTRL.START of
// the edge-detection IP, wait for STATUS.DONE or sobel_irq, then write FB
// and CTRL.ENABLE of the display IP.
//
// The memory port must answer reads in order, at least one cycle after it
// accepted them, and its mem_req_ready must not depend on mem_req_valid.
// The structure follows the document; the bus protocol, register map and
// clocking (one clock, pixel rate = clock / CLK_DIV) are this design's.
module edge_display_soc
  import edsoc_pkg::*;
#(
  parameter int unsigned IMG_W      = 640,
  parameter int unsigned IMG_H      = 480,
  parameter int unsigned CLK_DIV    = 2,
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned TAG_DEPTH  = 16,
  parameter int unsigned COLOR_W    = 8,
  parameter int unsigned H_FP       = 16,
  parameter int unsigned H_SYNC     = 96,
  parameter int unsigned H_BP       = 48,
  parameter int unsigned V_FP       = 10,
  parameter int unsigned V_SYNC     = 2,
  parameter int unsigned V_BP       = 33
) (
  input  logic               clk,
  input  logic               rst_n,
  // processor bus master port
  input  logic               cpu_req_valid,
  input  bus_req_t           cpu_req,
  output logic               cpu_req_ready,
  output logic               cpu_rsp_valid,
  output data_t              cpu_rsp_rdata,
  // external memory port
  output logic               mem_req_valid,
  output bus_req_t           mem_req,
  input  logic               mem_req_ready,
  input  logic               mem_rsp_valid,
  input  data_t              mem_rsp_rdata,
  // interrupt to the processor
  output logic               sobel_irq,
  // monitor
  output logic               vga_hsync_n,
  output logic               vga_vsync_n,
  output logic               vga_de,
  output logic [COLOR_W-1:0] vga_r,
  output logic [COLOR_W-1:0] vga_g,
  output logic [COLOR_W-1:0] vga_b
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH) + 1;

  // bus
  logic     m_req_valid [N_MASTERS];
  bus_req_t m_req       [N_MASTERS];
  logic     m_req_ready [N_MASTERS];
  logic     m_rsp_valid [N_MASTERS];
  data_t    m_rsp_rdata [N_MASTERS];
  logic     r_sel       [2];
  logic     r_we;
  logic [REG_AW-1:0] r_addr;
  data_t    r_wdata;
  data_t    r_rdata     [2];

  plb_bus #(.TAG_DEPTH(TAG_DEPTH)) u_bus (
    .clk, .rst_n,
    .m_req_valid, .m_req, .m_req_ready, .m_rsp_valid, .m_rsp_rdata,
    .mem_req_valid, .mem_req, .mem_req_ready, .mem_rsp_valid, .mem_rsp_rdata,
    .r_sel, .r_we, .r_addr, .r_wdata, .r_rdata
  );

  assign m_req_valid[M_CPU] = cpu_req_valid;
  assign m_req[M_CPU]       = cpu_req;
  assign cpu_req_ready      = m_req_ready[M_CPU];
  assign cpu_rsp_valid      = m_rsp_valid[M_CPU];
  assign cpu_rsp_rdata      = m_rsp_rdata[M_CPU];

  // ---------------- edge-detection IP ----------------
  logic  sb_start, sb_busy, sb_done;
  addr_t sb_src, sb_dst;
  logic  core_clear, pix_valid, core_busy;
  pix_t  pix, ob_data;
  logic [$clog2(IMG_W)-1:0] ob_addr;

  sobel_regs #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_sobel_regs (
    .clk, .rst_n,
    .sel(r_sel[0]), .we(r_we), .addr(r_addr), .wdata(r_wdata), .rdata(r_rdata[0]),
    .start(sb_start), .src_base(sb_src), .dst_base(sb_dst),
    .busy(sb_busy), .done(sb_done), .irq(sobel_irq)
  );

  sobel_addr_gen #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_sobel_ag (
    .clk, .rst_n,
    .start(sb_start), .src_base(sb_src), .dst_base(sb_dst),
    .busy(sb_busy), .done(sb_done),
    .req_valid(m_req_valid[M_SOBEL]), .req(m_req[M_SOBEL]), .req_ready(m_req_ready[M_SOBEL]),
    .rsp_valid(m_rsp_valid[M_SOBEL]), .rsp_rdata(m_rsp_rdata[M_SOBEL]),
    .core_clear, .pix_valid, .pix_out(pix),
    .ob_rd_addr(ob_addr), .ob_rd_data(ob_data), .core_busy
  );

  sobel_core #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_sobel (
    .clk, .rst_n,
    .clear(core_clear), .pix_valid, .pix_in(pix),
    .ob_rd_addr(ob_addr), .ob_rd_data(ob_data), .pipe_busy(core_busy)
  );

  // ---------------- display IP ----------------
  logic          vga_enable, display_en, fifo_flush, vblank_start, underflow;
  addr_t         fb_base;
  logic [CW-1:0] fifo_count;

  vga_regs u_vga_regs (
    .clk, .rst_n,
    .sel(r_sel[1]), .we(r_we), .addr(r_addr), .wdata(r_wdata), .rdata(r_rdata[1]),
    .enable(vga_enable), .fb_base, .underflow, .displaying(display_en)
  );

  vga_addr_gen #(.IMG_W(IMG_W), .IMG_H(IMG_H), .FIFO_DEPTH(FIFO_DEPTH)) u_vga_ag (
    .clk, .rst_n,
    .enable(vga_enable), .fb_base, .vblank_start, .fifo_count,
    .fifo_flush, .display_en,
    .req_valid(m_req_valid[M_VGA]), .req(m_req[M_VGA]), .req_ready(m_req_ready[M_VGA]),
    .rsp_valid(m_rsp_valid[M_VGA])
  );

  vga_controller #(
    .CLK_DIV(CLK_DIV), .FIFO_DEPTH(FIFO_DEPTH), .COLOR_W(COLOR_W),
    .H_ACTIVE(IMG_W), .H_FP(H_FP), .H_SYNC(H_SYNC), .H_BP(H_BP),
    .V_ACTIVE(IMG_H), .V_FP(V_FP), .V_SYNC(V_SYNC), .V_BP(V_BP)
  ) u_vga (
    .clk, .rst_n,
    .display_en, .fifo_flush,
    .pix_push(m_rsp_valid[M_VGA]), .pix_in(m_rsp_rdata[M_VGA][PIX_W-1:0]),
    .fifo_count, .vblank_start, .underflow,
    .vga_hsync_n, .vga_vsync_n, .vga_de, .vga_r, .vga_g, .vga_b
  );

endmodule
