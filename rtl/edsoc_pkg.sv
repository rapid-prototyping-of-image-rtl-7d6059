// Shared types and constants of the edge-detection and display system.
//
// The system bus is a simple pipelined request/response bus: a master
// presents a request (bus_req_t) with req_valid and it is taken in the cycle
// req_ready is high. Writes are posted (no response). Every read returns
// exactly one response cycle (rsp_valid with rsp_rdata), in request order.
// Addresses are byte addresses; one transfer carries one 8-bit pixel in
// bits [7:0] of the 32-bit data, or one 32-bit register value.
//
// Address map (this design's choice):
//   0x0000_0000 - 0x7FFF_FFFF  external memory (frame buffers)
//   0x8000_0000 - 0x8000_0FFF  edge-detection IP registers
//   0x8000_1000 - 0x8000_1FFF  display IP registers
package edsoc_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned PIX_W  = 8;
  localparam int unsigned REG_AW = 8;   // register offset width inside a block

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [PIX_W-1:0]  pix_t;

  typedef struct packed {
    logic  we;
    addr_t addr;
    data_t wdata;
  } bus_req_t;

  // bus masters, listed in falling priority
  typedef enum logic [1:0] {
    M_VGA   = 2'd0,
    M_CPU   = 2'd1,
    M_SOBEL = 2'd2
  } master_e;
  localparam int unsigned N_MASTERS = 3;

  // bus targets
  typedef enum logic [1:0] {
    T_MEM   = 2'd0,
    T_SOBEL = 2'd1,
    T_VGA   = 2'd2,
    T_NONE  = 2'd3
  } target_e;

  localparam addr_t SOBEL_REG_BASE = 32'h8000_0000;
  localparam addr_t VGA_REG_BASE   = 32'h8000_1000;

  // edge-detection IP register offsets
  localparam logic [REG_AW-1:0] SOBEL_CTRL   = 8'h00; // [0] start/busy, [1] irq enable
  localparam logic [REG_AW-1:0] SOBEL_STATUS = 8'h04; // [0] done (write 1 to clear), [1] busy
  localparam logic [REG_AW-1:0] SOBEL_SRC    = 8'h08; // source image base address
  localparam logic [REG_AW-1:0] SOBEL_DST    = 8'h0C; // result image base address
  localparam logic [REG_AW-1:0] SOBEL_SIZE   = 8'h10; // [31:16] height, [15:0] width (read only)

  // display IP register offsets
  localparam logic [REG_AW-1:0] VGA_CTRL     = 8'h00; // [0] enable
  localparam logic [REG_AW-1:0] VGA_STATUS   = 8'h04; // [0] underflow (write 1 to clear), [1] displaying
  localparam logic [REG_AW-1:0] VGA_FB       = 8'h08; // frame buffer base address

  function automatic target_e decode(addr_t a);
    if (!a[31])                        return T_MEM;
    if (a[31:12] == SOBEL_REG_BASE[31:12]) return T_SOBEL;
    if (a[31:12] == VGA_REG_BASE[31:12])   return T_VGA;
    return T_NONE;
  endfunction

endpackage
