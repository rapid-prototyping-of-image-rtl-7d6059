// Software accessible control and status registers of the edge-detection IP.
//
// The processor reaches them over the system bus (register port: sel, we,
// addr offset, wdata; rdata is combinational and sampled by the bus).
//   0x00 CTRL   [0] START: writing 1 starts processing of one image if the
//               IP is idle; it reads 1 while processing runs and returns to
//               0 by itself. [1] IRQ_EN: interrupt enable.
//   0x04 STATUS [0] DONE: set when an image is complete, cleared by writing 1.
//               [1] BUSY (read only).
//   0x08 SRC    source image base address
//   0x0C DST    result image base address
//   0x10 SIZE   [31:16] image height, [15:0] image width (read only)
// irq is DONE and IRQ_EN. A start bit, a completion bit and a completion
// interrupt are the document's; offsets and the other fields are this
// design's choices.
module sobel_regs
  import edsoc_pkg::*;
#(
  parameter int unsigned IMG_W = 640,
  parameter int unsigned IMG_H = 480
) (
  input  logic              clk,
  input  logic              rst_n,
  // register port
  input  logic              sel,
  input  logic              we,
  input  logic [REG_AW-1:0] addr,
  input  data_t             wdata,
  output data_t             rdata,
  // to / from the address generator
  output logic              start,
  output addr_t             src_base,
  output addr_t             dst_base,
  input  logic              busy,
  input  logic              done,
  output logic              irq
);
  logic irq_en;
  logic done_flag;

  logic wr;
  assign wr    = sel && we;
  assign start = wr && (addr == SOBEL_CTRL) && wdata[0] && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_en    <= 1'b0;
      done_flag <= 1'b0;
      src_base  <= '0;
      dst_base  <= '0;
    end else begin
      if (wr && addr == SOBEL_CTRL) irq_en <= wdata[1];
      if (wr && addr == SOBEL_SRC)  src_base <= wdata;
      if (wr && addr == SOBEL_DST)  dst_base <= wdata;
      if (done)
        done_flag <= 1'b1;
      else if (wr && addr == SOBEL_STATUS && wdata[0])
        done_flag <= 1'b0;
      else if (start)
        done_flag <= 1'b0;
    end
  end

  always_comb begin
    unique case (addr)
      SOBEL_CTRL:   rdata = {30'd0, irq_en, busy};
      SOBEL_STATUS: rdata = {30'd0, busy, done_flag};
      SOBEL_SRC:    rdata = src_base;
      SOBEL_DST:    rdata = dst_base;
      SOBEL_SIZE:   rdata = {16'(IMG_H), 16'(IMG_W)};
      default:      rdata = '0;
    endcase
  end

  assign irq = done_flag && irq_en;

endmodule
