// Software accessible control and status registers of the display IP.
//
//   0x00 CTRL   [0] ENABLE: 1 makes the display IP fetch the frame buffer
//               and show it; taken over at the next frame boundary.
//   0x04 STATUS [0] UNDERFLOW: set when a visible pixel found the pixel
//               buffer empty, cleared by writing 1. [1] DISPLAYING (read only).
//   0x08 FB     frame buffer base address
// Register port as for the edge-detection IP (sel, we, addr, wdata; rdata is
// combinational). The enable bit is the document's; the other fields and
// the offsets are this design's choices.
module vga_regs
  import edsoc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sel,
  input  logic              we,
  input  logic [REG_AW-1:0] addr,
  input  data_t             wdata,
  output data_t             rdata,
  output logic              enable,
  output addr_t             fb_base,
  input  logic              underflow,
  input  logic              displaying
);
  logic uflow_flag;
  logic wr;
  assign wr = sel && we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable     <= 1'b0;
      fb_base    <= '0;
      uflow_flag <= 1'b0;
    end else begin
      if (wr && addr == VGA_CTRL) enable  <= wdata[0];
      if (wr && addr == VGA_FB)   fb_base <= wdata;
      if (underflow)
        uflow_flag <= 1'b1;
      else if (wr && addr == VGA_STATUS && wdata[0])
        uflow_flag <= 1'b0;
    end
  end

  always_comb begin
    unique case (addr)
      VGA_CTRL:   rdata = {31'd0, enable};
      VGA_STATUS: rdata = {30'd0, displaying, uflow_flag};
      VGA_FB:     rdata = fb_base;
      default:    rdata = '0;
    endcase
  end

endmodule
