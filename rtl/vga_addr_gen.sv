// Read address generation of the display IP.
//
// Once per frame, at the start of vertical blanking (vblank_start), it waits
// until all its reads in flight have returned, empties the pixel buffer,
// samples the enable bit and the frame buffer base, and then, if enabled,
// reads the IMG_W*IMG_H pixels of the frame buffer in raster order over the
// system bus. A read is only issued while the pixel buffer has room for it
// together with all reads still in flight, so returned pixels never overflow
// the buffer. display_en tells the controller whether the coming frame shows
// fetched pixels (1) or black (0). Restarting at every frame keeps the
// display aligned with the frame buffer even after an underflow.
// Fetching the frame buffer for the display is the document's; the per-frame
// restart and the credit rule are this design's choices.
module vga_addr_gen
  import edsoc_pkg::*;
#(
  parameter int unsigned IMG_W      = 640,
  parameter int unsigned IMG_H      = 480,
  parameter int unsigned FIFO_DEPTH = 64,
  localparam int unsigned CW        = $clog2(FIFO_DEPTH) + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  addr_t         fb_base,
  input  logic          vblank_start,
  input  logic [CW-1:0] fifo_count,
  output logic          fifo_flush,
  output logic          display_en,
  // bus master
  output logic          req_valid,
  output bus_req_t      req,
  input  logic          req_ready,
  input  logic          rsp_valid
);
  localparam int unsigned NPIX = IMG_W * IMG_H;

  typedef enum logic {S_FETCH, S_RESYNC} state_e;
  state_e        state;
  addr_t         ptr;
  logic [31:0]   remaining;
  logic [CW-1:0] outstanding;
  logic          fire;

  assign req_valid = (state == S_FETCH) && (remaining != '0) && !vblank_start
                   && ((CW+1)'(fifo_count) + (CW+1)'(outstanding) < (CW+1)'(FIFO_DEPTH));
  assign req       = '{we: 1'b0, addr: ptr, wdata: '0};
  assign fire      = req_valid && req_ready;
  assign fifo_flush = (state == S_RESYNC) && (outstanding == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_FETCH;
      ptr         <= '0;
      remaining   <= '0;
      outstanding <= '0;
      display_en  <= 1'b0;
    end else begin
      outstanding <= outstanding + CW'(fire) - CW'(rsp_valid);
      if (fire) begin
        ptr       <= ptr + 1'b1;
        remaining <= remaining - 1'b1;
      end
      if (vblank_start) begin
        state <= S_RESYNC;
      end else if (state == S_RESYNC && outstanding == '0) begin
        state      <= S_FETCH;
        ptr        <= fb_base;
        remaining  <= enable ? 32'(NPIX) : '0;
        display_en <= enable;
      end
    end
  end

  a_no_rsp_underrun: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid |-> outstanding != '0);

endmodule
