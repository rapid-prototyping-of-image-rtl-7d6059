// Read/write address generation of the edge-detection IP.
//
// A start pulse (from the control register) makes it fetch the source image
// row by row from src_base over the system bus and stream the returned pixels
// into the Sobel datapath. After each row y >= 1 has been fetched and the
// datapath has drained, result row y-1 is written back, pixel by pixel, to
// dst_base + (y-1)*IMG_W. Rows 0 and IMG_H-1 of the result have no full 3x3
// window and are written as 0; after the last row done pulses for one cycle.
//
// Reads are pipelined: requests go out back to back while the bus accepts
// them, and responses, which come back in order, are counted until the row
// is complete. Writes are posted. The row-wise write-back to a second base
// address follows the document; the sequencing (fetch a row, then write a
// row, without overlap) is this design's choice.
module sobel_addr_gen
  import edsoc_pkg::*;
#(
  parameter int unsigned IMG_W = 640,
  parameter int unsigned IMG_H = 480
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // control
  input  logic                      start,
  input  addr_t                     src_base,
  input  addr_t                     dst_base,
  output logic                      busy,
  output logic                      done,
  // bus master
  output logic                      req_valid,
  output bus_req_t                  req,
  input  logic                      req_ready,
  input  logic                      rsp_valid,
  input  data_t                     rsp_rdata,
  // Sobel datapath
  output logic                      core_clear,
  output logic                      pix_valid,
  output pix_t                      pix_out,
  output logic [$clog2(IMG_W)-1:0]  ob_rd_addr,
  input  pix_t                      ob_rd_data,
  input  logic                      core_busy
);
  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned YW = $clog2(IMG_H);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_DRAIN, S_WRITE, S_DONE} state_e;
  state_e state;

  logic [YW-1:0] row;        // row being fetched
  logic [YW-1:0] wrow;       // result row being written
  logic [XW:0]   issued;     // read requests accepted in this row
  logic [XW:0]   received;   // read responses received in this row
  logic [XW-1:0] wcol;       // column being written
  addr_t         src_row;    // src_base + row*IMG_W
  addr_t         dst_row;    // dst_base + wrow*IMG_W
  logic          last_write; // the zero row IMG_H-1 is being written

  logic rd_fire, wr_fire;
  assign rd_fire = (state == S_READ)  && req_valid && req_ready;
  assign wr_fire = (state == S_WRITE) && req_valid && req_ready;

  always_comb begin
    req_valid = 1'b0;
    req       = '0;
    if (state == S_READ && issued != (XW+1)'(IMG_W)) begin
      req_valid = 1'b1;
      req.we    = 1'b0;
      req.addr  = src_row + addr_t'(issued);
    end else if (state == S_WRITE) begin
      req_valid = 1'b1;
      req.we    = 1'b1;
      req.addr  = dst_row + addr_t'(wcol);
      req.wdata = (wrow == '0 || last_write) ? '0 : data_t'(ob_rd_data);
    end
  end

  assign ob_rd_addr = wcol;
  assign pix_valid  = rsp_valid && (state == S_READ);
  assign pix_out    = rsp_rdata[PIX_W-1:0];
  assign core_clear = start && (state == S_IDLE || state == S_DONE);
  assign busy       = (state != S_IDLE) && (state != S_DONE);
  assign done       = (state == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      row        <= '0;
      wrow       <= '0;
      issued     <= '0;
      received   <= '0;
      wcol       <= '0;
      src_row    <= '0;
      dst_row    <= '0;
      last_write <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state      <= S_READ;
            row        <= '0;
            wrow       <= '0;
            issued     <= '0;
            received   <= '0;
            wcol       <= '0;
            src_row    <= src_base;
            dst_row    <= dst_base;
            last_write <= 1'b0;
          end else begin
            state <= S_IDLE;
          end
        end
        S_READ: begin
          if (rd_fire) issued <= issued + 1'b1;
          if (rsp_valid) begin
            received <= received + 1'b1;
            if (received == (XW+1)'(IMG_W - 1)) begin
              issued   <= '0;
              received <= '0;
              src_row  <= src_row + addr_t'(IMG_W);
              if (row == '0) begin
                row <= row + 1'b1;      // no result row yet
              end else begin
                state <= S_DRAIN;
              end
            end
          end
        end
        S_DRAIN: begin
          if (!core_busy) begin
            state <= S_WRITE;
            wcol  <= '0;
          end
        end
        S_WRITE: begin
          if (wr_fire) begin
            if (wcol == XW'(IMG_W - 1)) begin
              wcol    <= '0;
              wrow    <= wrow + 1'b1;
              dst_row <= dst_row + addr_t'(IMG_W);
              if (last_write) begin
                state <= S_DONE;
              end else if (row == YW'(IMG_H - 1)) begin
                last_write <= 1'b1;     // zero bottom row follows
              end else begin
                row   <= row + 1'b1;
                state <= S_READ;
              end
            end else begin
              wcol <= wcol + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // no read response may arrive outside a row fetch
  a_rsp_in_read: assert property (@(posedge clk) disable iff (!rst_n)
    rsp_valid |-> state == S_READ);

endmodule
