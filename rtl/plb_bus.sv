// System bus: connects the processor and the two IP address generators to
// the external memory and to the two IPs' register blocks.
//
// Three masters (index 0 display, 1 processor, 2 edge detection) request with
// req_valid/req; a fixed-priority arbiter grants one per cycle, the display
// first because it must keep up with the monitor. The granted request goes
// to the target chosen by its address (edsoc_pkg::decode): the memory port,
// or one of the two register ports. req_ready tells the master its request
// was taken in this cycle.
//
// Memory reads are pipelined: for each one the master's index enters a
// routing queue (TAG_DEPTH entries), and each memory response, which the
// memory returns in order, goes to the master at the head of the queue.
// Register reads answer one cycle after the grant. A register read is held
// off while the same master still has memory reads in flight, so every
// master gets its responses in request order. Reads of unmapped addresses
// return 0; writes to them are dropped. Writes are posted.
// The document only names the bus (a processor local bus); this protocol is
// this design's own simplified one.
module plb_bus
  import edsoc_pkg::*;
#(
  parameter int unsigned TAG_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // masters
  input  logic              m_req_valid [N_MASTERS],
  input  bus_req_t          m_req       [N_MASTERS],
  output logic              m_req_ready [N_MASTERS],
  output logic              m_rsp_valid [N_MASTERS],
  output data_t             m_rsp_rdata [N_MASTERS],
  // memory
  output logic              mem_req_valid,
  output bus_req_t          mem_req,
  input  logic              mem_req_ready,
  input  logic              mem_rsp_valid,
  input  data_t             mem_rsp_rdata,
  // register ports: 0 edge-detection IP, 1 display IP
  output logic              r_sel   [2],
  output logic              r_we,
  output logic [REG_AW-1:0] r_addr,
  output data_t             r_wdata,
  input  data_t             r_rdata [2]
);
  localparam int unsigned CNTW = $clog2(TAG_DEPTH) + 1;

  // per-master memory reads in flight
  logic [CNTW-1:0] pending [N_MASTERS];

  // routing queue
  logic [1:0] tag_head;
  logic       tag_empty, tag_full;

  // eligibility of each master's request
  logic    can_go [N_MASTERS];
  target_e tgt    [N_MASTERS];

  always_comb begin
    for (int m = 0; m < N_MASTERS; m++) begin
      tgt[m] = decode(m_req[m].addr);
      unique case (tgt[m])
        T_MEM:   can_go[m] = mem_req_ready && (m_req[m].we || !tag_full);
        default: can_go[m] = m_req[m].we || pending[m] == '0;
      endcase
    end
  end

  // fixed-priority grant
  logic       gnt_valid;
  logic [1:0] gnt;
  always_comb begin
    gnt_valid = 1'b0;
    gnt       = '0;
    for (int m = N_MASTERS - 1; m >= 0; m--) begin
      if (m_req_valid[m] && can_go[m]) begin
        gnt_valid = 1'b1;
        gnt       = 2'(m);
      end
    end
  end

  bus_req_t g_req;
  target_e  g_tgt;
  assign g_req = m_req[gnt];
  assign g_tgt = tgt[gnt];

  always_comb begin
    for (int m = 0; m < N_MASTERS; m++) m_req_ready[m] = gnt_valid && (gnt == 2'(m));
  end

  // memory port
  assign mem_req_valid = gnt_valid && (g_tgt == T_MEM);
  assign mem_req       = g_req;

  logic mem_rd_fire;
  assign mem_rd_fire = mem_req_valid && !g_req.we;   // mem_req_ready is part of the grant

  // register ports
  assign r_sel[0] = gnt_valid && (g_tgt == T_SOBEL);
  assign r_sel[1] = gnt_valid && (g_tgt == T_VGA);
  assign r_we     = g_req.we;
  assign r_addr   = g_req.addr[REG_AW-1:0];
  assign r_wdata  = g_req.wdata;

  // routing queue of memory read owners
  sync_fifo #(.WIDTH(2), .DEPTH(TAG_DEPTH)) u_tags (
    .clk, .rst_n,
    .flush(1'b0),
    .push(mem_rd_fire),
    .din(gnt),
    .pop(mem_rsp_valid),
    .dout(tag_head),
    .empty(tag_empty),
    .full(tag_full),
    .count()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < N_MASTERS; m++) pending[m] <= '0;
    end else begin
      for (int m = 0; m < N_MASTERS; m++) begin
        pending[m] <= pending[m]
                    + CNTW'(mem_rd_fire && gnt == 2'(m))
                    - CNTW'(mem_rsp_valid && tag_head == 2'(m));
      end
    end
  end

  // register read response, one cycle after the grant
  logic       rr_valid;
  logic [1:0] rr_master;
  data_t      rr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_valid  <= 1'b0;
      rr_master <= '0;
      rr_data   <= '0;
    end else begin
      rr_valid  <= gnt_valid && !g_req.we && (g_tgt != T_MEM);
      rr_master <= gnt;
      unique case (g_tgt)
        T_SOBEL: rr_data <= r_rdata[0];
        T_VGA:   rr_data <= r_rdata[1];
        default: rr_data <= '0;
      endcase
    end
  end

  // response routing
  always_comb begin
    for (int m = 0; m < N_MASTERS; m++) begin
      m_rsp_valid[m] = 1'b0;
      m_rsp_rdata[m] = '0;
      if (mem_rsp_valid && tag_head == 2'(m)) begin
        m_rsp_valid[m] = 1'b1;
        m_rsp_rdata[m] = mem_rsp_rdata;
      end else if (rr_valid && rr_master == 2'(m)) begin
        m_rsp_valid[m] = 1'b1;
        m_rsp_rdata[m] = rr_data;
      end
    end
  end

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rsp_valid |-> !tag_empty);
  a_no_rsp_clash: assert property (@(posedge clk) disable iff (!rst_n)
    !(mem_rsp_valid && rr_valid && tag_head == rr_master));

endmodule
