// Testbench of plb_bus: three random masters issue reads and writes to their
// own memory regions (memory model with 20 % random stalls, latency 3); the
// processor master also reads and writes both register blocks (modelled here
// as small register files) and reads an unmapped address. Every read
// response is compared with a shadow copy kept here, in request order per
// master. It also checks that at most one master is granted per cycle, that
// the display master (highest priority) is never passed over for a memory
// write while the memory is ready, that contention actually happens, and that
// every read gets exactly one response.
module tb_plb_bus;
  import edsoc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic     m_req_valid [N_MASTERS];
  bus_req_t m_req       [N_MASTERS];
  logic     m_req_ready [N_MASTERS];
  logic     m_rsp_valid [N_MASTERS];
  data_t    m_rsp_rdata [N_MASTERS];
  logic     mem_req_valid, mem_req_ready, mem_rsp_valid;
  bus_req_t mem_req;
  data_t    mem_rsp_rdata;
  logic     r_sel [2];
  logic     r_we;
  logic [REG_AW-1:0] r_addr;
  data_t    r_wdata;
  data_t    r_rdata [2];
  int stall_pct = 20;
  int checks = 0, failures = 0;

  plb_bus #(.TAG_DEPTH(8)) dut (.*);
  ddr_model #(.MEM_BYTES(4096), .LAT(3)) u_mem (
    .clk, .rst_n, .stall_pct, .req_valid(mem_req_valid), .req(mem_req),
    .req_ready(mem_req_ready), .rsp_valid(mem_rsp_valid), .rsp_rdata(mem_rsp_rdata));

  // register blocks
  data_t regf [2][64];
  always_comb for (int k = 0; k < 2; k++) r_rdata[k] = regf[k][r_addr[7:2]];
  always @(posedge clk) for (int k = 0; k < 2; k++) if (r_sel[k] && r_we) regf[k][r_addr[7:2]] <= r_wdata;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] shadow_mem [4096];
  data_t      shadow_reg [2][64];
  data_t      expq [N_MASTERS][$];
  logic       running = 0;
  int rsp_err = 0, multi_gnt = 0, prio_err = 0, contention = 0, reads = 0, rsps = 0, reg_reads = 0;

  function automatic bus_req_t new_req(int m);
    bus_req_t r;
    int kind;
    kind = (m == 1) ? $urandom_range(9) : $urandom_range(5);
    r.we    = $urandom_range(1);
    r.wdata = $urandom;
    r.addr  = addr_t'(m * 256 + $urandom_range(31));
    if (kind >= 8) r.addr = (kind == 8 ? SOBEL_REG_BASE : VGA_REG_BASE) + addr_t'(4 * $urandom_range(15));
    if (kind == 7) begin r.addr = 32'h9000_0000; r.we = 0; end
    return r;
  endfunction

  // masters: drive after the negedge, hold until accepted
  always @(negedge clk) if (rst_n) begin
    for (int m = 0; m < N_MASTERS; m++) begin
      if (m_req_valid[m] && m_req_ready[m]) m_req_valid[m] = 1'b0;
      if (!m_req_valid[m] && running && $urandom_range(2) != 0) begin
        m_req[m] = new_req(m);
        m_req_valid[m] = 1'b1;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    int ng, nv;
    target_e t;
    ng = 0;
    nv = 0;
    for (int m = 0; m < N_MASTERS; m++) begin
      if (m_req_valid[m]) nv++;
      if (m_req_ready[m]) begin
        ng++;
        if (!m_req_valid[m]) multi_gnt++;
      end
    end
    if (ng > 1) multi_gnt++;
    if (nv > 1) contention++;
    if (m_req_valid[0] && m_req[0].we && !m_req[0].addr[31] && mem_req_ready && !m_req_ready[0]) prio_err++;
    // responses, checked against values expected at acceptance
    for (int m = 0; m < N_MASTERS; m++) begin
      if (m_rsp_valid[m]) begin
        rsps++;
        if (expq[m].size() == 0) rsp_err++;
        else if (expq[m].pop_front() != m_rsp_rdata[m]) rsp_err++;
      end
    end
    // acceptance updates the shadow copies
    for (int m = 0; m < N_MASTERS; m++) begin
      if (m_req_valid[m] && m_req_ready[m]) begin
        t = decode(m_req[m].addr);
        if (m_req[m].we) begin
          if (t == T_MEM) shadow_mem[m_req[m].addr[11:0]] = m_req[m].wdata[7:0];
          else if (t == T_SOBEL) shadow_reg[0][m_req[m].addr[7:2]] = m_req[m].wdata;
          else if (t == T_VGA)   shadow_reg[1][m_req[m].addr[7:2]] = m_req[m].wdata;
        end else begin
          reads++;
          if (t == T_MEM) expq[m].push_back({24'd0, shadow_mem[m_req[m].addr[11:0]]});
          else begin
            reg_reads++;
            if (t == T_SOBEL)    expq[m].push_back(shadow_reg[0][m_req[m].addr[7:2]]);
            else if (t == T_VGA) expq[m].push_back(shadow_reg[1][m_req[m].addr[7:2]]);
            else                 expq[m].push_back('0);
          end
        end
      end
    end
  end

  task automatic check(int got, int want, string what);
    checks++;
    if (got != want) begin failures++; $display("%s: got %0d want %0d", what, got, want); end
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) begin u_mem.mem[i] = 8'(i * 7); shadow_mem[i] = 8'(i * 7); end
    for (int k = 0; k < 2; k++) for (int i = 0; i < 64; i++) begin regf[k][i] = '0; shadow_reg[k][i] = '0; end
    for (int m = 0; m < N_MASTERS; m++) begin m_req_valid[m] = 0; m_req[m] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    running = 1;
    repeat (5000) @(negedge clk);
    running = 0;
    repeat (50) @(negedge clk);
    check(rsp_err, 0, "response errors");
    check(rsps, reads, "responses vs reads");
    check(multi_gnt, 0, "grant errors");
    check(prio_err, 0, "priority errors");
    for (int m = 0; m < N_MASTERS; m++) check(expq[m].size(), 0, "missing responses");
    checks++;
    if (contention < 100 || reg_reads < 50) begin
      failures++; $display("too little traffic: contention %0d, register reads %0d", contention, reg_reads);
    end
    $display("reads %0d register reads %0d contention cycles %0d", reads, reg_reads, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
