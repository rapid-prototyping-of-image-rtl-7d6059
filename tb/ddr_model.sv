// Behavioural model of the external memory behind its controller, for
// testbenches only (not synthesizable as written).
//
// Byte-wide array of MEM_BYTES; a write stores wdata[7:0] at addr, a read
// returns the byte at addr in rdata[7:0] exactly LAT cycles after the request
// was taken, in order. req_ready is low in a random STALL_PCT percent of
// cycles (set through the stall_pct input), independent of req_valid.
// Testbenches load and inspect images through the mem array directly.
module ddr_model
  import edsoc_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 1 << 20,
  parameter int unsigned LAT       = 3
) (
  input  logic      clk,
  input  logic      rst_n,
  input  int        stall_pct,
  input  logic      req_valid,
  input  bus_req_t  req,
  output logic      req_ready,
  output logic      rsp_valid,
  output data_t     rsp_rdata
);
  logic [7:0] mem [MEM_BYTES];

  logic  pv [LAT];
  data_t pd [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) req_ready <= 1'b0;
    else        req_ready <= ($urandom_range(99) >= stall_pct);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin
        pv[i] <= 1'b0;
        pd[i] <= '0;
      end
    end else begin
      pv[0] <= req_valid && req_ready && !req.we;
      pd[0] <= {24'd0, mem[req.addr % MEM_BYTES]};
      for (int i = 1; i < LAT; i++) begin
        pv[i] <= pv[i-1];
        pd[i] <= pd[i-1];
      end
      if (req_valid && req_ready && req.we) mem[req.addr % MEM_BYTES] <= req.wdata[7:0];
    end
  end

  assign rsp_valid = pv[LAT-1];
  assign rsp_rdata = pd[LAT-1];

  initial for (int i = 0; i < MEM_BYTES; i++) mem[i] = '0;
endmodule
