// Behavioural model of the shared external memory (DDR) as seen through
// NPORTS independent byte-wide request/response ports (sgm_pkg::mem_req_t /
// mem_rsp_t). Each port accepts a request when the model raises ready
// (always, or randomly when STALL is set) and returns read data LAT clocks
// later, in order. All ports see one byte array; the test bench fills and
// inspects it through the mem array directly.
module ddr_model
  import sgm_pkg::*;
#(
  parameter int unsigned NPORTS = 1,
  parameter int unsigned SIZE   = 1 << 16,
  parameter int unsigned LAT    = 3,
  parameter bit          STALL  = 1'b0
) (
  input  logic     clk,
  input  mem_req_t req [NPORTS],
  output mem_rsp_t rsp [NPORTS]
);
  logic [7:0] mem [SIZE];
  logic       rdy [NPORTS];
  logic       pv  [NPORTS][LAT];
  logic [7:0] pd  [NPORTS][LAT];
  int         n_reads = 0, n_writes = 0;

  initial begin
    for (int p = 0; p < NPORTS; p++) begin
      rdy[p] = 1'b1;
      for (int i = 0; i < LAT; i++) begin pv[p][i] = 1'b0; pd[p][i] = '0; end
    end
  end

  always_comb
    for (int p = 0; p < NPORTS; p++) begin
      rsp[p].ready  = rdy[p];
      rsp[p].rvalid = pv[p][LAT-1];
      rsp[p].rdata  = pd[p][LAT-1];
    end

  always @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      for (int i = LAT - 1; i > 0; i--) begin
        pv[p][i] <= pv[p][i-1];
        pd[p][i] <= pd[p][i-1];
      end
      pv[p][0] <= 1'b0;
      if (req[p].valid && rdy[p]) begin
        if (req[p].addr >= SIZE) $display("ddr_model: port %0d address %0h out of range", p, req[p].addr);
        else if (req[p].we) begin
          mem[req[p].addr] <= req[p].wdata;
          n_writes++;
        end else begin
          pv[p][0] <= 1'b1;
          pd[p][0] <= mem[req[p].addr];
          n_reads++;
        end
      end
      rdy[p] <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;
    end
  end
endmodule
