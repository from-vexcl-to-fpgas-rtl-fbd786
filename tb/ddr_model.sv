// ddr_model: behavioural model of the off-chip DDR memory seen through the
// kernels' memory ports (not synthesizable intent; testbench only).
//
// NP request/response ports share one word array of DEPTH 64-bit words, so
// a buffer written through one port can be read through another. Each port
// accepts one request at a time: `ready` is withheld at random (ready
// probability READY_PCT percent) and a read answers after a random latency of
// 1..MAX_LAT cycles. Writes take effect when accepted. Out-of-range addresses
// read as zero and are counted in `bad_addr`.
module ddr_model
  import vexcl_pkg::*;
#(
  parameter int NP        = 3,
  parameter int DEPTH     = 4096,
  parameter int MAX_LAT   = 6,
  parameter int READY_PCT = 70
) (
  input  logic     clk,
  input  mem_req_t req [NP],
  output mem_rsp_t rsp [NP]
);
  logic [DATA_W-1:0] mem [DEPTH];
  int  lat   [NP];
  bit  pend  [NP];
  logic [DATA_W-1:0] pdata [NP];
  bit  rdy   [NP];
  int  bad_addr = 0;
  longint accepted = 0;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    for (int p = 0; p < NP; p++) begin pend[p] = 0; lat[p] = 0; rdy[p] = 0; end
  end

  always_comb begin
    for (int p = 0; p < NP; p++) begin
      rsp[p].ready  = rdy[p] && !pend[p];
      rsp[p].rvalid = pend[p] && lat[p] == 0;
      rsp[p].rdata  = pdata[p];
    end
  end

  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      rdy[p] <= ($urandom_range(99) < READY_PCT);
      if (pend[p]) begin
        if (lat[p] == 0) pend[p] <= 0;
        else lat[p] <= lat[p] - 1;
      end else if (req[p].valid && rsp[p].ready) begin
        accepted <= accepted + 1;
        if (req[p].addr >= DEPTH) begin
          bad_addr <= bad_addr + 1;
          if (!req[p].we) begin pend[p] <= 1; lat[p] <= 0; pdata[p] <= '0; end
        end else if (req[p].we) begin
          mem[req[p].addr] <= req[p].wdata;
        end else begin
          pend[p]  <= 1;
          lat[p]   <= $urandom_range(MAX_LAT - 1);
          pdata[p] <= mem[req[p].addr];
        end
      end
    end
  end
endmodule
