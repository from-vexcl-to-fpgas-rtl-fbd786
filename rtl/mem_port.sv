// mem_port: one outstanding access on a kernel memory master.
//
// The kernel pulses `go` with a word address, a write flag and write data.
// The block raises the request until the memory accepts it (ready), then,
// for a read, waits for the response (rvalid) and returns its data in
// `rdata`; `done` pulses when the write has been accepted or the read data
// has arrived, and `rdata` holds until the next read. `busy` is high from
// `go` to `done`. Every cycle the kernel waits here is a memory stall;
// `stall` is high during those cycles. One access at a time per port is this
// design's own simplification; the document leaves the memory traffic to the
// synthesis tool's AXI4 master.
module mem_port
  import vexcl_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              go,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic              busy,
  output logic              done,
  output logic [DATA_W-1:0] rdata,
  output logic              stall,
  output mem_req_t          req,
  input  mem_rsp_t          rsp
);
  typedef enum logic [1:0] {P_IDLE, P_REQ, P_WAIT} pstate_e;
  pstate_e st;

  assign busy  = (st != P_IDLE);
  assign stall = busy && !done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= P_IDLE;
      req   <= '0;
      done  <= 1'b0;
      rdata <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        P_IDLE: if (go) begin
          req.valid <= 1'b1;
          req.we    <= we;
          req.addr  <= addr;
          req.wdata <= wdata;
          st        <= P_REQ;
        end
        P_REQ: if (rsp.ready) begin
          req.valid <= 1'b0;
          if (req.we) begin
            done <= 1'b1;
            st   <= P_IDLE;
          end else begin
            st   <= P_WAIT;
          end
        end
        P_WAIT: if (rsp.rvalid) begin
          rdata <= rsp.rdata;
          done  <= 1'b1;
          st    <= P_IDLE;
        end
        default: st <= P_IDLE;
      endcase
    end
  end

  // A request, once raised, stays up and unchanged until accepted.
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
    req.valid && !rsp.ready |=> req.valid && $stable(req.addr) && $stable(req.we));
endmodule
