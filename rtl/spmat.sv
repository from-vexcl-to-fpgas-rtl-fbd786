// spmat: sparse matrix-vector product out = scale * A * in, with A in the
// hybrid ELL-CSR (HELL) format.
//
// For every row i < n the kernel walks the ELL part column by column,
// entry i + j*ell_pitch of the column and value matrices for j < ell_w,
// skipping entries whose column index is the padding marker (all ones), and
// then, if the CSR part exists (csr_row argument not zero, the null pointer),
// the CSR entries csr_row[i] .. csr_row[i+1]-1. Each entry adds
// value * in[column] to the row sum; out[i] = scale * sum. This is the loop
// nest of the kernel the document ports; the sequencing, one entry at a time,
// is this design's own.
//
// Memory bundles follow the system diagram of the ported SpMV application:
// port 0 (AXIMM1) ell_col and csr_row, port 1 (AXIMM2) ell_val and csr_col,
// port 2 (AXIMM3) csr_val and out, port 3 (AXIMM4) in. The column index and
// the value of an entry are fetched together on two ports, then in[column].
//
// Numbers: the document runs this kernel in double precision; this design
// uses fixed point instead (values, scale and in as ap_fixed<VW,VI>, sum as
// ap_fixed<AW,AI>, truncation and wrap-around, the vendor defaults the
// document names for its fixed-point SpMV attempt). Column indices and row
// pointers are unsigned 64-bit words; their low 32 bits address memory.
// Arguments (32-bit, buffers are word addresses): 0 n, 1 scale, 2 ell_w,
// 3 ell_pitch, 4 ell_col, 5 ell_val, 6 csr_row, 7 csr_col, 8 csr_val, 9 in,
// 10 out. Pulse `start`; `done` pulses when the last out element is written.
// `ev_pad` / `ev_csr` pulse for each skipped padding entry / CSR entry.
module spmat
  import vexcl_pkg::*;
#(
  parameter int unsigned VW = SPMV_W,
  parameter int unsigned VI = SPMV_I,
  parameter int unsigned AW = SPMV_ACC,
  parameter int unsigned AI = SPMV_ACCI
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        done,
  output logic        idle,
  input  logic [31:0] args [11],
  output mem_req_t    mem_req [4],
  input  mem_rsp_t    mem_rsp [4],
  output logic        stall,
  output logic        ev_pad,
  output logic        ev_csr
);
  localparam int unsigned VF = VW - VI;
  localparam int unsigned AF = AW - AI;
  localparam int unsigned PF = 2 * VF;                  // product fraction bits
  localparam int unsigned SA = (PF > AF) ? PF - AF : 0;
  localparam int unsigned MW = ((AW + SA > 2 * VW) ? AW + SA : 2 * VW) + 1;
  localparam int unsigned OW = VW + AW;                 // scale * sum width
  localparam int unsigned OF = VF + AF;

  typedef enum logic [3:0] {
    S_IDLE, S_ROW, S_ELL, S_ELLR, S_INR, S_MAC, S_CSR0, S_CSR1, S_CSR2,
    S_CSRE, S_CSRR, S_OUT, S_OUTW, S_FIN
  } state_e;
  state_e st;

  logic [31:0] n, scale, ell_w, pitch, ell_col, ell_val, csr_row, csr_col, csr_val, in_b, out_b;
  logic [31:0] i, j, k, ke;
  logic        in_csr, got_a, got_b;
  logic signed [AW-1:0] sum;
  logic signed [VW-1:0] val, xin;

  // memory ports
  logic              p_go [4], p_we [4], p_busy [4], p_done [4], p_stall [4];
  logic [ADDR_W-1:0] p_addr [4];
  logic [DATA_W-1:0] p_wdata [4], p_rdata [4];
  for (genvar p = 0; p < 4; p++) begin : g_port
    mem_port u_port (
      .clk, .rst_n, .go(p_go[p]), .we(p_we[p]), .addr(p_addr[p]), .wdata(p_wdata[p]),
      .busy(p_busy[p]), .done(p_done[p]), .rdata(p_rdata[p]), .stall(p_stall[p]),
      .req(mem_req[p]), .rsp(mem_rsp[p])
    );
  end
  assign stall = p_stall[0] || p_stall[1] || p_stall[2] || p_stall[3];

  // datapath
  logic signed [2*VW-1:0] prod;
  logic signed [MW-1:0]   mac_full;
  logic [AW-1:0]          mac_q;
  logic signed [OW-1:0]   out_full;
  logic [VW-1:0]          out_q;
  logic                   mac_ovf, out_ovf;

  assign prod     = val * xin;
  assign mac_full = (MW'(sum) <<< SA) + (MW'(prod) <<< (AF + SA - PF));
  fx_quant #(.IW(MW), .IF(AF + SA), .OW(AW), .OF(AF), .RND(1'b0), .SAT(1'b0))
    u_q_mac (.din(mac_full), .dout(mac_q), .ovf(mac_ovf));
  assign out_full = $signed(scale[VW-1:0]) * sum;
  fx_quant #(.IW(OW), .IF(OF), .OW(VW), .OF(VF), .RND(1'b0), .SAT(1'b0))
    u_q_out (.din(out_full), .dout(out_q), .ovf(out_ovf));

  assign idle   = (st == S_IDLE);
  assign ev_pad = (st == S_ELLR) && (got_a || p_done[0]) && (got_b || p_done[1]) &&
                  p_rdata[0] == ELL_PAD;
  assign ev_csr = (st == S_MAC) && in_csr;

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      p_go[p] = 1'b0; p_we[p] = 1'b0; p_addr[p] = '0; p_wdata[p] = '0;
    end
    unique case (st)
      S_ELL: if (j != ell_w) begin
        p_go[0] = 1'b1; p_addr[0] = ell_col + i + j * pitch;
        p_go[1] = 1'b1; p_addr[1] = ell_val + i + j * pitch;
      end
      S_ELLR: if ((got_a || p_done[0]) && (got_b || p_done[1]) && p_rdata[0] != ELL_PAD) begin
        p_go[3] = 1'b1; p_addr[3] = in_b + p_rdata[0][31:0];
      end
      S_CSR0: if (csr_row != '0) begin p_go[0] = 1'b1; p_addr[0] = csr_row + i; end
      S_CSR1: if (p_done[0]) begin p_go[0] = 1'b1; p_addr[0] = csr_row + i + 1; end
      S_CSRE: if (k != ke) begin
        p_go[1] = 1'b1; p_addr[1] = csr_col + k;
        p_go[2] = 1'b1; p_addr[2] = csr_val + k;
      end
      S_CSRR: if ((got_a || p_done[1]) && (got_b || p_done[2])) begin
        p_go[3] = 1'b1; p_addr[3] = in_b + p_rdata[1][31:0];
      end
      S_OUT: begin
        p_go[2] = 1'b1; p_we[2] = 1'b1; p_addr[2] = out_b + i;
        p_wdata[2] = DATA_W'($signed(out_q));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; done <= 1'b0;
      {n, scale, ell_w, pitch, ell_col, ell_val, csr_row, csr_col, csr_val, in_b, out_b} <= '0;
      i <= '0; j <= '0; k <= '0; ke <= '0; in_csr <= 1'b0; got_a <= 1'b0; got_b <= 1'b0;
      sum <= '0; val <= '0; xin <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          n <= args[0]; scale <= args[1]; ell_w <= args[2]; pitch <= args[3];
          ell_col <= args[4]; ell_val <= args[5]; csr_row <= args[6]; csr_col <= args[7];
          csr_val <= args[8]; in_b <= args[9]; out_b <= args[10];
          i  <= '0;
          st <= S_ROW;
        end
        S_ROW: begin
          sum    <= '0;
          j      <= '0;
          in_csr <= 1'b0;
          st     <= (i == n) ? S_FIN : S_ELL;
        end
        S_ELL: begin
          got_a <= 1'b0; got_b <= 1'b0;
          st    <= (j == ell_w) ? S_CSR0 : S_ELLR;
        end
        S_ELLR: begin
          if (p_done[0]) got_a <= 1'b1;
          if (p_done[1]) begin got_b <= 1'b1; val <= p_rdata[1][VW-1:0]; end
          if ((got_a || p_done[0]) && (got_b || p_done[1])) begin
            if (p_rdata[0] == ELL_PAD) begin
              j  <= j + 1;
              st <= S_ELL;
            end else begin
              st <= S_INR;
            end
          end
        end
        S_INR: if (p_done[3]) begin
          xin <= p_rdata[3][VW-1:0];
          st  <= S_MAC;
        end
        S_MAC: begin
          sum <= mac_q;
          if (in_csr) begin k <= k + 1; st <= S_CSRE; end
          else        begin j <= j + 1; st <= S_ELL;  end
        end
        S_CSR0: begin
          in_csr <= 1'b1;
          st     <= (csr_row == '0) ? S_OUT : S_CSR1;
        end
        S_CSR1: if (p_done[0]) begin k <= p_rdata[0][31:0]; st <= S_CSR2; end
        S_CSR2: if (p_done[0]) begin ke <= p_rdata[0][31:0]; st <= S_CSRE; end
        S_CSRE: begin
          got_a <= 1'b0; got_b <= 1'b0;
          st    <= (k == ke) ? S_OUT : S_CSRR;
        end
        S_CSRR: begin
          if (p_done[1]) got_a <= 1'b1;
          if (p_done[2]) begin got_b <= 1'b1; val <= p_rdata[2][VW-1:0]; end
          if ((got_a || p_done[1]) && (got_b || p_done[2])) st <= S_INR;
        end
        S_OUT: st <= S_OUTW;
        S_OUTW: if (p_done[2]) begin
          i  <= i + 1;
          st <= S_ROW;
        end
        S_FIN: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
