// phi: the element-wise kernel of the SpMV application,
//   out[idx] = (u1 - u2 + log(u3) * log(u3) * sin(u1)) / (u1 * u2)
// for idx < n, with u1, u2, u3 the three tagged input vectors.
//
// Per element the kernel reads u1, u2 and u3 at once on three memory ports,
// starts the logarithm of u3 and the sine of u1 side by side (fx_log,
// fx_sin), forms log^2(u3) and u1*u2, then log^2*sin and the numerator, and
// divides (signed, rounded toward minus infinity, with a shared sequential
// divider) before writing the result on the fourth port.
//
// Memory bundles follow the system diagram of the ported application:
// port 0 (AXIMM1) u1, port 1 (AXIMM2) u2, port 2 (AXIMM3) u3, port 3 (AXIMM4)
// out. Arguments: 0 n, 1 out, 2 u1, 3 u2, 4 u3 (word addresses).
//
// Numbers: the document runs this kernel in double precision; this design
// uses ap_fixed<VW,VI> with truncation and wrap-around for every stored
// intermediate value, the vendor defaults the document names for its
// fixed-point attempt. Log of a non-positive value gives the most negative
// value; a zero divisor gives the largest value of the numerator's sign.
// Interface: pulse `start`; `done` pulses after the last element is
// written. Each element takes about VW+VF+F+10 cycles plus memory latency.
module phi
  import vexcl_pkg::*;
#(
  parameter int unsigned VW = SPMV_W,
  parameter int unsigned VI = SPMV_I
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        done,
  output logic        idle,
  input  logic [31:0] args [5],
  output mem_req_t    mem_req [4],
  input  mem_rsp_t    mem_rsp [4],
  output logic        stall,
  output logic        ev_div0        // a zero divisor was met
);
  localparam int unsigned VF = VW - VI;
  localparam int unsigned DW = VW + VF;                   // divider width

  typedef enum logic [3:0] {S_IDLE, S_EL, S_RD, S_FN, S_A1, S_A2, S_DIV, S_DIVW, S_WR, S_WRW, S_FIN} state_e;
  state_e st;

  logic [31:0] n, out_b, u1_b, u2_b, u3_b, idx;
  logic signed [VW-1:0] u1, u2, u3, lg, sn, l2, den, num, res;
  logic g0, g1, g2, gl, gs;

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

  // function units
  logic fn_go, lg_busy, lg_done, lg_bad, sn_busy, sn_done;
  logic [VW-1:0] lg_y, sn_y;
  fx_log #(.W(VW), .F(VF)) u_log (.clk, .rst_n, .start(fn_go), .x(u3), .busy(lg_busy),
                                  .done(lg_done), .y(lg_y), .bad(lg_bad));
  fx_sin #(.W(VW), .F(VF)) u_sin (.clk, .rst_n, .start(fn_go), .x(u1), .busy(sn_busy),
                                  .done(sn_done), .y(sn_y));

  // products, each truncated and wrapped to the value format
  logic [VW-1:0] l2_q, ls_q, den_q, num_q;
  logic          l2_o, ls_o, den_o, num_o;
  logic signed [2*VW-1:0] l2_f, ls_f, den_f;
  logic signed [VW+1:0]   num_f;
  assign l2_f  = lg * lg;
  assign ls_f  = l2 * sn;
  assign den_f = u1 * u2;
  fx_quant #(.IW(2*VW), .IF(2*VF), .OW(VW), .OF(VF), .RND(1'b0), .SAT(1'b0))
    u_q_l2 (.din(l2_f), .dout(l2_q), .ovf(l2_o));
  fx_quant #(.IW(2*VW), .IF(2*VF), .OW(VW), .OF(VF), .RND(1'b0), .SAT(1'b0))
    u_q_ls (.din(ls_f), .dout(ls_q), .ovf(ls_o));
  fx_quant #(.IW(2*VW), .IF(2*VF), .OW(VW), .OF(VF), .RND(1'b0), .SAT(1'b0))
    u_q_den (.din(den_f), .dout(den_q), .ovf(den_o));
  assign num_f = (VW+2)'(u1) - (VW+2)'(u2) + (VW+2)'($signed(ls_q));
  fx_quant #(.IW(VW+2), .IF(VF), .OW(VW), .OF(VF), .RND(1'b0), .SAT(1'b0))
    u_q_num (.din(num_f), .dout(num_q), .ovf(num_o));

  // signed division on magnitudes: q = floor(num * 2^VF / den)
  logic          dv_go, dv_busy, dv_done;
  logic [DW-1:0] dv_num, dv_den, dv_quo, dv_rem, q_mag;
  logic          q_neg;
  logic signed [DW:0] q_s;
  assign q_neg  = num[VW-1] ^ den[VW-1];
  assign dv_num = DW'(num[VW-1] ? -{{VF{num[VW-1]}}, num} : {{VF{1'b0}}, num}) << VF;
  assign dv_den = den[VW-1] ? DW'(-den) : DW'(den);
  udiv_seq #(.W(DW)) u_div (.clk, .rst_n, .start(dv_go), .num(dv_num), .den(dv_den),
                            .busy(dv_busy), .done(dv_done), .quo(dv_quo), .rem(dv_rem));
  assign q_mag = dv_quo + DW'(q_neg && dv_rem != '0);
  assign q_s   = q_neg ? -$signed({1'b0, q_mag}) : $signed({1'b0, q_mag});

  assign idle    = (st == S_IDLE);
  assign ev_div0 = (st == S_DIVW) && dv_done && den == '0;
  assign fn_go   = (st == S_FN) && !gl && !gs && !lg_busy && !sn_busy && !lg_done && !sn_done;

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      p_go[p] = 1'b0; p_we[p] = 1'b0; p_addr[p] = '0; p_wdata[p] = '0;
    end
    dv_go = (st == S_DIV);
    if (st == S_EL && idx != n) begin
      p_go[0] = 1'b1; p_addr[0] = u1_b + idx;
      p_go[1] = 1'b1; p_addr[1] = u2_b + idx;
      p_go[2] = 1'b1; p_addr[2] = u3_b + idx;
    end
    if (st == S_WR) begin
      p_go[3] = 1'b1; p_we[3] = 1'b1; p_addr[3] = out_b + idx;
      p_wdata[3] = DATA_W'(res);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; done <= 1'b0;
      {n, out_b, u1_b, u2_b, u3_b, idx} <= '0;
      {u1, u2, u3, lg, sn, l2, den, num, res} <= '0;
      {g0, g1, g2, gl, gs} <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          n <= args[0]; out_b <= args[1]; u1_b <= args[2]; u2_b <= args[3]; u3_b <= args[4];
          idx <= '0;
          st  <= S_EL;
        end
        S_EL: begin
          {g0, g1, g2} <= '0;
          st <= (idx == n) ? S_FIN : S_RD;
        end
        S_RD: begin
          if (p_done[0]) begin u1 <= p_rdata[0][VW-1:0]; g0 <= 1'b1; end
          if (p_done[1]) begin u2 <= p_rdata[1][VW-1:0]; g1 <= 1'b1; end
          if (p_done[2]) begin u3 <= p_rdata[2][VW-1:0]; g2 <= 1'b1; end
          if ((g0 || p_done[0]) && (g1 || p_done[1]) && (g2 || p_done[2])) begin
            {gl, gs} <= '0;
            st <= S_FN;
          end
        end
        S_FN: begin
          if (lg_done) begin lg <= lg_y; gl <= 1'b1; end
          if (sn_done) begin sn <= sn_y; gs <= 1'b1; end
          if ((gl || lg_done) && (gs || sn_done)) st <= S_A1;
        end
        S_A1: begin
          l2  <= l2_q;
          den <= den_q;
          st  <= S_A2;
        end
        S_A2: begin
          num <= num_q;
          st  <= S_DIV;
        end
        S_DIV: st <= S_DIVW;
        S_DIVW: if (dv_done) begin
          if (den == '0)
            res <= num[VW-1] ? {1'b1, {(VW-1){1'b0}}} : {1'b0, {(VW-1){1'b1}}};
          else
            res <= q_s[VW-1:0];
          st <= S_WR;
        end
        S_WR: st <= S_WRW;
        S_WRW: if (p_done[3]) begin
          idx <= idx + 1;
          st  <= S_EL;
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
