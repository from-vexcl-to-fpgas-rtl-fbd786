// affinetrans: the affine-transformation kernel, t = y + A x.
//
// It runs the loop nest of the VexCL-generated kernel, unchanged in its
// index arithmetic: for every output element idx < n
//   ptr1 = start + (idx mod length0) * stride0
//   for i1 < length1, ptr2 = ptr1 + i1 * stride1:
//     sum += A[ptr2] * x[slice1 * (((slice2 + ptr2) / slice3) mod slice4)]
//   t[idx] = y[idx] + sum
// so the same hardware serves any reshape/reduce argument set the host
// passes (for a row-major m x n matrix: start 0, length0 m, stride0 n,
// length1 n, stride1 1, slice1 1, slice2 0, slice3 1, slice4 n).
//
// Arithmetic follows the document's fixed-point version of the kernel:
// A, x and y are ap_fixed<18,7> (AP_RND, AP_SAT), the running sum and t are
// ap_fixed<64,54> (AP_RND, AP_SAT). Each product is added at full precision
// and the sum is then rounded and saturated to the sum format, as an
// assignment to the sum variable does. Memory bundles follow the document's
// "common optimizations": t on interface 1 (port 0), y and A on interface 2
// (port 1), x on interface 3 (port 2), so that A[ptr2] and its x element are
// fetched at the same time on different ports.
//
// The inside is this design's own: a sequential FSM, one matrix element at a
// time, with a shared sequential divider for the division and the two
// modulo operations (about 2*(W+1) cycles per element plus memory latency).
// Interface: pulse `start` (arguments are sampled then), `done` pulses once
// t has been written; `sat` pulses when a stored sum or result was clamped.
// Arguments are 32-bit, buffer arguments are word
// addresses of element 0. Memory words are 64 bits; a fixed-point element
// sits sign-extended in the low bits of its word.
module affinetrans
  import vexcl_pkg::*;
#(
  parameter int unsigned FW  = FIX_W,    // fix_t width
  parameter int unsigned FI  = FIX_I,    // fix_t integer bits
  parameter int unsigned LW  = LFIX_W,   // lfix_t width
  parameter int unsigned LI  = LFIX_I    // lfix_t integer bits
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        done,
  output logic        idle,
  input  logic [31:0] args [14],
  output mem_req_t    mem_req [3],
  input  mem_rsp_t    mem_rsp [3],
  output logic        stall,         // waiting on memory
  output logic        sat            // a rounded sum or result saturated
);
  localparam int unsigned FF = FW - FI;            // fraction bits of fix_t
  localparam int unsigned LF = LW - LI;            // fraction bits of lfix_t
  localparam int unsigned PW = 2 * FW;             // product width
  localparam int unsigned PF = 2 * FF;             // product fraction bits
  localparam int unsigned SA = (PF > LF) ? PF - LF : 0;   // sum alignment
  localparam int unsigned MW = LW + SA + 1;        // mac adder width
  localparam int unsigned YA = (FF > LF) ? FF - LF : 0;
  localparam int unsigned TW = LW + YA + 1;        // final adder width
  localparam int unsigned TF = (FF > LF) ? FF : LF;

  typedef enum logic [3:0] {
    S_IDLE, S_ROW, S_DIV0, S_ELEM, S_DIV1, S_DIV2, S_RD, S_MAC, S_Y, S_WRG, S_WR, S_FIN
  } state_e;
  state_e st;

  // latched arguments
  logic [31:0] n, t_b, y_b, a_b, x_b, sl1, sl2, sl3, sl4, r_start, len0, str0, len1, str1;
  logic [31:0] idx, i1, ptr2;
  logic signed [LW-1:0] sum;

  // divider
  logic        dv_go, dv_busy, dv_done;
  logic [31:0] dv_num, dv_den, dv_quo, dv_rem;
  udiv_seq #(.W(32)) u_div (
    .clk, .rst_n, .start(dv_go), .num(dv_num), .den(dv_den),
    .busy(dv_busy), .done(dv_done), .quo(dv_quo), .rem(dv_rem)
  );

  // memory ports
  logic              p_go [3], p_we [3], p_busy [3], p_done [3], p_stall [3];
  logic [ADDR_W-1:0] p_addr [3];
  logic [DATA_W-1:0] p_wdata [3], p_rdata [3];
  for (genvar p = 0; p < 3; p++) begin : g_port
    mem_port u_port (
      .clk, .rst_n, .go(p_go[p]), .we(p_we[p]), .addr(p_addr[p]), .wdata(p_wdata[p]),
      .busy(p_busy[p]), .done(p_done[p]), .rdata(p_rdata[p]), .stall(p_stall[p]),
      .req(mem_req[p]), .rsp(mem_rsp[p])
    );
  end
  assign stall = p_stall[0] || p_stall[1] || p_stall[2];

  // datapath: sum + A*x, rounded/saturated to lfix_t
  logic signed [FW-1:0] a_v, x_v, y_v;
  logic signed [PW-1:0] prod;
  logic signed [MW-1:0] mac_full;
  logic [LW-1:0]        mac_q, t_q;
  logic signed [TW-1:0] t_full;
  logic                 mac_ovf, t_ovf;
  logic                 got_a, got_x;

  assign prod     = a_v * x_v;
  assign mac_full = (MW'(sum) <<< SA) + (MW'(prod) <<< (LF + SA - PF));
  fx_quant #(.IW(MW), .IF(LF + SA), .OW(LW), .OF(LF), .RND(1'b1), .SAT(1'b1))
    u_q_mac (.din(mac_full), .dout(mac_q), .ovf(mac_ovf));

  assign t_full = (TW'(sum) <<< YA) + (TW'(y_v) <<< (TF - FF));
  fx_quant #(.IW(TW), .IF(TF), .OW(LW), .OF(LF), .RND(1'b1), .SAT(1'b1))
    u_q_t (.din(t_full), .dout(t_q), .ovf(t_ovf));

  assign idle = (st == S_IDLE);
  assign sat  = (st == S_MAC && i1 != len1 && mac_ovf) || (st == S_WRG && t_ovf);

  always_comb begin
    for (int p = 0; p < 3; p++) begin
      p_go[p] = 1'b0; p_we[p] = 1'b0; p_addr[p] = '0; p_wdata[p] = '0;
    end
    dv_go = 1'b0; dv_num = '0; dv_den = '0;
    unique case (st)
      S_ROW:  if (idx != n) begin dv_go = 1'b1; dv_num = idx; dv_den = len0; end
      S_ELEM: if (i1 != len1) begin dv_go = 1'b1; dv_num = sl2 + ptr2; dv_den = sl3; end
      S_DIV1: if (dv_done) begin dv_go = 1'b1; dv_num = dv_quo; dv_den = sl4; end
      S_DIV2: if (dv_done) begin
        p_go[1] = 1'b1; p_addr[1] = a_b + ptr2;
        p_go[2] = 1'b1; p_addr[2] = x_b + sl1 * dv_rem;
      end
      S_MAC:  if (i1 == len1) begin p_go[1] = 1'b1; p_addr[1] = y_b + idx; end
      S_WRG:  begin
        p_go[0] = 1'b1; p_we[0] = 1'b1; p_addr[0] = t_b + idx;
        p_wdata[0] = DATA_W'($signed(t_q));
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; done <= 1'b0;
      {n, t_b, y_b, a_b, x_b, sl1, sl2, sl3, sl4, r_start, len0, str0, len1, str1} <= '0;
      idx <= '0; i1 <= '0; ptr2 <= '0; sum <= '0;
      a_v <= '0; x_v <= '0; y_v <= '0; got_a <= 1'b0; got_x <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          n   <= args[0];  t_b <= args[1];  y_b  <= args[2];  a_b  <= args[3];
          x_b <= args[4];  sl1 <= args[5];  sl2  <= args[6];  sl3  <= args[7];
          sl4 <= args[8];  r_start <= args[9]; len0 <= args[10]; str0 <= args[11];
          len1 <= args[12]; str1 <= args[13];
          idx <= '0;
          st  <= S_ROW;
        end
        S_ROW: st <= (idx == n) ? S_FIN : S_DIV0;
        S_DIV0: if (dv_done) begin
          ptr2 <= r_start + dv_rem * str0;
          i1   <= '0;
          sum  <= '0;
          st   <= S_ELEM;
        end
        S_ELEM: st <= (i1 == len1) ? S_MAC : S_DIV1;
        S_DIV1: if (dv_done) st <= S_DIV2;
        S_DIV2: if (dv_done) begin
          got_a <= 1'b0; got_x <= 1'b0;
          st    <= S_RD;
        end
        S_RD: begin
          if (p_done[1]) begin a_v <= p_rdata[1][FW-1:0]; got_a <= 1'b1; end
          if (p_done[2]) begin x_v <= p_rdata[2][FW-1:0]; got_x <= 1'b1; end
          if ((got_a || p_done[1]) && (got_x || p_done[2])) st <= S_MAC;
        end
        S_MAC: begin
          // one element: accumulate, advance; or, at the row end, read y
          if (i1 != len1) begin
            sum  <= mac_q;
            i1   <= i1 + 1;
            ptr2 <= ptr2 + str1;
            st   <= (i1 + 1 == len1) ? S_MAC : S_ELEM;
          end else begin
            st <= S_Y;
          end
        end
        S_Y: if (p_done[1]) begin
          y_v <= p_rdata[1][FW-1:0];
          st  <= S_WRG;
        end
        S_WRG: st <= S_WR;
        S_WR: if (p_done[0]) begin
          idx <= idx + 1;
          st  <= S_ROW;
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
