// vexcl_fpga_top: the accelerator side of the two applications ported from
// VexCL, side by side.
//
// Affine transformation (t = y + A x): kernel instance affinetrans_1 with
// its control slave (14 arguments) and three memory masters, interface 1
// for t, 2 for y and A, 3 for x.
//
// Sparse matrix-vector product (t = A * phi(u1, u2, u3)): kernel instances
// phi_1 (5 arguments, four memory masters) and spmat_1 (11 arguments, four
// memory masters). The host runs phi first, into a buffer that only the two
// kernels use, and then spmat with that buffer as its `in` vector; the two
// kernels meet only through memory, as in the ported application.
//
// The memories (the DDR banks of the card) and the host with its PCIe link
// are outside this design: every kernel control slave is brought out as an
// AXI4-Lite port and every memory master as a request/response port (see
// vexcl_pkg). Event outputs (memory stalls, saturation, ELL padding, CSR
// entries, zero divisors) are brought out for performance counters.
// The number formats are parameters; the defaults are the document's
// fixed-point formats for the affine kernel and this design's formats for
// the SpMV kernels.
module vexcl_fpga_top
  import vexcl_pkg::*;
#(
  parameter int unsigned AFF_FW = FIX_W,
  parameter int unsigned AFF_FI = FIX_I,
  parameter int unsigned AFF_LW = LFIX_W,
  parameter int unsigned AFF_LI = LFIX_I,
  parameter int unsigned SPMV_VW = SPMV_W,
  parameter int unsigned SPMV_VI = SPMV_I
) (
  input  logic      clk,
  input  logic      rst_n,
  // affine transformation application
  input  axil_req_t aff_ctrl_req,
  output axil_rsp_t aff_ctrl_rsp,
  output logic      aff_irq,
  output mem_req_t  aff_mem_req [3],
  input  mem_rsp_t  aff_mem_rsp [3],
  output logic      aff_ev_stall,
  output logic      aff_ev_sat,
  // SpMV application: phi kernel
  input  axil_req_t phi_ctrl_req,
  output axil_rsp_t phi_ctrl_rsp,
  output logic      phi_irq,
  output mem_req_t  phi_mem_req [4],
  input  mem_rsp_t  phi_mem_rsp [4],
  output logic      phi_ev_stall,
  output logic      phi_ev_div0,
  // SpMV application: spmat kernel
  input  axil_req_t spm_ctrl_req,
  output axil_rsp_t spm_ctrl_rsp,
  output logic      spm_irq,
  output mem_req_t  spm_mem_req [4],
  input  mem_rsp_t  spm_mem_rsp [4],
  output logic      spm_ev_stall,
  output logic      spm_ev_pad,
  output logic      spm_ev_csr
);
  // ---------------- affinetrans_1 ----------------
  logic        aff_start, aff_done, aff_idle;
  logic [31:0] aff_args [14];

  kernel_ctrl #(.NARGS(14)) affinetrans_1_ctrl (
    .clk, .rst_n,
    .s_awvalid(aff_ctrl_req.awvalid), .s_awready(aff_ctrl_rsp.awready), .s_awaddr(aff_ctrl_req.awaddr),
    .s_wvalid(aff_ctrl_req.wvalid), .s_wready(aff_ctrl_rsp.wready), .s_wdata(aff_ctrl_req.wdata),
    .s_wstrb(aff_ctrl_req.wstrb), .s_bvalid(aff_ctrl_rsp.bvalid), .s_bready(aff_ctrl_req.bready),
    .s_bresp(aff_ctrl_rsp.bresp), .s_arvalid(aff_ctrl_req.arvalid), .s_arready(aff_ctrl_rsp.arready),
    .s_araddr(aff_ctrl_req.araddr), .s_rvalid(aff_ctrl_rsp.rvalid), .s_rready(aff_ctrl_req.rready),
    .s_rdata(aff_ctrl_rsp.rdata), .s_rresp(aff_ctrl_rsp.rresp),
    .ap_start(aff_start), .ap_done(aff_done), .args(aff_args), .irq(aff_irq));

  affinetrans #(.FW(AFF_FW), .FI(AFF_FI), .LW(AFF_LW), .LI(AFF_LI)) affinetrans_1 (
    .clk, .rst_n, .start(aff_start), .done(aff_done), .idle(aff_idle), .args(aff_args),
    .mem_req(aff_mem_req), .mem_rsp(aff_mem_rsp), .stall(aff_ev_stall), .sat(aff_ev_sat));

  // ---------------- phi_1 ----------------
  logic        phi_start, phi_done, phi_idle;
  logic [31:0] phi_args [5];

  kernel_ctrl #(.NARGS(5)) phi_1_ctrl (
    .clk, .rst_n,
    .s_awvalid(phi_ctrl_req.awvalid), .s_awready(phi_ctrl_rsp.awready), .s_awaddr(phi_ctrl_req.awaddr),
    .s_wvalid(phi_ctrl_req.wvalid), .s_wready(phi_ctrl_rsp.wready), .s_wdata(phi_ctrl_req.wdata),
    .s_wstrb(phi_ctrl_req.wstrb), .s_bvalid(phi_ctrl_rsp.bvalid), .s_bready(phi_ctrl_req.bready),
    .s_bresp(phi_ctrl_rsp.bresp), .s_arvalid(phi_ctrl_req.arvalid), .s_arready(phi_ctrl_rsp.arready),
    .s_araddr(phi_ctrl_req.araddr), .s_rvalid(phi_ctrl_rsp.rvalid), .s_rready(phi_ctrl_req.rready),
    .s_rdata(phi_ctrl_rsp.rdata), .s_rresp(phi_ctrl_rsp.rresp),
    .ap_start(phi_start), .ap_done(phi_done), .args(phi_args), .irq(phi_irq));

  phi #(.VW(SPMV_VW), .VI(SPMV_VI)) phi_1 (
    .clk, .rst_n, .start(phi_start), .done(phi_done), .idle(phi_idle), .args(phi_args),
    .mem_req(phi_mem_req), .mem_rsp(phi_mem_rsp), .stall(phi_ev_stall), .ev_div0(phi_ev_div0));

  // ---------------- spmat_1 ----------------
  logic        spm_start, spm_done, spm_idle;
  logic [31:0] spm_args [11];

  kernel_ctrl #(.NARGS(11)) spmat_1_ctrl (
    .clk, .rst_n,
    .s_awvalid(spm_ctrl_req.awvalid), .s_awready(spm_ctrl_rsp.awready), .s_awaddr(spm_ctrl_req.awaddr),
    .s_wvalid(spm_ctrl_req.wvalid), .s_wready(spm_ctrl_rsp.wready), .s_wdata(spm_ctrl_req.wdata),
    .s_wstrb(spm_ctrl_req.wstrb), .s_bvalid(spm_ctrl_rsp.bvalid), .s_bready(spm_ctrl_req.bready),
    .s_bresp(spm_ctrl_rsp.bresp), .s_arvalid(spm_ctrl_req.arvalid), .s_arready(spm_ctrl_rsp.arready),
    .s_araddr(spm_ctrl_req.araddr), .s_rvalid(spm_ctrl_rsp.rvalid), .s_rready(spm_ctrl_req.rready),
    .s_rdata(spm_ctrl_rsp.rdata), .s_rresp(spm_ctrl_rsp.rresp),
    .ap_start(spm_start), .ap_done(spm_done), .args(spm_args), .irq(spm_irq));

  spmat #(.VW(SPMV_VW), .VI(SPMV_VI), .AW(2 * SPMV_VW), .AI(2 * SPMV_VW - (SPMV_VW - SPMV_VI))) spmat_1 (
    .clk, .rst_n, .start(spm_start), .done(spm_done), .idle(spm_idle), .args(spm_args),
    .mem_req(spm_mem_req), .mem_rsp(spm_mem_rsp), .stall(spm_ev_stall),
    .ev_pad(spm_ev_pad), .ev_csr(spm_ev_csr));
endmodule
