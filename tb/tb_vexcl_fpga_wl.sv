// tb_vexcl_fpga_wl: a second workload run of the whole design at default
// parameters, with sizes taken from the evaluation of the ported
// applications: the smallest affine transformation (32 x 32) and the second
// sparse configuration, a 5000 x 5000 matrix with density 0.01 (about
// 250,000 nonzeros; ELL width = mean row length + 1, the rest in the CSR
// part). The host sequence, the references and the event counting are the
// shared ones of the end-to-end tests; it fails if a mechanism never occurs.
module tb_vexcl_fpga_wl;
  import vexcl_pkg::*;
  localparam int AFF_LWX = LFIX_W, AFF_LIX = LFIX_I;
  localparam int AM = 32, AN = 32;
  localparam int SM = 5000, SN = 5000, SDENS_PPM = 10_000;
  localparam bit EXPECT_SAT = 0, EXPECT_DIV0 = 0;
  localparam int AFF_DEPTH = 2_048, SPM_DEPTH = 1_200_000;
  localparam int WATCHDOG = 40_000_000;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  axil_req_t aff_ctrl_req, phi_ctrl_req, spm_ctrl_req;
  axil_rsp_t aff_ctrl_rsp, phi_ctrl_rsp, spm_ctrl_rsp;
  logic aff_irq, phi_irq, spm_irq;
  mem_req_t aff_mem_req [3], phi_mem_req [4], spm_mem_req [4];
  mem_rsp_t aff_mem_rsp [3], phi_mem_rsp [4], spm_mem_rsp [4];
  logic aff_ev_stall, aff_ev_sat, phi_ev_stall, phi_ev_div0, spm_ev_stall, spm_ev_pad, spm_ev_csr;

  vexcl_fpga_top dut (.*);

`include "top_tb_body.svh"

  // watchdog
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
