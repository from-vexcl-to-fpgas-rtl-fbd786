// tb_vexcl_fpga_top: end-to-end test of both applications through the top,
// with the host's view (AXI4-Lite control, memory buffers). The affine
// kernel is built with a narrow 24-bit sum (14 integer bits) and driven with
// full-range inputs so that the saturating sum is exercised; the SpMV
// application runs a 40 x 40 matrix with long rows (CSR part), padding, and a
// zero divisor in phi. Every event the design reports must occur.
module tb_vexcl_fpga_top;
  import vexcl_pkg::*;
  localparam int AFF_LWX = 24, AFF_LIX = 14;
  localparam int AM = 12, AN = 10;
  localparam int SM = 40, SN = 40, SDENS_PPM = 80_000;
  localparam bit EXPECT_SAT = 1, EXPECT_DIV0 = 1;
  localparam int AFF_DEPTH = 1024, SPM_DEPTH = 8192;
  localparam int WATCHDOG = 2_000_000;

  logic clk = 0, rst_n;
  always #5 clk = ~clk;
  axil_req_t aff_ctrl_req, phi_ctrl_req, spm_ctrl_req;
  axil_rsp_t aff_ctrl_rsp, phi_ctrl_rsp, spm_ctrl_rsp;
  logic aff_irq, phi_irq, spm_irq;
  mem_req_t aff_mem_req [3], phi_mem_req [4], spm_mem_req [4];
  mem_rsp_t aff_mem_rsp [3], phi_mem_rsp [4], spm_mem_rsp [4];
  logic aff_ev_stall, aff_ev_sat, phi_ev_stall, phi_ev_div0, spm_ev_stall, spm_ev_pad, spm_ev_csr;

  vexcl_fpga_top #(.AFF_LW(AFF_LWX), .AFF_LI(AFF_LIX)) dut (.*);

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
