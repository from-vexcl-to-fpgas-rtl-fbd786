// tb_vexcl_fpga_full: one complete operation of each application with the
// top at its default parameters: the affine transformation of a 256 x 256
// matrix (the size of the document's timing runs) and the SpMV of a
// 512 x 512 matrix with density 0.01 (its smallest sparse configuration,
// about 2621 nonzeros, plus a few long rows), all through the AXI4-Lite
// control ports and the memory ports, checked against references.
module tb_vexcl_fpga_full;
  import vexcl_pkg::*;
  localparam int AFF_LWX = LFIX_W, AFF_LIX = LFIX_I;
  localparam int AM = 256, AN = 256;
  localparam int SM = 512, SN = 512, SDENS_PPM = 10_000;
  localparam bit EXPECT_SAT = 0, EXPECT_DIV0 = 0;
  localparam int AFF_DEPTH = 70_000, SPM_DEPTH = 32_768;
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
