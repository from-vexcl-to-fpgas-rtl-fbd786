// top_tb_body.svh: body shared by the two end-to-end testbenches of
// vexcl_fpga_top. The including module declares, before including this file:
//   localparam int AFF_LWX, AFF_LIX      sum format the top was built with
//   localparam int AM, AN                affine matrix size
//   localparam int SM, SN, SDENS_PPM     sparse matrix size and density (ppm)
//   localparam bit EXPECT_SAT, EXPECT_DIV0
//   localparam int AFF_DEPTH, SPM_DEPTH  memory model sizes (words)
// and the clock, reset and top-level signals, and instantiates the top as
// `dut`. It adds its own watchdog after the include, using `checks` and
// `failures` declared here.
//
// The testbench plays the host: it fills the memories, writes the kernel
// arguments over each AXI4-Lite control port, starts the kernel, polls its
// done bit, and checks the results against references computed here.
// SpMV runs as in the ported application: phi into a buffer only the
// kernels use, then spmat reading that buffer as its input vector.

  int checks = 0, failures = 0;
  int n_stall_aff = 0, n_stall_phi = 0, n_stall_spm = 0, n_sat = 0, n_pad = 0, n_csr = 0, n_div0 = 0;

  always @(posedge clk) begin
    if (aff_ev_stall) n_stall_aff++;
    if (phi_ev_stall) n_stall_phi++;
    if (spm_ev_stall) n_stall_spm++;
    if (aff_ev_sat)   n_sat++;
    if (spm_ev_pad)   n_pad++;
    if (spm_ev_csr)   n_csr++;
    if (phi_ev_div0)  n_div0++;
  end

  ddr_model #(.NP(3), .DEPTH(AFF_DEPTH)) mem_aff (.clk, .req(aff_mem_req), .rsp(aff_mem_rsp));
  mem_req_t spmv_req [8];
  mem_rsp_t spmv_rsp [8];
  for (genvar p = 0; p < 4; p++) begin : g_spmv
    assign spmv_req[p]     = phi_mem_req[p];
    assign spmv_req[p + 4] = spm_mem_req[p];
    assign phi_mem_rsp[p]  = spmv_rsp[p];
    assign spm_mem_rsp[p]  = spmv_rsp[p + 4];
  end
  ddr_model #(.NP(8), .DEPTH(SPM_DEPTH)) mem_spm (.clk, .req(spmv_req), .rsp(spmv_rsp));


  // ---------------- host AXI4-Lite access ----------------
  task automatic axil_wr(input int k, input logic [7:0] a, input logic [31:0] d);
    axil_req_t r;
    r = '0; r.awvalid = 1; r.wvalid = 1; r.awaddr = a; r.wdata = d; r.wstrb = 4'hf; r.bready = 1;
    @(negedge clk);
    case (k) 0: aff_ctrl_req = r; 1: phi_ctrl_req = r; default: spm_ctrl_req = r; endcase
    forever begin
      @(posedge clk);
      if ((k == 0 && aff_ctrl_rsp.awready) || (k == 1 && phi_ctrl_rsp.awready) ||
          (k == 2 && spm_ctrl_rsp.awready)) break;
    end
    @(negedge clk);
    r.awvalid = 0; r.wvalid = 0;
    case (k) 0: aff_ctrl_req = r; 1: phi_ctrl_req = r; default: spm_ctrl_req = r; endcase
    @(negedge clk);
    r.bready = 0;
    case (k) 0: aff_ctrl_req = r; 1: phi_ctrl_req = r; default: spm_ctrl_req = r; endcase
  endtask

  task automatic axil_rd(input int k, input logic [7:0] a, output logic [31:0] d);
    axil_req_t r;
    r = '0; r.arvalid = 1; r.araddr = a; r.rready = 1;
    @(negedge clk);
    case (k) 0: aff_ctrl_req = r; 1: phi_ctrl_req = r; default: spm_ctrl_req = r; endcase
    forever begin
      @(posedge clk);
      if (k == 0 && aff_ctrl_rsp.rvalid) begin d = aff_ctrl_rsp.rdata; break; end
      if (k == 1 && phi_ctrl_rsp.rvalid) begin d = phi_ctrl_rsp.rdata; break; end
      if (k == 2 && spm_ctrl_rsp.rvalid) begin d = spm_ctrl_rsp.rdata; break; end
    end
    @(negedge clk);
    r = '0;
    case (k) 0: aff_ctrl_req = r; 1: phi_ctrl_req = r; default: spm_ctrl_req = r; endcase
  endtask

  // set arguments, start, poll until done; returns the cycles taken
  task automatic run_kernel(input int k, input logic [31:0] a [], output longint cyc);
    logic [31:0] st;
    longint t0;
    for (int i = 0; i < a.size(); i++) axil_wr(k, 8'h10 + 8'(4 * i), a[i]);
    t0 = cycle;
    axil_wr(k, 8'h00, 32'h1);
    do begin
      repeat (50) @(negedge clk);
      axil_rd(k, 8'h00, st);
    end while (!st[1]);
    cyc = cycle - t0;
  endtask

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask

  // ---------------- affine transformation ----------------
  function automatic logic signed [127:0] qr(input logic signed [127:0] v, input int drop, input int w);
    logic signed [127:0] r, mx, mn;
    r  = (drop > 0) ? ((v + (128'sd1 <<< (drop - 1))) >>> drop) : (v <<< (-drop));
    mx = (128'sd1 <<< (w - 1)) - 1;
    mn = -(128'sd1 <<< (w - 1));
    if (r > mx) r = mx;
    if (r < mn) r = mn;
    return r;
  endfunction

  localparam int A_B = 16, X_B = A_B + AM * AN, Y_B = X_B + AN, T_B = Y_B + AM;

  task automatic test_affine(input int maxmag);
    logic [31:0] a [];
    longint cyc;
    int lf;
    lf = AFF_LWX - AFF_LIX;
    for (int i = 0; i < AM * AN; i++) mem_aff.mem[A_B + i] = 64'($signed(int'($urandom_range(2 * maxmag)) - maxmag));
    for (int i = 0; i < AN; i++)      mem_aff.mem[X_B + i] = 64'($signed(int'($urandom_range(2 * maxmag)) - maxmag));
    for (int i = 0; i < AM; i++)      mem_aff.mem[Y_B + i] = 64'($signed(int'($urandom_range(2 * maxmag)) - maxmag));
    if (EXPECT_SAT)                    // row 0: every product near the maximum
      for (int c = 0; c < AN; c++) begin
        mem_aff.mem[A_B + c] = 64'(131071 - c);
        mem_aff.mem[X_B + c] = 64'(130000);
      end
    a = '{AM, T_B, Y_B, A_B, X_B, 1, 0, 1, AN, 0, AM, AN, AN, 1};
    run_kernel(0, a, cyc);
    for (int r = 0; r < AM; r++) begin
      logic signed [127:0] sum, got;
      sum = 0;
      for (int c = 0; c < AN; c++)
        sum = qr((sum <<< (22 - lf)) + 128'($signed(mem_aff.mem[A_B + r * AN + c][17:0])) *
                 128'($signed(mem_aff.mem[X_B + c][17:0])), 22 - lf, AFF_LWX);
      sum = qr((sum <<< (11 - lf)) + 128'($signed(mem_aff.mem[Y_B + r][17:0])), 11 - lf, AFF_LWX);
      got = (AFF_LWX >= 64) ? 128'($signed(mem_aff.mem[T_B + r])) :
            128'($signed(mem_aff.mem[T_B + r] << (64 - AFF_LWX))) >>> (64 - AFF_LWX);
      chk(got == sum, $sformatf("affine t[%0d] got %0d exp %0d", r, got, sum));
    end
    $display("affine %0dx%0d: %0d cycles (%0.1f per matrix element)", AM, AN, cyc, real'(cyc) / real'(AM * AN));
  endtask

  // ---------------- SpMV: t = A * phi(u1, u2, u3) ----------------
  int rowp [SM + 1];
  int coli [$];
  int vali [$];

  task automatic make_sparse();
    rowp[0] = 0;
    for (int r = 0; r < SM; r++) begin
      int extra = (r % 97 == 5) ? 6 : 0;           // a few long rows for the CSR part
      for (int c = 0; c < SN; c++) begin
        if ($urandom_range(999_999) < SDENS_PPM || (extra > 0 && $urandom_range(SN - 1) < 2 * extra)) begin
          coli.push_back(c);
          vali.push_back(int'($urandom_range(4 * 65536)) - 2 * 65536);
        end
      end
      rowp[r + 1] = coli.size();
    end
  endtask

  task automatic test_spmv(input bit zero_div);
    int w, pitch, ncsr, tot;
    int U1, U2, U3, TMP, ECOL, EVAL, CROW, CCOL, CVAL, OUTB;
    logic [31:0] a [];
    longint cyc_phi, cyc_spm;
    make_sparse();
    tot   = coli.size();
    w     = (tot + SM - 1) / SM + 1;               // ELL width: mean row length + 1
    pitch = SM + 3;
    U1 = 16; U2 = U1 + SN; U3 = U2 + SN; TMP = U3 + SN; OUTB = TMP + SN;
    ECOL = OUTB + SM; EVAL = ECOL + w * pitch; CROW = EVAL + w * pitch; CCOL = CROW + SM + 1;
    CVAL = CCOL + tot;
    if (CVAL + tot >= SPM_DEPTH) begin chk(0, "memory model too small"); return; end
    for (int i = 0; i < SN; i++) begin
      mem_spm.mem[U1 + i] = 64'(32'(32768 + $urandom_range(3 * 65536)));
      mem_spm.mem[U2 + i] = 64'(32'(32768 + $urandom_range(3 * 65536)));
      mem_spm.mem[U3 + i] = 64'(32'(13107 + $urandom_range(8 * 65536)));
    end
    if (zero_div) mem_spm.mem[U2 + 1] = 0;
    ncsr = 0;
    for (int r = 0; r < SM; r++) begin
      mem_spm.mem[CROW + r] = 64'(ncsr);
      for (int e = 0; e < w; e++) begin
        if (rowp[r] + e < rowp[r + 1]) begin
          mem_spm.mem[ECOL + r + e * pitch] = 64'(coli[rowp[r] + e]);
          mem_spm.mem[EVAL + r + e * pitch] = 64'($signed(vali[rowp[r] + e]));
        end else begin
          mem_spm.mem[ECOL + r + e * pitch] = ELL_PAD;
          mem_spm.mem[EVAL + r + e * pitch] = 0;
        end
      end
      for (int j = rowp[r] + w; j < rowp[r + 1]; j++) begin
        mem_spm.mem[CCOL + ncsr] = 64'(coli[j]);
        mem_spm.mem[CVAL + ncsr] = 64'($signed(vali[j]));
        ncsr++;
      end
    end
    mem_spm.mem[CROW + SM] = 64'(ncsr);

    a = '{SN, TMP, U1, U2, U3};
    run_kernel(1, a, cyc_phi);
    for (int i = 0; i < SN; i++) begin
      real u1, u2, u3, r, g, err;
      u1 = real'($signed(mem_spm.mem[U1 + i][31:0])) / 65536.0;
      u2 = real'($signed(mem_spm.mem[U2 + i][31:0])) / 65536.0;
      u3 = real'($signed(mem_spm.mem[U3 + i][31:0])) / 65536.0;
      g  = real'($signed(mem_spm.mem[TMP + i][31:0])) / 65536.0;
      if (u2 == 0.0) begin
        chk(mem_spm.mem[TMP + i][31:0] == 32'h7fff_ffff, "phi zero divisor");
      end else begin
        r   = (u1 - u2 + $ln(u3) * $ln(u3) * $sin(u1)) / (u1 * u2);
        err = (r > 0.1 || r < -0.1) ? (g - r) / r : (g - r) * 40.96;
        chk(err < 0.01 && err > -0.01, $sformatf("phi[%0d] got %f exp %f", i, g, r));
      end
    end

    a = '{SM, 65536, w, pitch, ECOL, EVAL, CROW, CCOL, CVAL, TMP, OUTB};
    run_kernel(2, a, cyc_spm);
    for (int r = 0; r < SM; r++) begin
      logic signed [127:0] s, o;
      s = 0;
      for (int j = rowp[r]; j < rowp[r + 1]; j++)
        s = s + ((128'($signed(vali[j])) * 128'($signed(mem_spm.mem[TMP + coli[j]][31:0]))) >>> 16);
      s = 128'($signed(s[63:0]));
      o = (128'sd65536 * s) >>> 16;
      chk(mem_spm.mem[OUTB + r][31:0] == o[31:0], $sformatf("spmv t[%0d]", r));
    end
    $display("spmv %0dx%0d, %0d nonzeros (%0d in CSR part), ELL width %0d: phi %0d cycles, spmat %0d cycles",
             SM, SN, tot, ncsr, w, cyc_phi, cyc_spm);
  endtask

  initial begin
    rst_n = 0;
    aff_ctrl_req = '0; phi_ctrl_req = '0; spm_ctrl_req = '0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    test_affine(EXPECT_SAT ? 131071 : 65536);
    test_spmv(EXPECT_DIV0);
    chk(mem_aff.bad_addr == 0 && mem_spm.bad_addr == 0, "out-of-range memory access");
    // every mechanism must have happened
    chk(n_stall_aff > 0 && n_stall_phi > 0 && n_stall_spm > 0, "memory stalls");
    chk(n_pad > 0, "ELL padding skipped");
    chk(n_csr > 0, "CSR part used");
    if (EXPECT_SAT)  chk(n_sat > 0, "saturation");
    if (EXPECT_DIV0) chk(n_div0 > 0, "zero divisor");
    $display("events: stall aff/phi/spmat %0d/%0d/%0d, saturation %0d, ELL padding %0d, CSR entries %0d, zero divisor %0d",
             n_stall_aff, n_stall_phi, n_stall_spm, n_sat, n_pad, n_csr, n_div0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
