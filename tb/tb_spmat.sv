// tb_spmat: self-checking test of the hybrid ELL-CSR SpMV kernel.
//
// Builds sparse matrices in the testbench (the document's 3 x 4 example,
// split into a 2-wide ELL part plus a CSR part, and random matrices with a
// few long rows), lays them out in a behavioural memory in HELL form with
// padding entries and a pitch larger than the row count, runs the kernel and
// compares out with scale * A * in computed here from the dense matrix. With
// truncating fixed point every product is floored to the sum's fraction bits,
// so the reference does not depend on how entries are split between the ELL
// and CSR parts. A run with a null CSR pointer (pure ELL) is included.
module tb_spmat;
  import vexcl_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, pads = 0, csrs = 0;

  logic        start, done, idle, stall, ev_pad, ev_csr;
  logic [31:0] args [11];
  mem_req_t    req [4];
  mem_rsp_t    rsp [4];
  spmat dut (.clk, .rst_n, .start, .done, .idle, .args, .mem_req(req), .mem_rsp(rsp),
             .stall, .ev_pad, .ev_csr);
  ddr_model #(.NP(4), .DEPTH(8192)) mem (.clk, .req(req), .rsp(rsp));

  always @(posedge clk) begin
    if (ev_pad) pads++;
    if (ev_csr) csrs++;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int MAXR = 40, MAXC = 40;
  longint dense [MAXR][MAXC];
  localparam int ECOL = 100, EVAL = 1100, CROW = 2100, CCOL = 2200, CVAL = 2700,
                 INB = 3200, OUTB = 3300;

  // lay out `dense` (m x nc) in HELL form with ELL width w; csr=0 gives a
  // null CSR pointer (all rows must then fit in the ELL part)
  task automatic layout(input int m, input int nc, input int w, input int pitch,
                        input bit csr, output logic [31:0] a [11], input longint scale);
    int nnz_csr = 0;
    for (int r = 0; r < m; r++) begin
      int e = 0;
      if (csr) mem.mem[CROW + r] = 64'(nnz_csr);
      for (int c = 0; c < nc; c++) begin
        if (dense[r][c] != 0) begin
          if (e < w) begin
            mem.mem[ECOL + r + e * pitch] = 64'(c);
            mem.mem[EVAL + r + e * pitch] = 64'(dense[r][c]);
          end else begin
            mem.mem[CCOL + nnz_csr] = 64'(c);
            mem.mem[CVAL + nnz_csr] = 64'(dense[r][c]);
            nnz_csr++;
          end
          e++;
        end
      end
      for (int p = e; p < w; p++) begin
        mem.mem[ECOL + r + p * pitch] = ELL_PAD;
        mem.mem[EVAL + r + p * pitch] = 64'h0bad;
      end
    end
    if (csr) mem.mem[CROW + m] = 64'(nnz_csr);
    a = '{m, 32'(scale), w, pitch, ECOL, EVAL, csr ? CROW : 0, CCOL, CVAL, INB, OUTB};
  endtask

  task automatic run_check(input logic [31:0] a [11], input int nc, input string name);
    int cyc = 0;
    args = a;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    for (int r = 0; r < int'(a[0]); r++) begin
      logic signed [127:0] s, o;
      logic [31:0] exp_v;
      s = 0;
      for (int c = 0; c < nc; c++)
        if (dense[r][c] != 0)
          s = s + ((128'(dense[r][c]) * 128'($signed(mem.mem[INB + c][31:0]))) >>> 16);
      s = 128'($signed(s[63:0]));                       // accumulator wraps at 64 bits
      o = (128'($signed(a[1])) * s) >>> 16;
      exp_v = o[31:0];
      checks++;
      if (mem.mem[OUTB + r][31:0] !== exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL %s row %0d got %h exp %h", name, r, mem.mem[OUTB + r][31:0], exp_v);
      end
    end
    $display("%s: %0d rows, %0d cycles", name, a[0], cyc);
  endtask

  initial begin
    logic [31:0] a [11];
    start = 0;
    for (int i = 0; i < 11; i++) args[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // the document's example matrix, ELL width 2, one CSR entry
    for (int r = 0; r < MAXR; r++) for (int c = 0; c < MAXC; c++) dense[r][c] = 0;
    dense[0][1] = 6 <<< 16; dense[0][2] = 9 <<< 16; dense[0][3] = 7 <<< 16;
    dense[2][0] = 3 <<< 16; dense[2][1] = 3 <<< 16;
    for (int c = 0; c < 4; c++) mem.mem[INB + c] = 64'((c + 1) <<< 16);
    layout(3, 4, 2, 3, 1'b1, a, 1 <<< 16);
    run_check(a, 4, "paper_example");
    // expected integers: row0 = 6*2+9*3+7*4 = 67, row1 = 0, row2 = 3*1+3*2 = 9
    checks++;
    if (mem.mem[OUTB][31:0] != 32'(67 <<< 16) || mem.mem[OUTB + 2][31:0] != 32'(9 <<< 16)) begin
      failures++; $display("FAIL paper example values");
    end

    // random matrices, random fractional values, scale 1.5
    for (int t = 0; t < 3; t++) begin
      int m, nc;
      m = 20 + t * 7; nc = 30;
      for (int r = 0; r < MAXR; r++) for (int c = 0; c < MAXC; c++) begin
        int dens = (r % 7 == 3) ? 70 : 12;             // some long rows
        dense[r][c] = (r < m && c < nc && $urandom_range(99) < dens)
                      ? longint'(int'($urandom_range(20 * 65536)) - 10 * 65536) : 0;
      end
      for (int c = 0; c < nc; c++) mem.mem[INB + c] = 64'($signed(int'($urandom_range(8 * 65536)) - 4 * 65536));
      layout(m, nc, 3, m + 5, 1'b1, a, 98304);
      run_check(a, nc, $sformatf("random_%0d", t));
    end

    // pure ELL: null CSR pointer, width large enough for every row
    for (int r = 0; r < MAXR; r++) for (int c = 0; c < MAXC; c++)
      dense[r][c] = (r < 10 && c < 12 && $urandom_range(99) < 30) ? longint'($urandom_range(65536 * 3)) : 0;
    layout(10, 12, 12, 10, 1'b0, a, 65536);
    run_check(a, 12, "pure_ell");

    checks++;
    if (pads == 0 || csrs == 0) begin failures++; $display("FAIL padding or CSR path unused"); end
    if (mem.bad_addr != 0) begin failures++; $display("FAIL out-of-range access"); end
    $display("padding entries skipped %0d, CSR entries %0d", pads, csrs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
