// tb_affinetrans: self-checking test of the affine-transformation kernel.
//
// Drives the kernel with random fixed-point A, x, y placed in a behavioural
// memory with random latency and back-pressure, runs it with several
// reshape/reduce argument sets (plain row-major t = y + A x, a column
// reduction that needs stride arithmetic, and a strided/repeated x index),
// and compares every t element with a reference computed here from the
// kernel's loop nest with exact wide-integer fixed-point arithmetic. A second
// instance with a narrow sum format (24 bits, 14 integer) is driven with large
// values so that rounding and saturation are checked as well.
module tb_affinetrans;
  import vexcl_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int sat_seen = 0;

  localparam int NL = 24, NLI = 14;   // narrow instance sum format

  // DUT 0 : default formats
  logic        start0, done0, idle0, stall0, sat0;
  logic [31:0] args0 [14];
  mem_req_t    req0 [3];
  mem_rsp_t    rsp0 [3];
  affinetrans dut0 (.clk, .rst_n, .start(start0), .done(done0), .idle(idle0), .args(args0),
                    .mem_req(req0), .mem_rsp(rsp0), .stall(stall0), .sat(sat0));
  ddr_model #(.NP(3), .DEPTH(4096)) mem0 (.clk, .req(req0), .rsp(rsp0));

  // DUT 1 : narrow sum format
  logic        start1, done1, idle1, stall1, sat1;
  logic [31:0] args1 [14];
  mem_req_t    req1 [3];
  mem_rsp_t    rsp1 [3];
  affinetrans #(.LW(NL), .LI(NLI)) dut1 (.clk, .rst_n, .start(start1), .done(done1), .idle(idle1),
                    .args(args1), .mem_req(req1), .mem_rsp(rsp1), .stall(stall1), .sat(sat1));
  ddr_model #(.NP(3), .DEPTH(4096)) mem1 (.clk, .req(req1), .rsp(rsp1));

  always @(posedge clk) if (sat1) sat_seen++;

  // watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int AB = 100, XB = 1000, YB = 1200, TB = 1400;

  // round (ties up) a value with `drop` extra fraction bits, then saturate to w bits
  function automatic longint q(input logic signed [127:0] v, input int drop, input int w);
    logic signed [127:0] r, mx, mn;
    r  = (drop > 0) ? ((v + (128'sd1 <<< (drop - 1))) >>> drop) : (v <<< (-drop));
    mx = (128'sd1 <<< (w - 1)) - 1;
    mn = -(128'sd1 <<< (w - 1));
    if (r > mx) r = mx;
    if (r < mn) r = mn;
    return longint'(r);
  endfunction

  function automatic longint sx18(input logic [63:0] w);
    return longint'($signed(w[17:0]));
  endfunction

  // reference t[idx] straight from the kernel's loop nest
  function automatic longint ref_t(input int inst, input logic [31:0] a [14], input int idx, input int lw, input int lf);
    logic signed [127:0] sum, v;
    longint av, xv, yv;
    logic [31:0] ptr1, ptr2, xi;
    sum  = 0;
    ptr1 = a[9] + (idx % a[10]) * a[11];
    ptr2 = ptr1;
    for (int i = 0; i < int'(a[12]); i++) begin
      xi = a[5] * (((a[6] + ptr2) / a[7]) % a[8]);
      av = sx18(inst == 0 ? mem0.mem[a[3] + ptr2] : mem1.mem[a[3] + ptr2]);
      xv = sx18(inst == 0 ? mem0.mem[a[4] + xi]   : mem1.mem[a[4] + xi]);
      v  = (sum <<< (22 - lf)) + 128'(av * xv);      // product has 22 fraction bits
      sum = 128'(q(v, 22 - lf, lw));
      ptr2 = ptr2 + a[13];
    end
    yv = sx18(inst == 0 ? mem0.mem[a[2] + idx] : mem1.mem[a[2] + idx]);
    v  = (sum <<< (11 - lf)) + 128'(yv);
    return q(v, 11 - lf, lw);
  endfunction

  task automatic fill(input int inst, input int base, input int cnt, input int maxmag);
    for (int i = 0; i < cnt; i++) begin
      int v = int'($urandom_range(2 * maxmag)) - maxmag;
      if (inst == 0) mem0.mem[base + i] = 64'($signed(v));
      else           mem1.mem[base + i] = 64'($signed(v));
    end
  endtask

  task automatic run(input int inst, input logic [31:0] a [14], input string name);
    int cyc = 0;
    for (int i = 0; i < 14; i++) if (inst == 0) args0[i] = a[i]; else args1[i] = a[i];
    @(negedge clk);
    if (inst == 0) start0 = 1; else start1 = 1;
    @(negedge clk);
    start0 = 0; start1 = 0;
    while (!(inst == 0 ? done0 : done1)) begin @(negedge clk); cyc++; end
    for (int idx = 0; idx < int'(a[0]); idx++) begin
      longint exp_v, got;
      int lw = (inst == 0) ? LFIX_W : NL;
      int lf = (inst == 0) ? LFIX_W - LFIX_I : NL - NLI;
      exp_v = ref_t(inst, a, idx, lw, lf);
      got   = (inst == 0) ? longint'(mem0.mem[a[1] + idx]) : longint'(mem1.mem[a[1] + idx]);
      if (lw < 64) got = longint'($signed(got[NL-1:0]));
      checks++;
      if (got !== exp_v) begin
        failures++;
        if (failures < 10) $display("FAIL %s idx=%0d got=%0d exp=%0d", name, idx, got, exp_v);
      end
    end
    $display("%s: %0d outputs, %0d cycles", name, a[0], cyc);
  endtask

  initial begin
    logic [31:0] a [14];
    int m, n;
    start0 = 0; start1 = 0;
    for (int i = 0; i < 14; i++) begin args0[i] = 0; args1[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. the document's example size, 7 x 5, row-major, host argument values
    m = 7; n = 5;
    fill(0, AB, m * n, 1 << 17 - 1); fill(0, XB, n, 1 << 17 - 1); fill(0, YB, m, 1 << 17 - 1);
    a = '{m, TB, YB, AB, XB, 1, 0, 1, n, 0, m, n, n, 1};
    run(0, a, "rowmajor_7x5");

    // 2. 16 x 12, full-range values
    m = 16; n = 12;
    fill(0, AB, m * n, 131071); fill(0, XB, n, 131071); fill(0, YB, m, 131071);
    a = '{m, TB, YB, AB, XB, 1, 0, 1, n, 0, m, n, n, 1};
    run(0, a, "rowmajor_16x12");

    // 3. column reduction: t_j = y_j + sum_i A[i][j] * x[i] over a 6 x 9 matrix
    m = 6; n = 9;
    fill(0, AB, m * n, 131071); fill(0, XB, 64, 131071); fill(0, YB, n, 131071);
    // ptr1 = j*1, ptr2 steps by n; x index = (ptr2 / n) mod m
    a = '{n, TB, YB, AB, XB, 1, 0, n, m, 0, n, 1, m, n};
    run(0, a, "column_reduce_6x9");

    // 4. offset start, skip/repeat x indices: slice1=2, slice2=3, slice3=2, slice4=5
    a = '{5, TB, YB, AB, XB, 2, 3, 2, 5, 4, 3, 7, 4, 2};
    run(0, a, "strided_slices");

    // 5. empty rows (length1 = 0): t = y
    a = '{4, TB, YB, AB, XB, 1, 0, 1, 4, 0, 4, 4, 0, 1};
    run(0, a, "zero_length");

    // 6. narrow sum format with large values: rounding and saturation
    m = 5; n = 40;
    fill(1, AB, m * n, 131071); fill(1, XB, n, 131071); fill(1, YB, m, 131071);
    for (int i = 0; i < n; i++) begin
      mem1.mem[AB + i] = 64'($signed(131071 - i)); mem1.mem[XB + i] = 64'($signed(120000));
    end
    a = '{m, TB, YB, AB, XB, 1, 0, 1, n, 0, m, n, n, 1};
    run(1, a, "narrow_saturating");
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never happened"); end

    if (mem0.bad_addr != 0 || mem1.bad_addr != 0) begin failures++; $display("FAIL out-of-range access"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
