// tb_phi: self-checking test of the phi kernel. Random u1, u2, u3 vectors
// are placed in a behavioural memory; every output is compared with the
// real-valued phi(u1,u2,u3) = (u1 - u2 + ln(u3)^2 sin(u1)) / (u1 u2), using
// the relative-error criterion |(acc - ref) / ref| < 0.01 (an absolute error
// of 2^-12 is accepted where |ref| is below 0.1). A zero u2 (zero divisor)
// must give the largest value with the numerator's sign.
module tb_phi;
  import vexcl_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, div0 = 0;

  logic        start, done, idle, stall, ev_div0;
  logic [31:0] args [5];
  mem_req_t    req [4];
  mem_rsp_t    rsp [4];
  phi dut (.clk, .rst_n, .start, .done, .idle, .args, .mem_req(req), .mem_rsp(rsp), .stall, .ev_div0);
  ddr_model #(.NP(4), .DEPTH(4096)) mem (.clk, .req(req), .rsp(rsp));
  always @(posedge clk) if (ev_div0) div0++;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 60, U1 = 100, U2 = 300, U3 = 500, OUT = 700;

  function automatic real fx(input logic [63:0] w);
    return real'($signed(w[31:0])) / 65536.0;
  endfunction

  initial begin
    int cyc = 0;
    start = 0;
    for (int i = 0; i < 5; i++) args[i] = 0;
    for (int i = 0; i < N; i++) begin
      mem.mem[U1 + i] = 64'(32'(32768 + $urandom_range(4 * 65536)));   // 0.5 .. 4.5
      mem.mem[U2 + i] = 64'(32'(32768 + $urandom_range(4 * 65536)));
      mem.mem[U3 + i] = 64'(32'(13107 + $urandom_range(10 * 65536)));  // 0.2 .. 10.2
    end
    mem.mem[U1] = 64'(32'(2 * 65536)); mem.mem[U2] = 64'(32'(65536)); mem.mem[U3] = 64'(32'(65536)); // phi = 0.5
    mem.mem[U2 + N - 1] = 0;                                          // zero divisor
    repeat (3) @(negedge clk); rst_n = 1;
    args = '{N, OUT, U1, U2, U3};
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    for (int i = 0; i < N; i++) begin
      real u1, u2, u3, r, g, err;
      u1 = fx(mem.mem[U1 + i]); u2 = fx(mem.mem[U2 + i]); u3 = fx(mem.mem[U3 + i]);
      g  = fx(mem.mem[OUT + i]);
      checks++;
      if (u2 == 0.0) begin
        if (mem.mem[OUT + i][31:0] != 32'h7fff_ffff) begin failures++; $display("FAIL zero divisor %h", mem.mem[OUT + i][31:0]); end
      end else begin
        r   = (u1 - u2 + $ln(u3) * $ln(u3) * $sin(u1)) / (u1 * u2);
        err = (r > 0.1 || r < -0.1) ? (g - r) / r : (g - r) * 40.96;   // |g - r| < 2^-12
        if (err > 0.01 || err < -0.01) begin
          failures++;
          $display("FAIL phi(%f,%f,%f) got %f exp %f", u1, u2, u3, g, r);
        end
      end
    end
    checks++;
    if (mem.mem[OUT][31:0] != 32'h0000_8000) begin failures++; $display("FAIL phi(2,1,1) = %h", mem.mem[OUT][31:0]); end
    checks++;
    if (div0 != 1) begin failures++; $display("FAIL zero-divisor events %0d", div0); end
    $display("phi: %0d elements in %0d cycles", N, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
