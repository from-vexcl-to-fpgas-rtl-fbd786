// tb_fx_sin: checks the fixed-point sine against the real-valued sine for
// arguments across the whole input range (including many periods away from
// zero and the quadrant edges), within 4 LSB of 16 fraction bits, and checks
// the latency of ITER+1 cycles from start to done.
module tb_fx_sin;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done;
  logic [31:0] x, y;
  fx_sin #(.W(32), .F(16), .ITER(26)) dut (.clk, .rst_n, .start, .x, .busy, .done, .y);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input real xr);
    int cyc = 0;
    real got, exp_v;
    x = 32'($rtoi(xr * 65536.0));
    @(negedge clk); start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    exp_v = $sin(real'($signed(x)) / 65536.0);
    got   = real'($signed(y)) / 65536.0;
    checks++;
    if (got - exp_v > 4.0 / 65536.0 || exp_v - got > 4.0 / 65536.0) begin
      failures++;
      $display("FAIL sin(%f) got %f exp %f", xr, got, exp_v);
    end
    checks++;
    if (cyc != 27) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    start = 0; x = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    one(0.0); one(0.5); one(-0.5); one(1.5707963); one(-1.5707963); one(3.1415926);
    one(-3.1415926); one(2.0); one(-2.5); one(4.0); one(100.25); one(-1234.5); one(32000.0);
    for (int i = 0; i < 200; i++) one((real'($urandom_range(2000000)) - 1000000.0) / 1000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
