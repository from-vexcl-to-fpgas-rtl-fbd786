// tb_fx_log: checks the fixed-point natural logarithm against the
// real-valued logarithm over inputs from one LSB to the largest value,
// within 4 LSB of 16 fraction bits, checks that zero and negative inputs
// give the most negative value with `bad` set, and checks the latency
// (F + 4 + 1 cycles from start to done).
module tb_fx_log;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done, bad;
  logic [31:0] x, y;
  fx_log #(.W(32), .F(16)) dut (.clk, .rst_n, .start, .x, .busy, .done, .y, .bad);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [31:0] xi);
    int cyc = 0;
    real got, exp_v;
    x = xi;
    @(negedge clk); start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 21) begin failures++; $display("FAIL latency %0d", cyc); end
    checks++;
    if ($signed(xi) <= 0) begin
      if (!bad || y != 32'h8000_0000) begin failures++; $display("FAIL log of non-positive %h", xi); end
    end else begin
      exp_v = $ln(real'($signed(xi)) / 65536.0);
      got   = real'($signed(y)) / 65536.0;
      if (bad || got - exp_v > 4.0 / 65536.0 || exp_v - got > 4.0 / 65536.0) begin
        failures++;
        $display("FAIL ln(%h) got %f exp %f", xi, got, exp_v);
      end
    end
  endtask

  initial begin
    start = 0; x = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    one(32'h0001_0000); one(32'h0002_0000); one(32'h0000_8000); one(32'h0000_0001);
    one(32'h7fff_ffff); one(32'h0002_b7e1); one(32'h0); one(32'hffff_0000);
    for (int i = 0; i < 200; i++) one(32'($urandom_range(32'h7fff_ffff)) >> $urandom_range(30));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
