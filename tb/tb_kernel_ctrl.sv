// tb_kernel_ctrl: checks the AXI4-Lite control slave: argument registers
// written and read back, writes to unmapped offsets ignored, the start bit
// producing exactly one start pulse (and none while running), the done bit
// set by the kernel's done pulse and cleared by reading the control
// register, idle reporting, irq, and a read response held under back-pressure.
module tb_kernel_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, starts = 0;

  logic awvalid, awready, wvalid, wready, bvalid, bready, arvalid, arready, rvalid, rready;
  logic [7:0] awaddr, araddr;
  logic [31:0] wdata, rdata;
  logic [3:0] wstrb;
  logic [1:0] bresp, rresp;
  logic ap_start, ap_done, irq;
  logic [31:0] args [14];

  kernel_ctrl #(.NARGS(14)) dut (
    .clk, .rst_n, .s_awvalid(awvalid), .s_awready(awready), .s_awaddr(awaddr),
    .s_wvalid(wvalid), .s_wready(wready), .s_wdata(wdata), .s_wstrb(wstrb),
    .s_bvalid(bvalid), .s_bready(bready), .s_bresp(bresp),
    .s_arvalid(arvalid), .s_arready(arready), .s_araddr(araddr),
    .s_rvalid(rvalid), .s_rready(rready), .s_rdata(rdata), .s_rresp(rresp),
    .ap_start, .ap_done, .args, .irq);

  always @(posedge clk) if (ap_start) starts++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); awvalid = 1; wvalid = 1; awaddr = a; wdata = d;
    do @(posedge clk); while (!awready);
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!bvalid) @(negedge clk);
    bready = 1; @(negedge clk); bready = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d, input int hold);
    @(negedge clk); arvalid = 1; araddr = a;
    do @(posedge clk); while (!arready);
    @(negedge clk); arvalid = 0;
    while (!rvalid) @(negedge clk);
    repeat (hold) @(negedge clk);         // back-pressure: response must stay
    d = rdata; bready = 0; rready = 1; @(negedge clk); rready = 0;
  endtask

  task automatic chk(input logic [31:0] got, input logic [31:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp_v); end
  endtask

  initial begin
    logic [31:0] d;
    {awvalid, wvalid, bready, arvalid, rready, ap_done} = '0;
    awaddr = 0; araddr = 0; wdata = 0; wstrb = 4'hf;
    repeat (3) @(negedge clk); rst_n = 1;
    rd(8'h00, d, 0); chk(d, 32'h4, "idle after reset");
    for (int i = 0; i < 14; i++) wr(8'h10 + 8'(4 * i), 32'hA000_0000 + 32'(i * 3));
    wr(8'h10 + 8'(4 * 14), 32'hdead_beef);    // beyond the last argument: ignored
    for (int i = 0; i < 14; i++) begin
      rd(8'h10 + 8'(4 * i), d, i % 3); chk(d, 32'hA000_0000 + 32'(i * 3), "arg readback");
      chk(args[i], 32'hA000_0000 + 32'(i * 3), "arg output");
    end
    rd(8'h10 + 8'(4 * 14), d, 0); chk(d, 0, "unmapped read");
    wr(8'h00, 32'h1);
    chk(32'(starts), 1, "one start pulse");
    rd(8'h00, d, 0); chk(d, 32'h1, "running");
    wr(8'h00, 32'h1);                          // ignored while running
    chk(32'(starts), 1, "no start while running");
    @(negedge clk); ap_done = 1; @(negedge clk); ap_done = 0;
    chk(32'(irq), 1, "irq");
    rd(8'h00, d, 2); chk(d, 32'h6, "done and idle");
    rd(8'h00, d, 0); chk(d, 32'h4, "done cleared by read");
    chk(32'(irq), 0, "irq cleared");
    wr(8'h00, 32'h1);
    chk(32'(starts), 2, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
