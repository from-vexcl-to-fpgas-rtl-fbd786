// kernel_ctrl: the control slave of one kernel (S_AXI_CONTROL in the
// system diagrams). The host writes the kernel's scalar arguments and buffer
// addresses into registers over AXI4-Lite and then starts the kernel; it
// learns that the kernel has finished by polling a status bit.
//
// Register map (32-bit registers, byte offsets; this design's own choice, the
// document only shows that scalars and buffer addresses arrive over this bus):
//   0x00  control: bit0 start (write 1 to start; reads 1 while running),
//         bit1 done (set when the kernel finishes, cleared by reading 0x00),
//         bit2 idle
//   0x10 + 4*i  argument i (read/write), i = 0 .. NARGS-1
//
// AXI4-Lite: a write is taken when AWVALID and WVALID are both high (one
// cycle, AWREADY = WREADY), answered with BRESP OKAY next cycle. A read is
// taken when ARVALID is high and no read response is pending; RDATA follows
// one cycle later. WSTRB is ignored (whole-register writes). Writes to the
// arguments while the kernel runs are accepted but the kernel samples its
// arguments only at start. `irq` mirrors the done bit.
module kernel_ctrl #(
  parameter int unsigned NARGS = 14
) (
  input  logic        clk,
  input  logic        rst_n,
  // AXI4-Lite slave
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [7:0]  s_awaddr,
  input  logic        s_wvalid,
  output logic        s_wready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  output logic        s_bvalid,
  input  logic        s_bready,
  output logic [1:0]  s_bresp,
  input  logic        s_arvalid,
  output logic        s_arready,
  input  logic [7:0]  s_araddr,
  output logic        s_rvalid,
  input  logic        s_rready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  // kernel side
  output logic        ap_start,            // one-cycle start pulse
  input  logic        ap_done,             // one-cycle done pulse
  output logic [31:0] args [NARGS],
  output logic        irq
);
  import vexcl_pkg::*;

  localparam int unsigned AIW = (NARGS > 1) ? $clog2(NARGS) : 1;
  logic running, done_q;
  logic wr_go, rd_go;
  logic [7:0] woff, roff;

  assign s_awready = s_awvalid && s_wvalid && !s_bvalid;
  assign s_wready  = s_awready;
  assign wr_go     = s_awready;
  assign s_bresp   = 2'b00;
  assign s_arready = !s_rvalid;
  assign rd_go     = s_arvalid && s_arready;
  assign s_rresp   = 2'b00;
  assign irq       = done_q;
  assign woff      = s_awaddr - REG_ARG0;
  assign roff      = s_araddr - REG_ARG0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_bvalid <= 1'b0;
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
      running  <= 1'b0;
      done_q   <= 1'b0;
      ap_start <= 1'b0;
      for (int i = 0; i < int'(NARGS); i++) args[i] <= '0;
    end else begin
      ap_start <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;

      if (ap_done) begin
        running <= 1'b0;
        done_q  <= 1'b1;
      end

      if (wr_go) begin
        s_bvalid <= 1'b1;
        if (s_awaddr == REG_CTRL) begin
          if (s_wdata[0] && !running) begin
            running  <= 1'b1;
            done_q   <= 1'b0;
            ap_start <= 1'b1;
          end
        end else if (s_awaddr >= REG_ARG0 && woff[1:0] == 2'b00 &&
                     woff[7:2] < 6'(NARGS)) begin
          args[AIW'(woff[7:2])] <= s_wdata;
        end
      end

      if (rd_go) begin
        s_rvalid <= 1'b1;
        s_rdata  <= '0;
        if (s_araddr == REG_CTRL) begin
          s_rdata <= {29'd0, !running, done_q, running};
          if (!(ap_done)) done_q <= 1'b0;   // clear on read
        end else if (s_araddr >= REG_ARG0 && roff[1:0] == 2'b00 &&
                     roff[7:2] < 6'(NARGS)) begin
          s_rdata <= args[AIW'(roff[7:2])];
        end
      end
    end
  end

  // AXI rule: a response stays valid until it is taken.
  property p_hold_b; @(posedge clk) disable iff (!rst_n) s_bvalid && !s_bready |=> s_bvalid; endproperty
  property p_hold_r; @(posedge clk) disable iff (!rst_n) s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata); endproperty
  a_hold_b: assert property (p_hold_b);
  a_hold_r: assert property (p_hold_r);
endmodule
