// tb_fx_quant: checks the fixed-point conversion against an independent
// integer model: AP_RND (round half up) and AP_TRN (floor) when fraction
// bits are dropped, exact widening, AP_SAT clamping and AP_WRAP wrap-around
// with no saturation bits. The wrap case reproduces the document's
// ap_fixed<4,2,AP_TRN,AP_WRAP,0> example: input 2.0 represents as -2.0 and
// input 1.75 as 1.75.
module tb_fx_quant;
  int checks = 0, failures = 0;

  // 12-bit, 6 fraction bits -> 4-bit, 2 fraction bits (ap_fixed<4,2>)
  logic [11:0] din;
  logic [3:0]  d_rs, d_ts, d_tw, d_rw;
  logic        o_rs, o_ts, o_tw, o_rw;
  fx_quant #(.IW(12), .IF(6), .OW(4), .OF(2), .RND(1'b1), .SAT(1'b1)) q_rs (.din, .dout(d_rs), .ovf(o_rs));
  fx_quant #(.IW(12), .IF(6), .OW(4), .OF(2), .RND(1'b0), .SAT(1'b1)) q_ts (.din, .dout(d_ts), .ovf(o_ts));
  fx_quant #(.IW(12), .IF(6), .OW(4), .OF(2), .RND(1'b0), .SAT(1'b0)) q_tw (.din, .dout(d_tw), .ovf(o_tw));
  fx_quant #(.IW(12), .IF(6), .OW(4), .OF(2), .RND(1'b1), .SAT(1'b0)) q_rw (.din, .dout(d_rw), .ovf(o_rw));
  // widening: 8-bit 2 fraction bits -> 16-bit 6 fraction bits
  logic [7:0]  wi;
  logic [15:0] wo;
  logic        wovf;
  fx_quant #(.IW(8), .IF(2), .OW(16), .OF(6), .RND(1'b1), .SAT(1'b1)) q_w (.din(wi), .dout(wo), .ovf(wovf));

  function automatic int fl(input int v, input int sh);   // floor(v / 2^sh)
    return (v >= 0) ? v / (1 << sh) : -((-v + (1 << sh) - 1) / (1 << sh));
  endfunction

  task automatic chk(input int got, input int exp_v, input string what, input int v);
    checks++;
    if (got != exp_v) begin failures++; $display("FAIL %s in=%0d got %0d exp %0d", what, v, got, exp_v); end
  endtask

  initial begin
    for (int v = -2048; v < 2048; v++) begin
      int r, t, rs, ts;
      din = 12'(v);
      #1;
      r  = fl(v + 8, 4);                 // round half up to 2 fraction bits
      t  = fl(v, 4);
      rs = (r > 7) ? 7 : (r < -8) ? -8 : r;
      ts = (t > 7) ? 7 : (t < -8) ? -8 : t;
      chk(int'($signed(d_rs)), rs, "RND SAT", v);
      chk(int'($signed(d_ts)), ts, "TRN SAT", v);
      chk(int'($signed(d_tw)), (((t + 8) % 16) + 16) % 16 - 8, "TRN WRAP", v);
      chk(int'($signed(d_rw)), (((r + 8) % 16) + 16) % 16 - 8, "RND WRAP", v);
      chk(int'(o_ts), int'(t != ts), "overflow flag", v);
    end
    // the document's wrap example
    din = 12'(2 * 64); #1; chk(int'($signed(d_tw)), -8, "2.0 wraps to -2.0", 128);
    din = 12'(112);    #1; chk(int'($signed(d_tw)), 7, "1.75 stays", 112);
    din = 12'(-6 * 64); #1; chk(int'($signed(d_tw)), -8, "-6.0 wraps to -2.0", -384);
    for (int v = -128; v < 128; v++) begin
      wi = 8'(v); #1;
      chk(int'($signed(wo)), v * 16, "widen", v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
