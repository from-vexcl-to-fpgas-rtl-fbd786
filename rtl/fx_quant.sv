// fx_quant: conversion of a signed fixed-point number from one format to
// another, with the quantization and overflow modes of the vendor fixed-point
// type the kernels use (ap_fixed<W, I, Q, O>).
//
// The input has IW bits of which IF are fraction bits, the output OW bits of
// which OF are fraction bits. When fraction bits are dropped, RND=1 selects
// AP_RND (round to nearest, a tie rounds toward plus infinity: add half an
// output LSB, then floor) and RND=0 selects AP_TRN (floor, i.e. truncate
// toward minus infinity). When the value does not fit, SAT=1 selects AP_SAT
// (clamp to the largest or smallest output value) and SAT=0 selects AP_WRAP
// with no saturation bits (keep the low OW bits, so a positive value may wrap
// to a negative one). The mode names follow the document; that AP_RND rounds
// half-way cases upward is this design's reading of the vendor type.
//
// Purely combinational. `ovf` flags that saturation or wrapping changed the
// value.
module fx_quant #(
  parameter int unsigned IW  = 36,
  parameter int unsigned IF  = 22,
  parameter int unsigned OW  = 64,
  parameter int unsigned OF  = 10,
  parameter bit          RND = 1'b1,
  parameter bit          SAT = 1'b1
) (
  input  logic [IW-1:0] din,
  output logic [OW-1:0] dout,
  output logic          ovf
);
  localparam int unsigned SH = (OF >= IF) ? (OF - IF) : (IF - OF);
  localparam int unsigned XA = IW + SH + 2;
  localparam int unsigned XW = (XA > OW + 1) ? XA : OW + 1;

  logic signed [XW-1:0] ext, aligned, vmax, vmin;

  assign ext  = XW'($signed(din));
  assign vmax = XW'({1'b0, {(OW-1){1'b1}}});
  assign vmin = -vmax - XW'(1);

  generate
    if (OF >= IF) begin : g_widen
      assign aligned = ext <<< SH;
    end else if (RND) begin : g_round
      assign aligned = (ext + (XW'(1) <<< (SH - 1))) >>> SH;
    end else begin : g_trunc
      assign aligned = ext >>> SH;
    end
  endgenerate

  always_comb begin
    ovf  = (aligned > vmax) || (aligned < vmin);
    dout = aligned[OW-1:0];
    if (SAT && ovf) dout = (aligned > vmax) ? vmax[OW-1:0] : vmin[OW-1:0];
  end
endmodule
