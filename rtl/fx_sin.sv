// fx_sin: sine of a signed fixed-point number (W bits, F fraction bits),
// for the sin() of the phi kernel.
//
// How it works: the argument is first reduced to r = x - k*2*pi with
// k = round(x / (2*pi)), computed with a 32-bit reciprocal of 2*pi and a
// 2*pi constant with 32 fraction bits, so r lies in [-pi, pi]; r is then
// folded into [-pi/2, pi/2] (sin(pi - r) = sin(r)). A CORDIC rotation of the
// vector (K, 0) by r, ITER iterations with 30 fraction bits, leaves sin(r)
// in the y register; K = 0.6072529350 is the CORDIC gain compensation. The
// result is truncated to F fraction bits. The arctangent table holds
// round(atan(2^-i) * 2^30).
//
// Interface: pulse `start` with `x` while `busy` is low; `done` pulses
// ITER+1 cycles later with `y` valid (held until the next start). The
// document only names the function (it used the vendor maths library); the
// algorithm is this design's own choice. F must not exceed 32.
module fx_sin #(
  parameter int unsigned W    = 32,
  parameter int unsigned F    = 16,
  parameter int unsigned ITER = 26
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] x,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] y
);
  localparam int unsigned CW = 34;                        // CORDIC width, 30 fraction bits
  localparam logic signed [127:0] INV_2PI = 128'sd683565276;     // 2^32 / (2 pi)
  localparam logic signed [127:0] TWO_PI  = 128'sd26986075409;   // 2 pi * 2^32
  localparam logic signed [127:0] PI      = 128'sd13493037705;   // pi * 2^32
  localparam logic signed [127:0] HALF_PI = 128'sd6746518852;    // pi/2 * 2^32
  localparam logic signed [CW-1:0] K_GAIN = CW'(652032874);      // 0.60725 * 2^30

  function automatic logic signed [CW-1:0] atan_tab(input int i);
    unique case (i)
      0: return CW'(843314857);  1: return CW'(497837829);  2: return CW'(263043837);
      3: return CW'(133525159);  4: return CW'(67021687);   5: return CW'(33543516);
      6: return CW'(16775851);   7: return CW'(8388437);    8: return CW'(4194283);
      9: return CW'(2097149);    default: return (i < 31) ? (CW'(1) <<< (30 - i)) : '0;
    endcase
  endfunction

  // range reduction (combinational on the input)
  logic signed [127:0] xs, kq, r0, r1;
  always_comb begin
    xs = 128'($signed(x)) <<< (32 - F);                   // 32 fraction bits
    kq = (xs * INV_2PI + (128'sd1 <<< 63)) >>> 64;        // round(x / 2pi)
    r0 = xs - kq * TWO_PI;                                // [-pi, pi]
    if (r0 > HALF_PI)       r1 = PI - r0;
    else if (r0 < -HALF_PI) r1 = -PI - r0;
    else                    r1 = r0;
  end

  localparam int unsigned IW = $clog2(ITER + 1);
  logic [IW-1:0] it;
  logic signed [CW-1:0] cx, cy, cz;

  assign y = W'(cy >>> (30 - F));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; it <= '0;
      cx <= '0; cy <= '0; cz <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        it   <= '0;
        cx   <= K_GAIN;
        cy   <= '0;
        cz   <= CW'(r1 >>> 2);                            // 30 fraction bits
      end else if (busy) begin
        if (!cz[CW-1]) begin
          cx <= cx - (cy >>> it);
          cy <= cy + (cx >>> it);
          cz <= cz - atan_tab(int'(it));
        end else begin
          cx <= cx + (cy >>> it);
          cy <= cy - (cx >>> it);
          cz <= cz + atan_tab(int'(it));
        end
        it <= it + 1'b1;
        if (it == IW'(ITER - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
