// fx_log: natural logarithm of a signed fixed-point number (W bits, F
// fraction bits), for the log() of the phi kernel.
//
// How it works: the position p of the leading one gives the integer part of
// log2(x), e = p - F, and the input shifted so that this one is the top bit
// is the mantissa m in [1, 2) with W-1 fraction bits. The fraction bits of
// log2(m) are then produced one per cycle by squaring: m <- m*m, and if
// m >= 2 the next bit is 1 and m <- m/2. Finally ln(x) = log2(x) * ln(2),
// with ln(2) held to 32 fraction bits, truncated to F fraction bits.
// For x <= 0 (where the logarithm is -infinity or undefined) the result is
// the most negative value and `bad` is set; this is this design's choice.
//
// Interface: pulse `start` with `x` while `busy` is low; `done` pulses
// FB+1 cycles later (FB = F + 4 bits of log2 fraction) with `y` valid, held
// until the next start. The document only names the function; the
// algorithm is this design's own.
module fx_log #(
  parameter int unsigned W = 32,
  parameter int unsigned F = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] x,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] y,
  output logic         bad
);
  localparam int unsigned FB  = F + 4;                    // log2 fraction bits computed
  localparam int unsigned MF  = W - 1;                    // mantissa fraction bits
  localparam logic [63:0] LN2 = 64'd2977044472;           // ln 2 * 2^32
  localparam int unsigned CW  = $clog2(FB + 2);
  localparam int unsigned PW  = $clog2(W);

  // leading one of the input
  logic [PW-1:0] lead;
  always_comb begin
    lead = '0;
    for (int b = 0; b < int'(W); b++) if (x[b]) lead = PW'(b);
  end

  logic [CW-1:0]        cnt;
  logic [MF:0]          m;                                // [1, 2), MF fraction bits
  logic [2*MF+1:0]      sq;
  logic signed [31:0]   e;
  logic [FB-1:0]        frac;
  logic signed [127:0]  l2, ln_full;

  assign sq = m * m;                                      // 2*MF fraction bits

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; cnt <= '0; m <= '0; e <= '0; frac <= '0; bad <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        cnt  <= CW'(FB);
        bad  <= x[W-1] || (x == '0);
        e    <= 32'(lead) - 32'(F);
        m    <= (MF+1)'(x << (W - 1 - int'(lead)));
        frac <= '0;
      end else if (busy) begin
        if (sq[2*MF+1]) begin                             // m*m >= 2
          m    <= sq[2*MF+1:MF+1];
          frac <= {frac[FB-2:0], 1'b1};
        end else begin
          m    <= sq[2*MF:MF];
          frac <= {frac[FB-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // log2(x) with FB fraction bits, times ln 2 (32 fraction bits)
  always_comb begin
    l2      = (128'(e) <<< FB) + 128'(frac);
    ln_full = (l2 * $signed(128'(LN2))) >>> (FB + 32 - F);
    y       = bad ? {1'b1, {(W-1){1'b0}}} : ln_full[W-1:0];
  end
endmodule
