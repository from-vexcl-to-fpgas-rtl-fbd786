// udiv_seq: sequential unsigned divider (restoring, one quotient bit per
// cycle). Used for the index arithmetic of the affine kernel (the modulo and
// division of the VexCL reshape/reduce expressions) and, through a sign
// wrapper, for the division of the phi kernel.
//
// Interface: pulse `start` with `num`/`den` while `busy` is low; `done`
// pulses W+1 cycles later with `quo` and `rem` valid (they hold until the next
// start). A zero divisor gives an all-ones quotient and rem = num, as a
// restoring divider naturally does. This block is this design's own choice:
// the document leaves the arithmetic to the synthesis tool.
module udiv_seq #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quo,
  output logic [W-1:0] rem
);
  localparam int unsigned CW = $clog2(W + 1);
  logic [CW-1:0] cnt;
  logic [W-1:0]  d_q;
  logic [W:0]    trial;

  assign trial = {rem, quo[W-1]} - {1'b0, d_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      d_q  <= '0;
      quo  <= '0;
      rem  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        cnt  <= CW'(W);
        d_q  <= den;
        quo  <= num;
        rem  <= '0;
      end else if (busy) begin
        // shift {rem, quo} left by one, try to subtract the divisor
        if (!trial[W]) begin
          rem <= trial[W-1:0];
          quo <= {quo[W-2:0], 1'b1};
        end else begin
          rem <= {rem[W-2:0], quo[W-1]};
          quo <= {quo[W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
