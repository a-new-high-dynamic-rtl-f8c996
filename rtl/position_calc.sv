// position_calc: normalised beam position from two opposite electrodes,
// pos = (a - b) / (a + b), as a signed Q1.15 fraction (-1 .. +1).
// On in_valid the magnitude |a-b| and the sum a+b are latched and a restoring
// divider produces one quotient bit per clock; the sign is applied at the end.
// Result POS_W clocks after in_valid (pos_valid pulse). A zero sum gives
// position 0; a signal on one electrode only gives +-32767.
// Difference-over-sum follows the design; the Q1.15 format, the sign
// convention (a = left/top, b = right/bottom) and the omission of a scale
// factor to millimetres (none is given) are this design's own.
module position_calc
  import bpm_pkg::*;
#(
  parameter int unsigned IN_W  = AMP_W,
  parameter int unsigned OUT_W = POS_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [IN_W-1:0]         a,
  input  logic [IN_W-1:0]         b,
  input  logic                    in_valid,
  output logic signed [OUT_W-1:0] pos,
  output logic                    pos_valid
);
  localparam int unsigned FRAC = OUT_W - 1;
  localparam int unsigned SW   = $clog2(FRAC + 1);

  logic [IN_W:0]   den, rem;
  logic [IN_W+1:0] rem_sh;
  logic [FRAC-1:0] quo, q_last;
  logic            neg, busy;
  logic [SW-1:0]   steps;

  assign rem_sh = {rem, 1'b0};
  // quotient including the bit resolved in the last step
  assign q_last = {quo[FRAC-2:0], (rem_sh >= (IN_W+2)'(den))};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      den       <= '0;
      rem       <= '0;
      quo       <= '0;
      neg       <= 1'b0;
      busy      <= 1'b0;
      steps     <= '0;
      pos       <= '0;
      pos_valid <= 1'b0;
    end else begin
      pos_valid <= 1'b0;
      if (in_valid) begin
        den   <= (IN_W+1)'(a) + (IN_W+1)'(b);
        rem   <= (a >= b) ? (IN_W+1)'(a - b) : (IN_W+1)'(b - a);
        neg   <= (b > a);
        quo   <= '0;
        steps <= SW'(FRAC);
        busy  <= 1'b1;
      end else if (busy) begin
        if (rem_sh >= (IN_W+2)'(den)) begin
          rem <= (IN_W+1)'(rem_sh - (IN_W+2)'(den));
          quo <= {quo[FRAC-2:0], 1'b1};
        end else begin
          rem <= rem_sh[IN_W:0];
          quo <= {quo[FRAC-2:0], 1'b0};
        end
        steps <= steps - 1'b1;
        if (steps == SW'(1)) begin
          busy      <= 1'b0;
          pos_valid <= 1'b1;
          if (den == '0) pos <= '0;
          else     pos <= neg ? -$signed({1'b0, q_last}) : $signed({1'b0, q_last});
        end
      end
    end
endmodule
