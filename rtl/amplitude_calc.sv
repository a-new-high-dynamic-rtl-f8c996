// amplitude_calc: amplitude of an averaged I/Q pair, floor(sqrt(i^2 + q^2)).
// On in_valid the two squares are summed into a radicand and a digit-by-digit
// square root resolves one result bit per clock (two radicand bits per step),
// so the result appears ROOT_W+1 clocks after in_valid, far inside one
// measurement window. The result saturates at 2^OUT_W-1. The design asks only
// for an amplitude calculation after the I/Q averaging; the iterative
// square-root method and its timing are this design's own.
module amplitude_calc
  import bpm_pkg::*;
#(
  parameter int unsigned IN_W  = IQ_W,
  parameter int unsigned OUT_W = AMP_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] i_in,
  input  logic signed [IN_W-1:0] q_in,
  input  logic                   in_valid,
  output logic [OUT_W-1:0]       amp,
  output logic                   amp_valid,
  output logic                   busy
);
  localparam int unsigned ROOT_W = IN_W;        // sqrt(2)*2^(IN_W-1) < 2^IN_W
  localparam int unsigned RAD_W  = 2 * ROOT_W;
  localparam int unsigned SW     = $clog2(ROOT_W + 1);

  logic [RAD_W-1:0]  rad;
  logic [ROOT_W+2:0] rem;
  logic [ROOT_W-1:0] root;
  logic [SW-1:0]     steps;
  logic [RAD_W-1:0]  sq_i, sq_q;
  logic [ROOT_W+2:0] rem_sh, trial;

  assign sq_i   = RAD_W'(i_in) * RAD_W'(i_in);
  assign sq_q   = RAD_W'(q_in) * RAD_W'(q_in);
  assign rem_sh = (rem << 2) | (ROOT_W+3)'(rad[RAD_W-1 -: 2]);
  assign trial  = (ROOT_W+3)'({root, 2'b01});

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rad       <= '0;
      rem       <= '0;
      root      <= '0;
      steps     <= '0;
      busy      <= 1'b0;
      amp       <= '0;
      amp_valid <= 1'b0;
    end else begin
      amp_valid <= 1'b0;
      if (in_valid) begin
        rad   <= sq_i + sq_q;
        rem   <= '0;
        root  <= '0;
        steps <= SW'(ROOT_W);
        busy  <= 1'b1;
      end else if (busy) begin
        rad <= rad << 2;
        if (rem_sh >= trial) begin
          rem  <= rem_sh - trial;
          root <= {root[ROOT_W-2:0], 1'b1};
        end else begin
          rem  <= rem_sh;
          root <= {root[ROOT_W-2:0], 1'b0};
        end
        steps <= steps - 1'b1;
        if (steps == SW'(1)) begin
          busy      <= 1'b0;
          amp_valid <= 1'b1;
        end
      end
      if (amp_valid_next()) amp <= sat(final_root());
    end

  function automatic logic amp_valid_next();
    return busy && !in_valid && steps == SW'(1);
  endfunction

  function automatic logic [ROOT_W-1:0] final_root();
    return {root[ROOT_W-2:0], (rem_sh >= trial)};
  endfunction

  function automatic logic [OUT_W-1:0] sat(logic [ROOT_W-1:0] r);
    if (r >= ROOT_W'(2**OUT_W - 1)) return '1;
    return OUT_W'(r);
  endfunction
endmodule
