// dcm: differential current monitor. Each new own beam current (cur_valid)
// is compared with the latest current of the preceding BPM, received over the
// current link: fast_diff = own - preceding. The difference is integrated by
// dcm_integrator (100 ms time constant) into slow_diff, and the interlock is
// raised while |slow_diff| exceeds the threshold set over the register bus.
// fast_diff is registered 1 clock after cur_valid, slow_diff and interlock
// 2 clocks after. The chain difference -> integrator -> comparator with a
// threshold follows the design; comparing the magnitude (so that a loss shows
// whatever the sign convention) and not latching the interlock are this
// design's own choices.
module dcm
  import bpm_pkg::*;
#(
  parameter int unsigned CW          = CUR_W,
  parameter int unsigned TAU_SAMPLES = 10156
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [CW-1:0]       own_current,
  input  logic                cur_valid,
  input  logic [CW-1:0]       prev_current,   // preceding BPM, held between updates
  input  logic [CW:0]         threshold,
  output logic signed [CW:0]  fast_diff,
  output logic signed [CW:0]  slow_diff,
  output logic                diff_valid,
  output logic                interlock
);
  logic        fd_valid;
  logic [CW:0] slow_mag;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      fast_diff <= '0;
      fd_valid  <= 1'b0;
    end else begin
      fd_valid <= cur_valid;
      if (cur_valid) fast_diff <= $signed({1'b0, own_current}) - $signed({1'b0, prev_current});
    end

  dcm_integrator #(.W(CW + 1), .TAU_SAMPLES(TAU_SAMPLES)) u_int (
    .clk, .rst_n, .x(fast_diff), .in_valid(fd_valid), .y(slow_diff), .y_valid(diff_valid)
  );

  assign slow_mag  = slow_diff[CW] ? (CW+1)'(-slow_diff) : (CW+1)'(slow_diff);
  assign interlock = (slow_mag > threshold);
endmodule
