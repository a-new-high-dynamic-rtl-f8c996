// timing_gen: internal timing of the BPM signal processing, one 52 MHz clock.
// A window counter runs over WIN_LEN ADC samples and pulses win_start on the
// first and win_last on the last sample of every measurement window. An
// external bunch trigger (synchronised here with two flip-flops) restarts the
// window on its rising edge when trig_en is set, so that a single bunch lies at
// the start of a window; the partial window before it never completes and is
// flagged by win_abort. A separate free-running counter gives
// tick_res, one pulse every WIN_LEN clocks (101.6 kHz), which paces the output
// interpolation filters independently of trigger re-alignment.
// The window length and rates follow the design; re-alignment on the trigger
// edge, the abort pulse and the free-running output tick are this design's
// own choices. win_start follows 2 clocks after the clock edge that first
// samples the trigger high.
module timing_gen #(
  parameter int unsigned WIN_LEN = 512
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bunch_trig,   // asynchronous external bunch trigger
  input  logic trig_en,      // allow trigger re-alignment
  output logic win_start,    // first sample of a window
  output logic win_last,     // last sample of a window
  output logic win_abort,    // window restarted by trigger before completion
  output logic tick_res      // free-running result-rate tick
);
  localparam int unsigned CW = $clog2(WIN_LEN);
  logic [2:0]    trig_sync;
  logic          trig_rise;
  logic [CW-1:0] win_cnt, free_cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) trig_sync <= '0;
    else        trig_sync <= {trig_sync[1:0], bunch_trig};

  assign trig_rise = trig_en && trig_sync[1] && !trig_sync[2];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      win_cnt  <= '0;
      free_cnt <= '0;
    end else begin
      free_cnt <= (free_cnt == CW'(WIN_LEN-1)) ? '0 : free_cnt + 1'b1;
      if (trig_rise || win_cnt == CW'(WIN_LEN-1)) win_cnt <= '0;
      else                                        win_cnt <= win_cnt + 1'b1;
    end

  // Pulses refer to the sample accepted in the same clock. A window cut short
  // by the trigger never sees win_last, so its partial sum is simply
  // overwritten at the next win_start.
  assign win_start = (win_cnt == '0);
  assign win_last  = (win_cnt == CW'(WIN_LEN-1));
  assign win_abort = trig_rise && !win_last;
  assign tick_res  = (free_cnt == '0);
endmodule
