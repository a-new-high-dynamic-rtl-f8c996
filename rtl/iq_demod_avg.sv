// iq_demod_avg: I/Q demodulation and averaging of one IF channel.
// The IF lies at 3/8 of the sample rate (19.5 MHz at 52 MSPS), so the local
// oscillator advances 135 degrees per sample and repeats every 8 samples; its
// cosine and sine take only the values 0, +-1 and +-sqrt(2)/2. Each sample is
// multiplied by the two LO values (stage 1) and the products are summed over
// one measurement window (stage 2). Because the window (512 samples) is a whole
// number of LO periods, the sum acts as a band-pass with notches at the ADC
// harmonics. The LO phase runs freely, so the window may start anywhere.
// Outputs: i_out/q_out = 2/WIN_LEN * sum(x*cos), 2/WIN_LEN * sum(x*sin) in ADC
// LSB with 8 fraction bits, so sqrt(i^2+q^2) is the IF peak amplitude.
// Timing: sample accepted every clock; iq_valid pulses 2 clocks after the
// sample marked win_last. IF = 3/8 fs and 512-sample averaging follow the
// design; the coefficient precision (Q2.15) and output scaling are this
// design's own.
module iq_demod_avg
  import bpm_pkg::*;
#(
  parameter int unsigned WIN_LEN = AVG_N,  // must be a power of two, >= 8
  parameter int unsigned OUT_W   = IQ_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ADC_W-1:0] sample,
  input  logic                    win_start,
  input  logic                    win_last,
  output logic signed [OUT_W-1:0] i_out,
  output logic signed [OUT_W-1:0] q_out,
  output logic                    iq_valid
);
  localparam int unsigned LOG_N = $clog2(WIN_LEN);
  localparam int unsigned CW    = 18;                   // Q2.15 coefficients
  localparam int unsigned PW    = ADC_W + CW;
  localparam int unsigned ACC_W = PW + LOG_N;
  localparam logic signed [CW-1:0] ONE = 18'sd32768;
  localparam logic signed [CW-1:0] S45 = 18'sd23170;   // round(2^15 / sqrt(2))
  // Shift that maps the window sum to 2/N * sum with 8 fraction bits.
  localparam int unsigned SHR = 15 + LOG_N - 1 - 8;

  logic [2:0]                 phase;
  logic signed [CW-1:0]       c, s;
  logic signed [PW-1:0]       prod_i, prod_q;
  logic                       start_d, last_d;
  logic signed [ACC_W-1:0]    acc_i, acc_q, sum_i, sum_q;

  // LO table for phase k: angle = 135 deg * k.
  always_comb begin
    unique case (phase)
      3'd0: begin c =  ONE; s = '0;   end
      3'd1: begin c = -S45; s =  S45; end
      3'd2: begin c = '0;   s = -ONE; end
      3'd3: begin c =  S45; s =  S45; end
      3'd4: begin c = -ONE; s = '0;   end
      3'd5: begin c =  S45; s = -S45; end
      3'd6: begin c = '0;   s =  ONE; end
      default: begin c = -S45; s = -S45; end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      phase   <= '0;
      prod_i  <= '0;
      prod_q  <= '0;
      start_d <= 1'b0;
      last_d  <= 1'b0;
    end else begin
      phase   <= phase + 3'd1;
      prod_i  <= PW'(sample) * PW'(c);
      prod_q  <= PW'(sample) * PW'(s);
      start_d <= win_start;
      last_d  <= win_last;
    end

  assign sum_i = (start_d ? '0 : acc_i) + ACC_W'(prod_i);
  assign sum_q = (start_d ? '0 : acc_q) + ACC_W'(prod_q);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      acc_i    <= '0;
      acc_q    <= '0;
      i_out    <= '0;
      q_out    <= '0;
      iq_valid <= 1'b0;
    end else begin
      acc_i    <= sum_i;
      acc_q    <= sum_q;
      iq_valid <= last_d;
      if (last_d) begin
        i_out <= OUT_W'(sum_i >>> SHR);
        q_out <= OUT_W'(sum_q >>> SHR);
      end
    end
endmodule
