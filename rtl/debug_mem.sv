// debug_mem: raw-sample memory, NCH channels x DEPTH 16-bit samples.
// Capture: after an arm pulse, recording starts with the next trig pulse and
// stores DEPTH consecutive samples of every channel; done then stays set until
// the next arm. Playback (hardware-in-the-loop test): while play_en is set the
// memory is read out cyclically, one sample per channel per clock, on
// play_sample: address 0 appears after the first clock edge with play_en set,
// then one address per clock, wrapping at DEPTH; the top feeds these samples to the processing
// chain instead of the ADCs. Bus port: word address {channel, index}; a write
// stores wdata, a read returns rdata one clock after rd_en. Bus reads while
// play_en is set return playback data. Bus writes are ignored during a capture.
// The 4 x 16 k sample size, the capture of raw data and the loading of stimuli
// for processing follow the design; the arm/trigger scheme and the bus port
// are this design's own.
module debug_mem
  import bpm_pkg::*;
#(
  parameter int unsigned DEPTH = DBG_DEPTH,   // power of two
  parameter int unsigned NC    = NCH
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NC-1:0][ADC_W-1:0]      samples,
  input  logic                          arm,
  input  logic                          trig,
  output logic                          capturing,
  output logic                          done,
  input  logic                          play_en,
  output logic [NC-1:0][ADC_W-1:0]      play_sample,
  input  logic [$clog2(NC*DEPTH)-1:0]   bus_addr,
  input  logic                          bus_we,
  input  logic                          bus_rd,
  input  logic [ADC_W-1:0]              bus_wdata,
  output logic [ADC_W-1:0]              bus_rdata
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CHW = (NC > 1) ? $clog2(NC) : 1;

  logic [AW-1:0]    cap_addr, play_addr, rd_addr;
  logic             armed;
  logic [AW-1:0]    bus_idx;
  logic [CHW-1:0]   bus_ch, bus_ch_q;
  logic [NC-1:0][ADC_W-1:0] rd_q;

  assign bus_idx = bus_addr[AW-1:0];
  assign bus_ch  = CHW'(bus_addr >> AW);
  assign rd_addr = play_en ? play_addr : bus_idx;

  // Capture control
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      armed     <= 1'b0;
      capturing <= 1'b0;
      done      <= 1'b0;
      cap_addr  <= '0;
    end else begin
      if (arm) begin
        armed     <= 1'b1;
        done      <= 1'b0;
        capturing <= 1'b0;
        cap_addr  <= '0;
      end else if (armed && trig) begin
        armed     <= 1'b0;
        capturing <= 1'b1;
        cap_addr  <= AW'(1);
      end else if (capturing) begin
        cap_addr <= cap_addr + 1'b1;
        if (cap_addr == AW'(DEPTH - 1)) begin
          capturing <= 1'b0;
          done      <= 1'b1;
        end
      end
    end

  // Playback address
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        play_addr <= '0;
    else if (!play_en) play_addr <= '0;
    else               play_addr <= play_addr + 1'b1;

  // Memory arrays: one write and one read port per channel.
  for (genvar c = 0; c < NC; c++) begin : g_ch
    logic [ADC_W-1:0] mem [DEPTH];
    logic          we;
    logic [AW-1:0] wa;
    logic [ADC_W-1:0] wd;
    always_comb begin
      we = 1'b0;
      wa = bus_idx;
      wd = bus_wdata;
      if (armed && trig && !arm) begin
        we = 1'b1; wa = '0;       wd = samples[c];
      end else if (capturing) begin
        we = 1'b1; wa = cap_addr; wd = samples[c];
      end else if (bus_we && bus_ch == CHW'(c)) begin
        we = 1'b1;
      end
    end
    always_ff @(posedge clk) begin
      if (we) mem[wa] <= wd;
      rd_q[c] <= mem[rd_addr];
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      bus_ch_q <= '0;
    else if (bus_rd) bus_ch_q <= bus_ch;

  assign play_sample = rd_q;
  assign bus_rdata   = rd_q[bus_ch_q];
endmodule
