// dac_serial: continuous serial stream to one DAC. Each word is sent MSB
// first as BITS bits, CLK_DIV system clocks per bit (52 MHz / 8 = 6.5 Mbit/s),
// so one word takes BITS*CLK_DIV = 128 clocks = one 406 kSPS sample period and
// the link carries no gaps. sclk is low in the first and high in the second
// half of each bit (the DAC samples on the rising edge, mid-bit); fsync is
// high during the MSB and marks the word boundary. The frame counter starts
// with the first load and then runs freely; each frame sends the newest
// loaded word (a load in the frame's last clock is taken for the next frame).
// The 16-bit words and 6.5 Mbit/s rate follow the design; the pin protocol
// (sclk phase, frame-sync marker, two's-complement data) is this design's own.
module dac_serial #(
  parameter int unsigned BITS    = 16,
  parameter int unsigned CLK_DIV = 8    // must be a power of two, >= 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [BITS-1:0] word,
  input  logic            load,
  output logic            sclk,
  output logic            sdata,
  output logic            fsync
);
  localparam int unsigned PW = $clog2(CLK_DIV);
  localparam int unsigned BW = $clog2(BITS);
  localparam int unsigned FW = PW + BW;
  localparam int unsigned FRAME = BITS * CLK_DIV;

  logic [FW-1:0]   cnt;
  logic [BITS-1:0] hold, shreg;
  logic            running;
  logic            frame_end;

  assign frame_end = !running || cnt == FW'(FRAME - 1);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt     <= '0;
      hold    <= '0;
      shreg   <= '0;
      running <= 1'b0;
    end else begin
      if (load) hold <= word;
      if (load && !running) running <= 1'b1;
      if (running || load) begin
        if (frame_end) begin
          cnt   <= '0;
          shreg <= load ? word : hold;
        end else begin
          cnt <= cnt + 1'b1;
          if (cnt[PW-1:0] == PW'(CLK_DIV - 1)) shreg <= {shreg[BITS-2:0], 1'b0};
        end
      end
    end

  assign sdata = running && shreg[BITS-1];
  assign sclk  = running && cnt[PW-1];
  assign fsync = running && (cnt[FW-1:PW] == '0);
endmodule
