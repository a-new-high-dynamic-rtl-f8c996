// pof_link_rx: receiver of the beam current sent by the preceding BPM over
// the 8b/10b current link (see pof_link_tx). The line is sampled at the
// system clock after a two-flip-flop synchroniser. A 32-bit phase accumulator
// running at the nominal bit rate is set to half a bit on every line
// transition, so its carry falls in the middle of each bit. Received bits are
// shifted in 'a' first; a K28.5 comma in either disparity sets the character
// boundary and the lock flag. After a comma, NBYTES data characters form one
// current word (most significant byte first), shown on cur with a cur_valid
// pulse. A code error drops lock and the frame; a comma inside a frame
// restarts it. Latency from the last line bit to cur_valid is 3-5 clocks.
// 8b/10b at 10 Mbit/s follows the design; clock recovery and framing are
// this design's own.
module pof_link_rx #(
  parameter int unsigned W        = 26,
  parameter int unsigned NBYTES   = 4,
  parameter longint      CLK_HZ   = 52_000_000,
  parameter longint      BIT_RATE = 10_000_000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rx,
  output logic [W-1:0] cur,
  output logic         cur_valid,
  output logic         locked,
  output logic         code_err    // pulse: a character failed to decode
);
  localparam logic [31:0] INC = 32'(((longint'(1) <<< 32) * BIT_RATE + CLK_HZ / 2) / CLK_HZ);
  localparam int unsigned BCW = $clog2(NBYTES + 1);

  logic [2:0]          rx_sync;
  logic [31:0]         phase;
  logic                sample;
  logic [9:0]          sh, sh_next;
  logic [3:0]          bit_cnt;
  logic [BCW-1:0]      byte_cnt;
  logic                in_frame;
  logic [8*NBYTES-1:0] word;
  logic [7:0]          dec_data;
  logic                dec_comma, dec_err, comma_now;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) rx_sync <= '0;
    else        rx_sync <= {rx_sync[1:0], rx};

  // Clock recovery: re-centre on every edge, sample on the carry.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      phase  <= '0;
      sample <= 1'b0;
    end else if (rx_sync[2] != rx_sync[1]) begin
      phase  <= 32'h8000_0000 + INC;
      sample <= 1'b0;
    end else begin
      {sample, phase} <= {1'b0, phase} + {1'b0, INC};
    end

  assign sh_next = {sh[8:0], rx_sync[2]};
  assign comma_now = (sh_next == code8b10b_pkg::K28_5_RDN) || (sh_next == code8b10b_pkg::K28_5_RDP);

  dec_8b10b u_dec (.code(sh_next), .data(dec_data), .is_comma(dec_comma), .code_err(dec_err));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sh        <= '0;
      bit_cnt   <= '0;
      byte_cnt  <= '0;
      in_frame  <= 1'b0;
      word      <= '0;
      cur       <= '0;
      cur_valid <= 1'b0;
      locked    <= 1'b0;
      code_err  <= 1'b0;
    end else begin
      cur_valid <= 1'b0;
      code_err  <= 1'b0;
      if (sample) begin
        sh <= sh_next;
        if (comma_now) begin
          // character boundary found (or confirmed)
          bit_cnt  <= '0;
          locked   <= 1'b1;
          in_frame <= 1'b1;
          byte_cnt <= '0;
        end else if (bit_cnt == 4'd9) begin
          bit_cnt <= '0;
          if (locked) begin
            if (dec_err) begin
              locked   <= 1'b0;
              in_frame <= 1'b0;
              code_err <= 1'b1;
            end else if (in_frame && !dec_comma) begin
              word <= {word[8*NBYTES-9:0], dec_data};
              if (byte_cnt == BCW'(NBYTES - 1)) begin
                cur       <= W'({word[8*NBYTES-9:0], dec_data});
                cur_valid <= 1'b1;
                in_frame  <= 1'b0;
                byte_cnt  <= '0;
              end else begin
                byte_cnt <= byte_cnt + 1'b1;
              end
            end
          end
        end else begin
          bit_cnt <= bit_cnt + 1'b1;
        end
      end
    end
endmodule
