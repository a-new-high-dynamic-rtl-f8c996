// pof_link_tx: transmitter of the beam-current link to the following DCM
// (plastic optical fibre, 8b/10b, 10 Mbit/s). The line carries the comma
// K28.5 while idle. A new current word (cur_valid) is sent as one frame:
// the comma already on the line followed by NBYTES data characters, most
// significant byte first; each frame then ends with at least one comma.
// Bits are paced by a 32-bit phase accumulator (BIT_RATE out of CLK_HZ, 10 of
// 52 MHz: 5.2 clocks per bit), 'a' bit first. A frame takes
// (NBYTES+1)*10 bits = 5 us, shorter than one 9.85 us result period, so no
// word is lost; a word arriving while a frame is in flight waits for it.
// 8b/10b at 10 Mbit/s follows the design; the framing is this design's own.
module pof_link_tx #(
  parameter int unsigned W        = 26,
  parameter int unsigned NBYTES   = 4,
  parameter longint      CLK_HZ   = 52_000_000,
  parameter longint      BIT_RATE = 10_000_000
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] cur,
  input  logic         cur_valid,
  output logic         tx,
  output logic         frame_sent   // pulse when the last data character is loaded
);
  localparam logic [31:0] INC = 32'(((longint'(1) <<< 32) * BIT_RATE + CLK_HZ / 2) / CLK_HZ);
  localparam int unsigned BCW = $clog2(NBYTES + 1);

  logic [31:0]           phase;
  logic                  bit_tick;
  logic [3:0]            bit_idx;
  logic [9:0]            sh;
  logic [8*NBYTES-1:0]   word, pend_word;
  logic                  pending;
  logic [BCW-1:0]        byte_idx;     // 0: idle/comma, 1..NBYTES: data character next
  logic [7:0]            enc_data;
  logic                  enc_k, enc_en;
  logic [9:0]            enc_code;
  logic                  loading_comma;

  // Bit clock: the accumulator's carry.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) {bit_tick, phase} <= '0;
    else        {bit_tick, phase} <= {1'b0, phase} + {1'b0, INC};

  assign enc_en = bit_tick && bit_idx == 4'd9;
  // A frame may only follow a comma: the character loaded now must be one.
  assign loading_comma = (enc_code == code8b10b_pkg::K28_5_RDN) ||
                         (enc_code == code8b10b_pkg::K28_5_RDP);

  // Next character to prepare, chosen while the prepared one is loaded.
  always_comb begin
    enc_k    = 1'b1;
    enc_data = 8'hBC;
    if (byte_idx != '0) begin
      enc_k    = 1'b0;
      enc_data = word[8*NBYTES-1 - 8*(int'(byte_idx) - 1) -: 8];
    end else if (pending && loading_comma) begin
      enc_k    = 1'b0;
      enc_data = pend_word[8*NBYTES-1 -: 8];
    end
  end

  enc_8b10b u_enc (
    .clk, .rst_n, .data(enc_data), .k(enc_k), .en(enc_en), .code(enc_code), .rd()
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      bit_idx    <= '0;
      sh         <= code8b10b_pkg::K28_5_RDN;
      word       <= '0;
      pend_word  <= '0;
      pending    <= 1'b0;
      byte_idx   <= '0;
      frame_sent <= 1'b0;
    end else begin
      frame_sent <= 1'b0;
      if (cur_valid) begin
        pend_word <= (8*NBYTES)'(cur);
        pending   <= 1'b1;
      end
      if (bit_tick) begin
        if (bit_idx == 4'd9) begin
          bit_idx <= '0;
          sh      <= enc_code;
          if (byte_idx != '0) begin
            if (byte_idx == BCW'(NBYTES)) begin
              byte_idx   <= '0;
              frame_sent <= 1'b1;
            end else begin
              byte_idx <= byte_idx + 1'b1;
            end
          end else if (pending && loading_comma) begin
            word     <= pend_word;
            byte_idx <= BCW'(2);
            if (!cur_valid) pending <= 1'b0;
            if (NBYTES == 1) byte_idx <= '0;
          end
        end else begin
          bit_idx <= bit_idx + 1'b1;
          sh      <= {sh[8:0], 1'b0};
        end
      end
    end

  assign tx = sh[9];
endmodule
