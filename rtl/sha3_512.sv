// sha3_512: SHA3-512 hash unit (FIPS 202, Keccak[c = 1024] with r = 576,
// suffix 01 and pad10*1), one Keccak-f round per clock.
// Datapath, after the paper's SHA-3 block: 16-bit message words enter a
// serial-in/parallel-out register (SIPO) counted by Cnt 0, whose terminal
// count Z0 marks a full rate block; the block is XORed into the rate part of
// the round register and a 2:1 multiplexer chooses between that sum (first
// round of a block) and the round register itself (rounds 1-23); the
// capacity part passes beside it. Cnt 1 (5 bits) counts the 24 rounds of f
// and its terminal count Z1 ends the permutation. H(m) is the first 512 bits
// of the round register.
// The paper's figure labels the SIPO/XOR path 1024 and the bypass 576;
// the rate of SHA3-512, which the text specifies, is 576 bits and the
// capacity 1024, and this unit follows the text (RATE parameter).
// Padding (0x06 after the last message byte, 0x80 in the last byte of the
// block, an extra block when the message ends exactly on a block boundary)
// is done here in hardware; the paper shows it only as the 'pad' step.
// Interface: 'init' clears the state for a new message. A word is taken when
// in_valid & in_ready; byte 0 of the word is in_data[7:0]. With in_last the
// word carries in_bytes (0, 1 or 2) valid bytes and closes the message.
// digest_valid rises 24 cycles after the last block is complete and stays
// high until the next 'init'; digest byte i is digest[8i+7:8i].
module sha3_512 #(
  parameter int unsigned RATE     = 576,
  parameter int unsigned OUT_BITS = 512
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                init,
  input  logic                in_valid,
  input  logic [15:0]         in_data,
  input  logic                in_last,
  input  logic [1:0]          in_bytes,
  output logic                in_ready,
  output logic                digest_valid,
  output logic [OUT_BITS-1:0] digest
);
  localparam int unsigned WORDS = RATE / 16;
  localparam int unsigned BYTES = RATE / 8;
  localparam int unsigned CW    = $clog2(WORDS + 1);

  typedef enum logic [1:0] {S_ABSORB, S_PERM, S_DONE} state_e;
  state_e state;

  logic [1599:0]   st;           // round register
  logic [RATE-1:0] sipo, blk;
  logic [CW-1:0]   cnt0;         // Cnt 0: words in the SIPO
  logic [4:0]      cnt1;         // Cnt 1: round counter
  logic            first_rnd;    // multiplexer select: absorb the block
  logic            last_blk;     // permutation of the final block
  logic            extra_pad;    // a separate padding block is still due
  logic            z0, z1;
  logic [1599:0]   f_in, f_out;

  // Z0: the incoming word fills the block
  assign z0 = (cnt0 == CW'(WORDS - 1));
  assign z1 = (cnt1 == 5'd23);

  // word insertion and padding
  logic [RATE-1:0] word_blk;
  logic [$clog2(BYTES+1)-1:0] pad_pos;
  always_comb begin
    word_blk = sipo;
    word_blk[16*cnt0 +: 16] = in_data;
    pad_pos = ($clog2(BYTES+1))'(2*cnt0) + ($clog2(BYTES+1))'(in_bytes);
    if (in_last) begin
      // clear the unused byte of the last word
      if (in_bytes == 2'd0) word_blk[16*cnt0 +: 16] = '0;
      if (in_bytes == 2'd1) word_blk[16*cnt0 + 8 +: 8] = '0;
      if (pad_pos < ($clog2(BYTES+1))'(BYTES)) begin
        word_blk[8*pad_pos +: 8] = word_blk[8*pad_pos +: 8] ^ 8'h06;
        word_blk[RATE-1] = word_blk[RATE-1] ^ 1'b1;
      end
    end
  end

  // XOR into the rate part, 2:1 multiplexer, capacity bypass
  assign f_in = first_rnd ? {st[1599:RATE], st[RATE-1:0] ^ blk} : st;
  keccak_round u_f (.s_in(f_in), .rnd(cnt1), .s_out(f_out));

  assign in_ready     = (state == S_ABSORB) && !init;
  assign digest_valid = (state == S_DONE);
  assign digest       = st[OUT_BITS-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_ABSORB; st <= '0; sipo <= '0; blk <= '0;
      cnt0 <= '0; cnt1 <= '0; first_rnd <= 1'b0; last_blk <= 1'b0; extra_pad <= 1'b0;
    end else if (init) begin
      state <= S_ABSORB; st <= '0; sipo <= '0; blk <= '0;
      cnt0 <= '0; cnt1 <= '0; first_rnd <= 1'b0; last_blk <= 1'b0; extra_pad <= 1'b0;
    end else begin
      unique case (state)
        S_ABSORB: if (in_valid) begin
          if (in_last || z0) begin
            blk       <= word_blk;
            sipo      <= '0;
            cnt0      <= '0;
            cnt1      <= '0;
            first_rnd <= 1'b1;
            // message ended exactly on the block boundary: pad block follows
            extra_pad <= in_last && (pad_pos == ($clog2(BYTES+1))'(BYTES));
            last_blk  <= in_last && (pad_pos != ($clog2(BYTES+1))'(BYTES));
            state     <= S_PERM;
          end else begin
            sipo <= word_blk;
            cnt0 <= cnt0 + 1'b1;
          end
        end
        S_PERM: begin
          st        <= f_out;
          first_rnd <= 1'b0;
          cnt1      <= cnt1 + 1'b1;
          if (z1) begin
            cnt1 <= '0;
            if (extra_pad) begin
              blk            <= '0;
              blk[7:0]       <= 8'h06;
              blk[RATE-1]    <= 1'b1;
              extra_pad      <= 1'b0;
              last_blk       <= 1'b1;
              first_rnd      <= 1'b1;
            end else if (last_blk) state <= S_DONE;
            else state <= S_ABSORB;
          end
        end
        S_DONE: ;
        default: state <= S_ABSORB;
      endcase
    end
  end
endmodule
