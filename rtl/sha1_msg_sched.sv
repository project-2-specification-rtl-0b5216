// sha1_msg_sched: SHA-1 message schedule, UNROLL words per clock.
//
// Holds a sliding window of 16 words. On load the window takes the 512-bit
// block, word 0 being the most significant 32 bits (big-endian, as in the
// SHA-1 standard). The window's first UNROLL words are the current message
// words W_t .. W_{t+UNROLL-1}. On advance the window moves on by UNROLL
// words; each new word is
//   W_t = S^1(W_{t-3} ^ W_{t-8} ^ W_{t-14} ^ W_{t-16}),
// computed in order so that a new word may use one made in the same cycle.
// Only 16 words are ever stored, never all 80.
//
// Interface: load + block (takes priority), advance -> w[UNROLL].
// Timing: w is valid from the cycle after load and changes one cycle after
// each advance. Words past W_79 are produced but unused.
// The expansion formula is the SHA-1 standard's; the 16-word sliding
// window and the word order within the block are choices made here.
module sha1_msg_sched
  import sha1_pkg::*;
#(
  parameter int unsigned UNROLL = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [BLOCK_W-1:0] block,
  input  logic               advance,
  output word_t              w [UNROLL]
);

  word_t win  [16];
  word_t ext  [16+UNROLL];   // window followed by the UNROLL new words

  always_comb begin
    for (int i = 0; i < 16; i++) ext[i] = win[i];
    for (int i = 16; i < 16 + UNROLL; i++)
      ext[i] = rotl(ext[i-3] ^ ext[i-8] ^ ext[i-14] ^ ext[i-16], 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 16; i++) win[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < 16; i++) win[i] <= block[BLOCK_W-1-32*i -: 32];
    end else if (advance) begin
      for (int i = 0; i < 16; i++) win[i] <= ext[i+UNROLL];
    end
  end

  for (genvar j = 0; j < UNROLL; j++) begin : g_out
    assign w[j] = win[j];
  end

endmodule
