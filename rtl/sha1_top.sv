// sha1_top: the two SHA-1 architectures side by side.
//
// The basic iterative core (one step per clock, 80 clocks per block) and
// the partially unrolled core (five steps per clock, 16 clocks per block)
// are instantiated next to each other, each with its own block interface,
// so their results, latency and throughput can be compared on the same
// messages. Both share the clock and the reset. The ports are what a host
// interface (in the original setting a PCI accelerator board) would drive:
// a 512-bit padded block, a first-block flag and a start strobe in, a
// 160-bit digest and a done pulse out.
//
// Interface: b_* for the basic core, u_* for the unrolled core; the
// handshake is that of sha1_core.
// Having both architectures on one chip is a choice made here so that both
// can be exercised together; each core also works alone.
module sha1_top
  import sha1_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // basic architecture
  input  logic                b_start,
  input  logic                b_first,
  input  logic [BLOCK_W-1:0]  b_block,
  output logic                b_ready,
  output logic                b_done,
  output logic [DIGEST_W-1:0] b_digest,
  // partially unrolled architecture
  input  logic                u_start,
  input  logic                u_first,
  input  logic [BLOCK_W-1:0]  u_block,
  output logic                u_ready,
  output logic                u_done,
  output logic [DIGEST_W-1:0] u_digest
);

  localparam int unsigned UNROLL_BASIC = 1;
  localparam int unsigned UNROLL_FAST  = 5;

  sha1_core #(.UNROLL(UNROLL_BASIC)) u_basic (
    .clk, .rst_n, .start(b_start), .first(b_first), .block(b_block),
    .ready(b_ready), .done(b_done), .digest(b_digest)
  );

  sha1_core #(.UNROLL(UNROLL_FAST)) u_unrolled (
    .clk, .rst_n, .start(u_start), .first(u_first), .block(u_block),
    .ready(u_ready), .done(u_done), .digest(u_digest)
  );

endmodule
