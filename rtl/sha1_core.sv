// sha1_core: iterative SHA-1 block processor with UNROLL steps per clock.
//
// UNROLL = 1 is the basic iterative architecture: one compression step per
// clock, 80 clocks per 512-bit block. UNROLL = 5 is the partially unrolled
// architecture: the combinational part holds five chained steps and a block
// takes 16 clocks. Nothing else differs between the two.
//
// Datapath: the A..E register feeds sha1_round_chain, whose result is
// written back each clock. sha1_msg_sched supplies the message words and
// sha1_ctrl the step number. After the last iteration the chaining value H
// is added word-wise to A..E (mod 2^32) and the sum is the block's digest.
//
// Multi-block messages: with first = 1 the block starts from the standard
// IV; with first = 0 it starts from the digest of the previous block. When
// a block is accepted in the last iteration of the previous one, the new
// chaining value is taken straight from the adder, so blocks stream with no
// idle cycle. Padding the message into blocks is left to the source of the
// blocks.
//
// Interface: start/first/block, sampled when start & ready; done pulses
// for one cycle with digest valid, and digest holds until the next done.
// Timing: if the rising edge that sees start & ready is edge 0, iteration i
// is written at edge i+1 and done and digest are set at edge 80/UNROLL:
// a latency of 80 clocks (basic) or 16 clocks (unrolled), and, with blocks
// back to back, one block per 80/UNROLL clocks.
// Reset is synchronous and active low.
// The two architectures, the step equations and the 80 and 16 clock counts
// are those of the design this implements; the block handshake, the
// gap-free acceptance, the first/chaining input and the reset are choices
// made here.
module sha1_core
  import sha1_pkg::*;
#(
  parameter int unsigned UNROLL = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                first,
  input  logic [BLOCK_W-1:0]  block,
  output logic                ready,
  output logic                done,
  output logic [DIGEST_W-1:0] digest
);

  logic   accept, busy, last;
  step_t  t0;
  word_t  w [UNROLL];
  state_t st_q, st_next, h_q, h_new, base;

  sha1_ctrl #(.UNROLL(UNROLL)) u_ctrl (
    .clk, .rst_n, .start, .ready, .accept, .busy, .last, .t0, .done
  );

  sha1_msg_sched #(.UNROLL(UNROLL)) u_sched (
    .clk, .rst_n, .load(accept), .block, .advance(busy), .w
  );

  sha1_round_chain #(.UNROLL(UNROLL)) u_rounds (
    .t0, .st_in(st_q), .w, .st_out(st_next)
  );

  always_comb begin
    h_new = state_add(h_q, st_next);
    if (first)     base = IV;
    else if (last) base = h_new;     // chaining value of a block still finishing
    else           base = state_t'(digest);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st_q   <= IV;
      h_q    <= IV;
      digest <= '0;
    end else begin
      if (last) digest <= h_new;
      if (accept) begin
        st_q <= base;
        h_q  <= base;
      end else if (busy) begin
        st_q <= st_next;
      end
    end
  end

endmodule
