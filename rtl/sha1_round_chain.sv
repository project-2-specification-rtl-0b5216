// sha1_round_chain: UNROLL consecutive SHA-1 steps in one combinational
// block, the core of the partially unrolled architecture.
//
// Step j of the chain (j = 0..UNROLL-1) works on step number t0 + j with
// message word w[j] and feeds its A..E to step j+1. With UNROLL = 5 and t0
// a multiple of 5, all five steps of one pass fall into the same group of
// 20 steps, so they share f_t and K_t; the step number is still passed to
// each step so that any divisor of 80 works.
//
// Interface: t0 (step number of the first step of the pass), st_in,
// w[UNROLL] (W_{t0} .. W_{t0+UNROLL-1}) -> st_out.
// Timing: combinational, UNROLL steps deep.
module sha1_round_chain
  import sha1_pkg::*;
#(
  parameter int unsigned UNROLL = 5
) (
  input  step_t  t0,
  input  state_t st_in,
  input  word_t  w [UNROLL],
  output state_t st_out
);

  state_t st [UNROLL+1];

  assign st[0] = st_in;

  for (genvar j = 0; j < UNROLL; j++) begin : g_step
    sha1_round u_round (
      .t     (t0 + step_t'(j)),
      .st_in (st[j]),
      .w     (w[j]),
      .st_out(st[j+1])
    );
  end

  assign st_out = st[UNROLL];

endmodule
