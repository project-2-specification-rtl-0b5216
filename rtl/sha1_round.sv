// sha1_round: one SHA-1 compression step, purely combinational.
//
// Computes
//   A' = S^5(A) + f_t(B,C,D) + E + W_t + K_t
//   B' = A,  C' = S^30(B),  D' = C,  E' = D
// where S^k is a left rotation by k bits and + is addition modulo 2^32.
// f_t and K_t are picked from the step number t (0..79) in four groups of
// 20 steps. This is the combinational part of the basic iterative
// architecture; the unrolled architecture chains several of these.
// The four-operand sum is written as a plain sum and left to synthesis to
// map onto adders; no particular adder structure is imposed.
// The step equation and the grouping of steps follow the design; the 30-bit
// rotation of B, the exact constants and the majority function for steps
// 40-59 are checked against the SHA-1 standard.
//
// Interface: t (step number), st_in (A..E), w (W_t) -> st_out (A..E next).
// Timing: no clock; the result settles within the same cycle.
module sha1_round
  import sha1_pkg::*;
(
  input  step_t  t,
  input  state_t st_in,
  input  word_t  w,
  output state_t st_out
);

  phase_e ph;
  word_t  f;
  word_t  k;

  always_comb begin
    ph = step_phase(t);
    f  = f_func(ph, st_in.b, st_in.c, st_in.d);
    k  = K_CONST[ph];
    st_out.a = rotl(st_in.a, 5) + f + st_in.e + w + k;
    st_out.b = st_in.a;
    st_out.c = rotl(st_in.b, 30);
    st_out.d = st_in.c;
    st_out.e = st_in.d;
  end

endmodule
