// sha1_ctrl: iteration controller of the iterative SHA-1 architectures.
//
// A block takes NUM_ITER = 80/UNROLL iterations, one per clock: 80 for the
// basic architecture, 16 when five steps are unrolled. The controller
// counts them and gives the step number t0 = iter*UNROLL of the first step
// of each iteration, which selects f_t and K_t.
//
// Handshake: a new block is accepted (accept = start & ready) when the
// controller is idle, and also in the last iteration of the current block,
// so blocks can follow one another with no gap: one block per NUM_ITER
// cycles. done is a one-cycle pulse in the cycle after the last iteration.
//
// Timing: with the accepting rising edge as edge 0, iteration i runs
// between edges i and i+1, last is high before edge NUM_ITER and done is
// high for the one clock after it.
// The iteration counts come from the design; the handshake is a choice
// made here.
module sha1_ctrl
  import sha1_pkg::*;
#(
  parameter int unsigned UNROLL = 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output logic  ready,
  output logic  accept,
  output logic  busy,
  output logic  last,
  output step_t t0,
  output logic  done
);

  localparam int unsigned NUM_ITER = NUM_STEPS / UNROLL;
  localparam int unsigned CNT_W    = $clog2(NUM_ITER) > 0 ? $clog2(NUM_ITER) : 1;

  if (NUM_STEPS % UNROLL != 0) begin : g_bad_unroll
    $error("UNROLL must divide 80");
  end

  logic [CNT_W-1:0] iter;

  assign last   = busy && (iter == CNT_W'(NUM_ITER - 1));
  assign ready  = !busy || last;
  assign accept = start && ready;
  assign t0     = step_t'(iter * UNROLL);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      iter <= '0;
      done <= 1'b0;
    end else begin
      done <= last;
      if (accept) begin
        busy <= 1'b1;
        iter <= '0;
      end else if (last) begin
        busy <= 1'b0;
        iter <= '0;
      end else if (busy) begin
        iter <= iter + 1'b1;
      end
    end
  end

  // The iteration counter never leaves 0..NUM_ITER-1.
  a_iter_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 iter <= CNT_W'(NUM_ITER - 1));
  // done follows the last iteration by exactly one cycle.
  a_done_after_last: assert property (@(posedge clk) disable iff (!rst_n)
                                      last |=> done);

endmodule
