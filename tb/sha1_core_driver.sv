// sha1_core_driver: stimulus and scoreboard for one sha1_core interface.
//
// Sends a fixed sequence of padded blocks to one core and checks every
// digest against the reference model (and two against published SHA-1
// digests). It also checks the timing: done must come exactly NUM_ITER =
// 80/UNROLL clock edges after the edge that accepted the block, and a block
// may be accepted during the last iteration of the previous one.
//
// The sequence: "abc" (one block); the two-block standard message sent back
// to back; random messages of 1..4 blocks, some back to back, some after a
// gap, some started with first = 1 right behind another message; and a
// long back-to-back stream. It counts how often each of these happened:
//   n_single  blocks started from an idle core
//   n_chain   blocks continuing a message (first = 0)
//   n_b2b     blocks accepted during the previous block's last iteration
//   n_restart blocks with first = 1 accepted back to back
// Signals are driven and sampled on the falling edge; the core works on
// the rising edge.
module sha1_core_driver
  import sha1_ref_pkg::*;
#(
  parameter int unsigned UNROLL = 1,
  parameter int unsigned N_RAND_MSG = 12
) (
  input  logic         clk,
  output logic         start,
  output logic         first,
  output logic [511:0] block,
  input  logic         ready,
  input  logic         done,
  input  logic [159:0] digest,
  output logic         finished,
  output int           checks,
  output int           failures,
  output int           n_single,
  output int           n_chain,
  output int           n_b2b,
  output int           n_restart
);

  localparam int NUM_ITER = 80 / UNROLL;

  typedef struct {
    h160 exp;
    int  edge_no;
    bit  known;      // published digest available
    h160 published;
  } expect_t;

  expect_t q[$];
  int  cyc = 0;
  h160 chain_h = H0;
  int  outstanding = 0;
  int  done_edges[$];

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    start = 0; first = 0; block = '0; finished = 0;
    checks = 0; failures = 0;
    n_single = 0; n_chain = 0; n_b2b = 0; n_restart = 0;
  end

  // Present one block at a falling edge and hold it until the core takes it.
  // Returns at the falling edge after the accepting rising edge, with start
  // still high; the caller drops it or sends the next block at once.
  task automatic send(input logic [511:0] blk, input bit is_first,
                      input bit known = 0, input h160 published = '0);
    expect_t e;
    start = 1; first = is_first; block = blk;
    while (!ready) @(negedge clk);
    chain_h = compress(is_first ? H0 : chain_h, blk);
    e.exp = chain_h; e.edge_no = cyc + 1; e.known = known; e.published = published;
    if (outstanding > 0) begin
      n_b2b++;
      if (is_first) n_restart++;
    end else n_single++;
    if (!is_first) n_chain++;
    q.push_back(e);
    outstanding++;
    @(negedge clk);
  endtask

  task automatic idle(input int n);
    start = 0;
    repeat (n) @(negedge clk);
  endtask

  task automatic wait_drain();
    start = 0;
    while (outstanding > 0) @(negedge clk);
    @(negedge clk);
  endtask

  // Scoreboard
  always @(negedge clk) begin
    if (done) begin
      expect_t e;
      if (q.size() == 0) begin
        failures++;
        $display("U=%0d: done with no block outstanding", UNROLL);
      end else begin
        e = q.pop_front();
        outstanding--;
        done_edges.push_back(cyc);
        checks++;
        if (digest !== e.exp) begin
          failures++;
          $display("U=%0d: digest %h exp %h", UNROLL, digest, e.exp);
        end
        checks++;
        if (cyc - e.edge_no != NUM_ITER) begin
          failures++;
          $display("U=%0d: latency %0d edges, exp %0d", UNROLL, cyc - e.edge_no, NUM_ITER);
        end
        if (e.known) begin
          checks++;
          if (digest !== e.published) begin
            failures++;
            $display("U=%0d: published digest mismatch %h", UNROLL, digest);
          end
        end
      end
    end
  end

  initial begin
    int n_stream, base, nb;
    @(negedge clk);
    while (!ready) @(negedge clk);    // out of reset
    repeat (2) @(negedge clk);

    // "abc"
    send(ABC_BLOCK, 1, 1, ABC_DIGEST);
    wait_drain();
    // two-block message, second block back to back with the first
    send(TWO_BLOCK0, 1);
    send(TWO_BLOCK1, 0, 1, TWO_DIGEST);
    wait_drain();

    // random messages
    for (int m = 0; m < N_RAND_MSG; m++) begin
      nb = 1 + ($urandom % 4);
      for (int b = 0; b < nb; b++) begin
        send(rand_block(), b == 0);
        if ($urandom % 3 == 0) idle($urandom % 5);
      end
      case ($urandom % 3)
        0: wait_drain();
        1: idle(1 + $urandom % 30);
        default: ;                     // next message right behind
      endcase
    end
    wait_drain();

    // stream: one block per NUM_ITER cycles
    n_stream = 6;
    for (int b = 0; b < n_stream; b++) send(rand_block(), b == 0);
    wait_drain();
    base = done_edges.size() - n_stream;
    for (int b = 1; b < n_stream; b++) begin
      checks++;
      if (done_edges[base + b] - done_edges[base + b - 1] != NUM_ITER) begin
        failures++;
        $display("U=%0d: stream blocks %0d edges apart, exp %0d", UNROLL,
                 done_edges[base + b] - done_edges[base + b - 1], NUM_ITER);
      end
    end

    // every mechanism must have happened
    checks++; if (n_single  == 0) begin failures++; $display("U=%0d: no idle start", UNROLL); end
    checks++; if (n_chain   == 0) begin failures++; $display("U=%0d: no chained block", UNROLL); end
    checks++; if (n_b2b     == 0) begin failures++; $display("U=%0d: no back-to-back block", UNROLL); end
    checks++; if (n_restart == 0) begin failures++; $display("U=%0d: no back-to-back restart", UNROLL); end
    finished = 1;
  end

endmodule
