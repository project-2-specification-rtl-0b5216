// tb_sha1_top: end-to-end test of the whole design at its default sizes.
//
// Drives the basic core (80 clocks per block) and the unrolled core (16
// clocks per block) of sha1_top through the same kind of block sequence:
// published SHA-1 test messages, random multi-block messages with gaps,
// back-to-back blocks, new messages started right behind others, and a
// long stream. Every digest is checked against the reference model and
// every block's latency against 80 and 16 clocks. Each mechanism (idle
// start, chained block, back-to-back block, back-to-back restart) must have
// happened on both cores.
module tb_sha1_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         b_start, b_first, b_ready, b_done, u_start, u_first, u_ready, u_done;
  logic [511:0] b_block, u_block;
  logic [159:0] b_digest, u_digest;
  logic fin [2];
  int ch [2], fl [2], ns [2], nc [2], nb [2], nr [2];

  sha1_top dut (
    .clk, .rst_n,
    .b_start, .b_first, .b_block, .b_ready, .b_done, .b_digest,
    .u_start, .u_first, .u_block, .u_ready, .u_done, .u_digest);

  sha1_core_driver #(.UNROLL(1), .N_RAND_MSG(40)) drv_basic (
    .clk, .start(b_start), .first(b_first), .block(b_block), .ready(b_ready),
    .done(b_done), .digest(b_digest), .finished(fin[0]), .checks(ch[0]),
    .failures(fl[0]), .n_single(ns[0]), .n_chain(nc[0]), .n_b2b(nb[0]), .n_restart(nr[0]));
  sha1_core_driver #(.UNROLL(5), .N_RAND_MSG(40)) drv_unrolled (
    .clk, .start(u_start), .first(u_first), .block(u_block), .ready(u_ready),
    .done(u_done), .digest(u_digest), .finished(fin[1]), .checks(ch[1]),
    .failures(fl[1]), .n_single(ns[1]), .n_chain(nc[1]), .n_b2b(nb[1]), .n_restart(nr[1]));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ch[0] + ch[1], fl[0] + fl[1] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (fin[0] && fin[1]);
    $display("basic:    idle starts=%0d chained=%0d back-to-back=%0d restarts=%0d",
             ns[0], nc[0], nb[0], nr[0]);
    $display("unrolled: idle starts=%0d chained=%0d back-to-back=%0d restarts=%0d",
             ns[1], nc[1], nb[1], nr[1]);
    $display("TB_RESULT checks=%0d failures=%0d", ch[0] + ch[1], fl[0] + fl[1]);
    $finish;
  end
endmodule
