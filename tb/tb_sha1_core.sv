// tb_sha1_core: runs sha1_core as the basic (one step per clock) and the
// unrolled (five steps per clock) architecture, side by side, through the
// block sequence of sha1_core_driver, and checks digests and cycle counts.
module tb_sha1_core;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start [2], first [2], ready [2], done [2], fin [2];
  logic [511:0] block [2];
  logic [159:0] digest [2];
  int ch [2], fl [2], ns [2], nc [2], nb [2], nr [2];

  sha1_core #(.UNROLL(1)) dut_basic (
    .clk, .rst_n, .start(start[0]), .first(first[0]), .block(block[0]),
    .ready(ready[0]), .done(done[0]), .digest(digest[0]));
  sha1_core #(.UNROLL(5)) dut_unrolled (
    .clk, .rst_n, .start(start[1]), .first(first[1]), .block(block[1]),
    .ready(ready[1]), .done(done[1]), .digest(digest[1]));

  sha1_core_driver #(.UNROLL(1)) drv0 (
    .clk, .start(start[0]), .first(first[0]), .block(block[0]), .ready(ready[0]),
    .done(done[0]), .digest(digest[0]), .finished(fin[0]), .checks(ch[0]),
    .failures(fl[0]), .n_single(ns[0]), .n_chain(nc[0]), .n_b2b(nb[0]), .n_restart(nr[0]));
  sha1_core_driver #(.UNROLL(5)) drv1 (
    .clk, .start(start[1]), .first(first[1]), .block(block[1]), .ready(ready[1]),
    .done(done[1]), .digest(digest[1]), .finished(fin[1]), .checks(ch[1]),
    .failures(fl[1]), .n_single(ns[1]), .n_chain(nc[1]), .n_b2b(nb[1]), .n_restart(nr[1]));

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ch[0] + ch[1], fl[0] + fl[1] + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (fin[0] && fin[1]);
    for (int i = 0; i < 2; i++)
      $display("core %0d: single=%0d chain=%0d back-to-back=%0d restart=%0d",
               i, ns[i], nc[i], nb[i], nr[i]);
    $display("TB_RESULT checks=%0d failures=%0d", ch[0] + ch[1], fl[0] + fl[1]);
    $finish;
  end
endmodule
