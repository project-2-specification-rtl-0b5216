// tb_sha1_ctrl: checks the iteration controller at one and five steps per
// clock.
//
// For each instance a block is started from idle, then a second one back
// to back in the last iteration, with start also held high in the middle
// of a block (it must not be taken there). Every clock the step number,
// busy, last, ready and done are compared with a cycle-by-cycle model
// written from the handshake rules.
module tb_sha1_ctrl;
  import sha1_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  start;
  logic  ready [2], accept [2], busy [2], last [2], done [2];
  step_t t0 [2];
  int checks = 0, failures = 0;
  int n_b2b [2];

  sha1_ctrl #(.UNROLL(1)) dut1 (.clk, .rst_n, .start, .ready(ready[0]), .accept(accept[0]),
    .busy(busy[0]), .last(last[0]), .t0(t0[0]), .done(done[0]));
  sha1_ctrl #(.UNROLL(5)) dut5 (.clk, .rst_n, .start, .ready(ready[1]), .accept(accept[1]),
    .busy(busy[1]), .last(last[1]), .t0(t0[1]), .done(done[1]));

  // model state
  bit m_busy [2];
  int m_iter [2];
  bit m_done [2];
  localparam int UN [2] = '{1, 5};

  task automatic chk(string what, int i, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("U=%0d %s got %0d exp %0d", UN[i], what, got, exp);
    end
  endtask

  // compare at the falling edge, then advance the model
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < 2; i++) begin
      automatic int  n = 80 / UN[i];
      automatic bit  m_last  = m_busy[i] && m_iter[i] == n - 1;
      automatic bit  m_ready = !m_busy[i] || m_last;
      chk("busy",  i, busy[i],  m_busy[i]);
      chk("last",  i, last[i],  m_last);
      chk("ready", i, ready[i], m_ready);
      chk("done",  i, done[i],  m_done[i]);
      chk("accept", i, accept[i], start && m_ready);
      if (m_busy[i]) chk("t0", i, t0[i], m_iter[i] * UN[i]);
      if (start && m_ready && m_busy[i]) n_b2b[i]++;
      m_done[i] = m_last;
      if (start && m_ready) begin m_busy[i] = 1; m_iter[i] = 0; end
      else if (m_last)      begin m_busy[i] = 0; m_iter[i] = 0; end
      else if (m_busy[i])   m_iter[i]++;
    end
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // start from idle, hold start for a few cycles (not taken while busy)
    start = 1; repeat (4) @(negedge clk);
    start = 0; repeat (60) @(negedge clk);
    // hold start through the end of the block: back to back in both
    start = 1; repeat (100) @(negedge clk);
    start = 0; repeat (100) @(negedge clk);
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (n_b2b[i] == 0) begin failures++; $display("U=%0d no back-to-back", UN[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
