// tb_sha1_msg_sched: checks the message schedule at one and five words per
// clock against the reference 80-word expansion.
//
// Each instance is loaded with a random block and advanced every clock; the
// words it presents in pass p must be W_{p*U} .. W_{p*U+U-1}. A second load
// while advancing checks that load takes priority.
module tb_sha1_msg_sched;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load = 0, advance = 0;
  logic [511:0] block;
  word_t w1 [1];
  word_t w5 [5];
  int checks = 0, failures = 0;

  sha1_msg_sched #(.UNROLL(1)) dut1 (.clk, .rst_n, .load, .block, .advance, .w(w1));
  sha1_msg_sched #(.UNROLL(5)) dut5 (.clk, .rst_n, .load, .block, .advance, .w(w5));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_word(string nm, int t, word_t got, word_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s W[%0d] got %h exp %h", nm, t, got, exp);
    end
  endtask

  initial begin
    u32 wv [80];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int rep = 0; rep < 4; rep++) begin
      block = rand_block();
      expand(block, wv);
      load <= 1; advance <= (rep % 2 == 1);   // load wins over advance
      @(posedge clk);
      load <= 0; advance <= 1;
      // 80 clocks: both instances walk through their passes
      for (int c = 0; c < 80; c++) begin
        #1;
        check_word("u1", c, w1[0], wv[c]);
        if (c < 16)
          for (int j = 0; j < 5; j++) check_word("u5", c * 5 + j, w5[j], wv[c * 5 + j]);
        @(posedge clk);
      end
      advance <= 0;
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
