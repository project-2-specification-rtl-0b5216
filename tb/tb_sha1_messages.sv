// tb_sha1_messages: hashes whole messages of many sizes on both cores of
// sha1_top.
//
// The testbench does the SHA-1 padding itself: the message bytes, a 0x80
// byte, zeros, and the 64-bit bit length, big-endian, filling whole 512-bit
// blocks. Blocks are sent back to back (first = 1 on the first block only).
// Messages: the empty string, "abc", "The quick brown fox jumps over the
// lazy dog" and one million 'a' are checked against their published
// digests; messages of random length (0..300 bytes, covering the 55/56/64
// byte padding edges) against the reference model. For the million-byte
// message the clock count from the first accepted block to the final done
// must be exactly blocks x 80 (basic) and blocks x 16 (unrolled).
module tb_sha1_messages;
  import sha1_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start [2], first [2], ready [2], done [2];
  logic [511:0] block [2];
  logic [159:0] digest [2];
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_done [2] = '{0, 0};
  int last_done [2] = '{0, 0};   // cyc at the latest done
  localparam int NUM_ITER [2] = '{80, 16};

  sha1_top dut (
    .clk, .rst_n,
    .b_start(start[0]), .b_first(first[0]), .b_block(block[0]),
    .b_ready(ready[0]), .b_done(done[0]), .b_digest(digest[0]),
    .u_start(start[1]), .u_first(first[1]), .u_block(block[1]),
    .u_ready(ready[1]), .u_done(done[1]), .u_digest(digest[1]));

  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) for (int c = 0; c < 2; c++) if (done[c]) begin
    n_done[c]++;
    last_done[c] = cyc;
  end

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned msg [];

  function automatic int num_blocks(input int len);
    return int'((len + 8) / 64 + 1);
  endfunction

  // Padded block i of the message in msg.
  function automatic logic [511:0] padded_block(input int i);
    logic [511:0] b;
    longint len = longint'(msg.size());
    longint bits = len * 8;
    int nb = num_blocks(int'(len));
    for (int j = 0; j < 64; j++) begin
      longint idx = longint'(i) * 64 + longint'(j);
      byte unsigned v;
      if (idx < len)                   v = msg[idx];
      else if (idx == len)             v = 8'h80;
      else if (i == nb - 1 && j >= 56) v = bits[8*(63-j) +: 8];
      else                             v = 8'h00;
      b[511 - 8*j -: 8] = v;
    end
    return b;
  endfunction

  // Hash msg on core c; returns the digest and the clock count from the
  // edge that took the first block to the final done.
  task automatic hash(input int c, output h160 dg, output int clocks);
    int nb = num_blocks(msg.size());
    int target = n_done[c] + nb;
    int t_first = 0;
    for (int i = 0; i < nb; i++) begin
      start[c] = 1; first[c] = (i == 0); block[c] = padded_block(i);
      while (!ready[c]) @(negedge clk);
      if (i == 0) t_first = cyc + 1;
      @(negedge clk);
    end
    start[c] = 0;
    while (n_done[c] < target) @(negedge clk);
    dg = digest[c];
    clocks = last_done[c] - t_first;
  endtask

  function automatic h160 ref_digest();
    h160 h = H0;
    for (int i = 0; i < num_blocks(msg.size()); i++) h = compress(h, padded_block(i));
    return h;
  endfunction

  task automatic set_string(input string s);
    msg = new[s.len()];
    for (int i = 0; i < s.len(); i++) msg[i] = s[i];
  endtask

  task automatic check(input string what, input h160 got, input h160 exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    h160 dg;
    int clocks, len;
    for (int c = 0; c < 2; c++) begin start[c] = 0; first[c] = 0; block[c] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    for (int c = 0; c < 2; c++) begin
      set_string("");
      hash(c, dg, clocks);
      check($sformatf("core %0d empty", c), dg, 160'hda39a3ee_5e6b4b0d_3255bfef_95601890_afd80709);
      set_string("abc");
      hash(c, dg, clocks);
      check($sformatf("core %0d abc", c), dg, 160'ha9993e36_4706816a_ba3e2571_7850c26c_9cd0d89d);
      set_string("The quick brown fox jumps over the lazy dog");
      hash(c, dg, clocks);
      check($sformatf("core %0d fox", c), dg, 160'h2fd4e1c6_7a2d28fc_ed849ee1_bb76e739_1b93eb12);
      for (int m = 0; m < 40; m++) begin
        len = (m < 6) ? 54 + m : int'($urandom % 301);   // 54..59 bytes, then random
        msg = new[len];
        foreach (msg[i]) msg[i] = 8'($urandom);
        hash(c, dg, clocks);
        check($sformatf("core %0d random len %0d", c, len), dg, ref_digest());
      end
    end

    // one million 'a' on both cores, with the clock count
    msg = new[1_000_000];
    foreach (msg[i]) msg[i] = 8'h61;
    for (int c = 0; c < 2; c++) begin
      hash(c, dg, clocks);
      check($sformatf("core %0d million a", c), dg,
            160'h34aa973c_d4c4daa4_f61eeb2b_dbad2731_6534016f);
      checks++;
      if (clocks != num_blocks(msg.size()) * NUM_ITER[c]) begin
        failures++;
        $display("core %0d: %0d clocks for %0d blocks", c, clocks, num_blocks(msg.size()));
      end
      $display("core %0d: %0d blocks in %0d clocks, %0.2f bits per clock", c,
               num_blocks(msg.size()), clocks, 512.0 * num_blocks(msg.size()) / clocks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
