// tb_sha1_round_chain: checks UNROLL chained steps against the reference.
//
// Uses the default of five steps per pass. For each of the 16 passes of a
// block (t0 = 0, 5, ..., 75) random A..E and words are applied and the
// result is compared with five reference steps applied in sequence.
module tb_sha1_round_chain;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;

  localparam int unsigned U = 5;

  step_t  t0;
  state_t st_in, st_out;
  word_t  w [U];
  int checks = 0, failures = 0;

  sha1_round_chain #(.UNROLL(U)) dut (.t0, .st_in, .w, .st_out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h160 exp;
    for (int rep = 0; rep < 20; rep++) begin
      for (int p = 0; p < 80 / U; p++) begin
        t0 = step_t'(p * U);
        st_in = {$urandom, $urandom, $urandom, $urandom, $urandom};
        for (int j = 0; j < U; j++) w[j] = $urandom;
        #1;
        exp = st_in;
        for (int j = 0; j < U; j++) exp = sha1_ref_pkg::step(p * U + j, exp, w[j]);
        checks++;
        if (st_out !== exp) begin
          failures++;
          $display("mismatch t0=%0d got %h exp %h", p * U, st_out, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
