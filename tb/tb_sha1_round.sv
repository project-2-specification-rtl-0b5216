// tb_sha1_round: checks one SHA-1 step against the reference model.
//
// Drives random A..E and W_t for every step number 0..79 (several times
// each, so each of the four f_t/K_t groups and both group edges are hit)
// and compares the combinational result with sha1_ref_pkg::step.
module tb_sha1_round;
  import sha1_pkg::*;
  import sha1_ref_pkg::*;

  step_t  t;
  state_t st_in, st_out;
  word_t  w;
  int checks = 0, failures = 0;

  sha1_round dut (.t, .st_in, .w, .st_out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    h160 exp;
    for (int rep = 0; rep < 10; rep++) begin
      for (int i = 0; i < 80; i++) begin
        t = step_t'(i);
        st_in = {$urandom, $urandom, $urandom, $urandom, $urandom};
        w = $urandom;
        #1;
        exp = sha1_ref_pkg::step(i, st_in, w);
        checks++;
        if (st_out !== exp) begin
          failures++;
          $display("mismatch t=%0d got %h exp %h", i, st_out, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
