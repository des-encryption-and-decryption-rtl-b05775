// tb_des_f: self-checking test of the DES round function.
//
// Checks one published intermediate value (round 1 of the standard worked example: R0 =
// F0AAF0AA, K1 = 1B02EFFC7072 gives f = 234AA9BB) and 2000 random (R, K) pairs against the
// bit-serial reference model. The block is combinational; results are sampled 1 ns after
// each change of the inputs.
module tb_des_f;
  import des_model_pkg::*;

  logic [31:0] r, f_out;
  logic [47:0] k;
  int checks = 0, failures = 0;

  des_f dut (.r(r), .k(k), .f_out(f_out));

  task automatic check(logic [31:0] exp);
    checks++;
    if (f_out !== exp) begin
      failures++;
      $display("FAIL f(%h,%h) = %h, expected %h", r, k, f_out, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r = 32'hF0AAF0AA; k = 48'h1B02EFFC7072; #1;
    check(32'h234AA9BB);
    for (int i = 0; i < 2000; i++) begin
      r = $urandom; k = {16'($urandom), $urandom}; #1;
      check(m_f(r, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
