// tb_des_round: self-checking test of one registered Feistel round.
//
// New random (L, R, K) every clock; the registered outputs must equal (R, L xor f(R, K)) of
// the inputs of the previous clock, f coming from the reference model. This checks both the
// function and the one-clock latency.
module tb_des_round;
  import des_model_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] l_in, r_in, l_out, r_out, exp_l, exp_r;
  logic [47:0] k;
  int checks = 0, failures = 0, cycles = 0;

  des_round dut (.clk(clk), .l_in(l_in), .r_in(r_in), .k(k), .l_out(l_out), .r_out(r_out));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 5000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (l_out !== exp_l || r_out !== exp_r) begin
          failures++;
          $display("FAIL cycle %0d: got %h %h expected %h %h", i, l_out, r_out, exp_l, exp_r);
        end
      end
      l_in = $urandom; r_in = $urandom; k = {16'($urandom), $urandom};
      exp_l = r_in;
      exp_r = l_in ^ m_f(r_in, k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
