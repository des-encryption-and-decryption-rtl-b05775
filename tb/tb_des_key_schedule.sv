// tb_des_key_schedule: self-checking test of the round-key generator in both directions.
//
// Two instances, REVERSE = 0 (encryption order K1..K16) and REVERSE = 1 (decryption order
// K16..K1), are driven with the same key. Known values: K1 = 1B02EFFC7072 and K16 =
// CB3D8B0E17F5 for key 133457799BBCDFF1 (the standard worked example). Then 300 random keys
// are compared round by round with the reference model, and a key that differs only in parity
// bits must give identical round keys.
module tb_des_key_schedule;
  import des_pkg::*;
  import des_model_pkg::*;

  logic [63:0] key;
  subkey_t     rk_enc [ROUNDS];
  subkey_t     rk_dec [ROUNDS];
  subkey_t     saved  [ROUNDS];
  int checks = 0, failures = 0;

  des_key_schedule #(.REVERSE(1'b0)) dut_enc (.key(key), .rk(rk_enc));
  des_key_schedule #(.REVERSE(1'b1)) dut_dec (.key(key), .rk(rk_dec));

  task automatic expect_eq(logic [47:0] got, logic [47:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s key=%h got %h expected %h", what, key, got, exp);
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
    key = 64'h133457799BBCDFF1; #1;
    expect_eq(rk_enc[0],  48'h1B02EFFC7072, "enc K1");
    expect_eq(rk_enc[15], 48'hCB3D8B0E17F5, "enc K16");
    expect_eq(rk_dec[0],  48'hCB3D8B0E17F5, "dec first (K16)");
    expect_eq(rk_dec[15], 48'h1B02EFFC7072, "dec last (K1)");
    for (int n = 0; n < 300; n++) begin
      key = {$urandom, $urandom}; #1;
      for (int j = 0; j < ROUNDS; j++) begin
        expect_eq(rk_enc[j], m_subkey(key, j + 1),  $sformatf("enc K%0d", j + 1));
        expect_eq(rk_dec[j], m_subkey(key, 16 - j), $sformatf("dec K%0d", 16 - j));
        saved[j] = rk_enc[j];
      end
      key ^= 64'h0101010101010101; #1;  // flip every parity bit
      for (int j = 0; j < ROUNDS; j++) expect_eq(rk_enc[j], saved[j], "parity ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
