// tb_des_pipeline: self-checking test of the 17-stage DES pipeline, encryption and decryption.
//
// An encrypting instance and a decrypting instance receive the same stream: one new block on
// every clock for 400 clocks. Expected results come from the reference model and, for the
// first blocks, from fixed published values: key 2025042507100702 encrypts 0123456789ABCDEF to
// AACD8CB814B1BE9F, and key 133457799BBCDFF1 encrypts 0123456789ABCDEF to 85E813540F0AB405.
// Each result must appear exactly 17 clocks after its block entered (the latency is checked
// by comparing at that cycle only), and a result must appear on every clock (throughput of one
// block per clock). The key changes at clock 200; blocks whose 16 rounds straddle the change
// are not checked, every block entering from clock 200 on must be correct under the new key.
module tb_des_pipeline;
  import des_model_pkg::*;

  localparam int N       = 400;
  localparam int LATENCY = 17;
  localparam int KEY_SWITCH = 200;

  logic        clk = 1'b0;
  logic [63:0] key_s, din, enc_out, dec_out;
  logic [63:0] stream  [N];
  logic [63:0] exp_enc [N];
  logic [63:0] exp_dec [N];
  logic [63:0] key_at  [N + LATENCY];
  int checks = 0, failures = 0, cycles = 0, skipped = 0;

  des_pipeline #(.DECRYPT(1'b0)) dut_enc (.clk(clk), .key_s(key_s), .din(din), .dout(enc_out));
  des_pipeline #(.DECRYPT(1'b1)) dut_dec (.clk(clk), .key_s(key_s), .din(din), .dout(dec_out));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 2000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic expect_eq(logic [63:0] got, logic [63:0] exp, string what, int m);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s block %0d: got %h expected %h", what, m, got, exp);
    end
  endtask

  initial begin
    for (int c = 0; c < N + LATENCY; c++)
      key_at[c] = (c < KEY_SWITCH) ? 64'h2025042507100702 : 64'h133457799BBCDFF1;
    for (int c = 0; c < N; c++) begin
      case (c)
        0:          stream[c] = 64'h0123456789ABCDEF;
        1:          stream[c] = 64'hAACD8CB814B1BE9F;
        KEY_SWITCH: stream[c] = 64'h0123456789ABCDEF;
        default:    stream[c] = {$urandom, $urandom};
      endcase
      exp_enc[c] = m_des(stream[c], key_at[c], 1'b0);
      exp_dec[c] = m_des(stream[c], key_at[c], 1'b1);
    end
    // published values
    expect_eq(exp_enc[0], 64'hAACD8CB814B1BE9F, "model vs published (enc)", 0);
    expect_eq(exp_dec[1], 64'h0123456789ABCDEF, "model vs published (dec)", 1);
    expect_eq(exp_enc[KEY_SWITCH], 64'h85E813540F0AB405, "model vs published (enc)", KEY_SWITCH);

    for (int m = 0; m < N + LATENCY; m++) begin
      @(negedge clk);
      // result of the block that entered LATENCY edges ago
      if (m >= LATENCY) begin
        int b;
        b = m - LATENCY;
        if (key_at[b] == key_at[b + 15]) begin
          expect_eq(enc_out, exp_enc[b], "encrypt", b);
          expect_eq(dec_out, exp_dec[b], "decrypt", b);
        end else begin
          skipped++;
        end
      end
      if (m < N) begin
        key_s = key_at[m];
        din   = stream[m];
      end
    end
    if (skipped != 15) begin
      failures++;
      $display("FAIL expected 15 blocks straddling the key change, saw %0d", skipped);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
