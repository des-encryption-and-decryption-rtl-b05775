// tb_des_fpga_top: end-to-end test of the top level at its default parameters.
//
// The encryption engine is loaded with 8 plaintext blocks (the first is 0123456789ABCDEF,
// key 2025042507100702) and then recirculates them. Every ciphertext it produces is loaded
// into the decryption engine in the same clock, so each plaintext must come back out of the
// decryption engine 34 clocks after it entered the encryption engine. At clock 120 both keys
// change to 133457799BBCDFF1. Per engine, every result is compared with the reference model
// (blocks whose rounds straddle a key change are skipped); end to end, the recovered plaintext
// is compared with the original. At the end both output queues are read back.
//
// Mechanisms counted, each of which must occur at least once: queue loads, recirculated blocks
// (entered from the queue without a load), the published ciphertext AACD8CB814B1BE9F at
// clk_no 11H, pipeline fill (valid rising 17 clocks after reset), key changes followed by
// correct results, end-to-end round trips and output-queue reads.
module tb_des_fpga_top;
  import des_model_pkg::*;

  localparam int DEPTH   = 8;
  localparam int LATENCY = 17;
  localparam int RUN     = 240;
  localparam int KEY_SWITCH = 120;
  localparam logic [63:0] KEY_A = 64'h2025042507100702;
  localparam logic [63:0] KEY_B = 64'h133457799BBCDFF1;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [63:0] enc_key_s = KEY_A, enc_plain = '0, enc_cipher, enc_rd_data;
  logic [63:0] dec_key_s = KEY_A, dec_cipher, dec_plain, dec_rd_data;
  logic        enc_load = 1'b0, dec_load, enc_valid, dec_valid;
  logic [7:0]  enc_clk_no, dec_clk_no;
  logic [2:0]  enc_rd_idx = '0, dec_rd_idx = '0;

  logic [63:0] key_at      [RUN + LATENCY];
  logic [63:0] enc_q       [DEPTH];
  logic [63:0] dec_q       [DEPTH];
  logic [63:0] enc_entered [RUN];
  logic [63:0] dec_entered [RUN];
  logic        enc_ok      [RUN];  // entry c had one key for all its rounds
  logic        dec_ok      [RUN];  // dec entry c is a clean ciphertext of enc entry c-17
  logic        enc_loaded  [RUN];

  int checks = 0, failures = 0, cycles = 0;
  int n_load = 0, n_recirc = 0, n_published = 0, n_fill = 0, n_keychange = 0;
  int n_roundtrip = 0, n_outq = 0;

  des_fpga_top dut (
    .clk(clk), .rst_n(rst_n),
    .enc_key_s(enc_key_s), .enc_plain(enc_plain), .enc_load(enc_load), .enc_cipher(enc_cipher),
    .enc_clk_no(enc_clk_no), .enc_valid(enc_valid), .enc_rd_idx(enc_rd_idx), .enc_rd_data(enc_rd_data),
    .dec_key_s(dec_key_s), .dec_cipher(dec_cipher), .dec_load(dec_load), .dec_plain(dec_plain),
    .dec_clk_no(dec_clk_no), .dec_valid(dec_valid), .dec_rd_idx(dec_rd_idx), .dec_rd_data(dec_rd_data)
  );

  // ciphertext stream goes straight into the decryption engine
  assign dec_cipher = enc_cipher;
  assign dec_load   = enc_valid;

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

  task automatic expect_eq(logic [63:0] got, logic [63:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic expect_seen(int n, string what);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("%s: %0d", what, n);
    end
  endtask

  initial begin
    for (int c = 0; c < RUN + LATENCY; c++) key_at[c] = (c < KEY_SWITCH) ? KEY_A : KEY_B;
    for (int i = 0; i < DEPTH; i++) begin enc_q[i] = '0; dec_q[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < RUN; c++) begin
      // clk_no == c here; inputs set now enter on the next rising edge
      checks++;
      if (enc_clk_no !== 8'(c) || dec_clk_no !== 8'(c)) begin
        failures++;
        $display("FAIL clk_no %0d/%0d expected %0d", enc_clk_no, dec_clk_no, c);
      end
      if (c == LATENCY && enc_valid && dec_valid) n_fill++;
      checks++;
      if (enc_valid !== (c >= LATENCY) || dec_valid !== (c >= LATENCY)) begin
        failures++;
        $display("FAIL valid %b/%b at clk_no %0d", enc_valid, dec_valid, c);
      end
      // encryption engine result
      if (c >= LATENCY && enc_ok[c-LATENCY]) begin
        expect_eq(enc_cipher, m_des(enc_entered[c-LATENCY], key_at[c-LATENCY], 1'b0),
                  $sformatf("encrypt at clk_no %0d", c));
        if (!enc_loaded[c-LATENCY] && enc_cipher == m_des(enc_entered[c-LATENCY], key_at[c-LATENCY], 1'b0))
          n_recirc++;
        if (c - LATENCY >= KEY_SWITCH && key_at[c-LATENCY] == KEY_B) n_keychange++;
      end
      if (c == 'h11 && enc_cipher == 64'hAACD8CB814B1BE9F) n_published++;
      // decryption engine result and end-to-end round trip
      if (c >= LATENCY && dec_ok[c-LATENCY]) begin
        expect_eq(dec_plain, m_des(dec_entered[c-LATENCY], key_at[c-LATENCY], 1'b1),
                  $sformatf("decrypt at clk_no %0d", c));
        if (c >= 2*LATENCY && enc_ok[c-2*LATENCY] && key_at[c-2*LATENCY] == key_at[c-LATENCY]) begin
          expect_eq(dec_plain, enc_entered[c-2*LATENCY], $sformatf("round trip at clk_no %0d", c));
          if (dec_plain == enc_entered[c-2*LATENCY]) n_roundtrip++;
        end
      end

      // drive the encryption engine
      enc_key_s = key_at[c];
      dec_key_s = key_at[c];
      enc_load  = (c < DEPTH);
      enc_plain = (c == 0) ? 64'h0123456789ABCDEF : {$urandom, $urandom};
      if (enc_load) begin enc_q[c % DEPTH] = enc_plain; n_load++; end
      enc_entered[c] = enc_q[c % DEPTH];
      enc_loaded[c]  = enc_load;
      enc_ok[c]      = (key_at[c] == key_at[c + 15]);
      // decryption engine loads the ciphertext now on enc_cipher
      if (c >= LATENCY) begin
        dec_q[c % DEPTH] = enc_cipher;
        n_load++;
      end
      dec_entered[c] = dec_q[c % DEPTH];
      dec_ok[c]      = (c >= LATENCY) && (key_at[c] == key_at[c + 15]);
      @(negedge clk);
    end
    // read back both output queues
    for (int s = 0; s < DEPTH; s++) begin
      enc_rd_idx = 3'(s); dec_rd_idx = 3'(s); #1;
      expect_eq(enc_rd_data, m_des(enc_q[s], KEY_B, 1'b0), $sformatf("enc out queue %0d", s));
      expect_eq(dec_rd_data, m_des(dec_q[s], KEY_B, 1'b1), $sformatf("dec out queue %0d", s));
      if (enc_rd_data == m_des(enc_q[s], KEY_B, 1'b0)) n_outq++;
    end
    expect_seen(n_load,      "queue loads");
    expect_seen(n_recirc,    "recirculated blocks checked");
    expect_seen(n_published, "published ciphertext at clk_no 11H");
    expect_seen(n_fill,      "pipeline fill (valid after 17 clocks)");
    expect_seen(n_keychange, "correct results after key change");
    expect_seen(n_roundtrip, "end-to-end round trips");
    expect_seen(n_outq,      "output queue reads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
