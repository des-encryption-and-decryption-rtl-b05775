// tb_des_crypt_system: self-checking test of a complete encryption engine and decryption engine.
//
// Both engines get the key 2025042507100702. During the first 8 clocks after reset, 8 blocks
// are loaded (the first is 0123456789ABCDEF); then load stays low and the queue recirculates.
// Later, slot 3 is reloaded with a new block while running. Checked on every clock:
//  - dout equals DES of the block that entered when clk_no was 17 less (latency 17 clocks,
//    one result per clock), using a testbench model of the round-robin queue;
//  - the published value AACD8CB814B1BE9F appears at clk_no = 11H and again at 19H (the
//    8-block queue repeats every 8 clocks);
//  - dout_valid is low before clk_no = 11H and high from then on;
//  - at the end, every output-queue entry holds the result for its slot.
module tb_des_crypt_system;
  import des_model_pkg::*;

  localparam int DEPTH   = 8;
  localparam int LATENCY = 17;
  localparam int RUN     = 120;
  localparam logic [63:0] KEY = 64'h2025042507100702;

  logic        clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [63:0] key_s = KEY, din = '0;
  logic [63:0] enc_dout, dec_dout, enc_rd, dec_rd;
  logic [7:0]  enc_no, dec_no;
  logic        enc_v, dec_v;
  logic [2:0]  rd_idx = '0;

  logic [63:0] qmodel  [DEPTH];
  logic [63:0] entered [RUN];
  int checks = 0, failures = 0, cycles = 0, published_seen = 0;

  des_crypt_system #(.DECRYPT(1'b0)) dut_enc (
    .clk(clk), .rst_n(rst_n), .key_s(key_s), .din(din), .load(load), .dout(enc_dout),
    .clk_no(enc_no), .dout_valid(enc_v), .rd_idx(rd_idx), .rd_data(enc_rd));
  des_crypt_system #(.DECRYPT(1'b1)) dut_dec (
    .clk(clk), .rst_n(rst_n), .key_s(key_s), .din(din), .load(load), .dout(dec_dout),
    .clk_no(dec_no), .dout_valid(dec_v), .rd_idx(rd_idx), .rd_data(dec_rd));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 1000) begin
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

  initial begin
    for (int i = 0; i < DEPTH; i++) qmodel[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < RUN; c++) begin
      // here clk_no == c; inputs set now are taken on the next rising edge
      checks++;
      if (enc_no !== 8'(c) || dec_no !== 8'(c)) begin
        failures++;
        $display("FAIL clk_no %0d/%0d, expected %0d", enc_no, dec_no, c);
      end
      if (c >= LATENCY) begin
        expect_eq(enc_dout, m_des(entered[c-LATENCY], KEY, 1'b0), $sformatf("enc at clk_no %0d", c));
        expect_eq(dec_dout, m_des(entered[c-LATENCY], KEY, 1'b1), $sformatf("dec at clk_no %0d", c));
      end
      if (c == 'h11 || c == 'h19) begin
        expect_eq(enc_dout, 64'hAACD8CB814B1BE9F, $sformatf("published ciphertext at %0h", c));
        if (enc_dout == 64'hAACD8CB814B1BE9F) published_seen++;
      end
      checks++;
      if (enc_v !== (c >= LATENCY) || dec_v !== (c >= LATENCY)) begin
        failures++;
        $display("FAIL dout_valid %b/%b at clk_no %0d", enc_v, dec_v, c);
      end
      load = (c < DEPTH) || (c == 43);
      din  = (c == 0) ? 64'h0123456789ABCDEF : {$urandom, $urandom};
      if (load) qmodel[c % DEPTH] = din;
      entered[c] = qmodel[c % DEPTH];
      @(negedge clk);
    end
    // output queue: slot s holds the result of the last block that left from slot s
    for (int s = 0; s < DEPTH; s++) begin
      rd_idx = 3'(s); #1;
      expect_eq(enc_rd, m_des(qmodel[s], KEY, 1'b0), $sformatf("enc out queue %0d", s));
      expect_eq(dec_rd, m_des(qmodel[s], KEY, 1'b1), $sformatf("dec out queue %0d", s));
    end
    checks++;
    if (published_seen != 2) begin
      failures++;
      $display("FAIL published ciphertext seen %0d times, expected 2", published_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
