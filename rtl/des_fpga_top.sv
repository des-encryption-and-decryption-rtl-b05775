// des_fpga_top: a DES encryption engine and a DES decryption engine side by side.
//
// Each engine is a des_crypt_system: a queue of QUEUE_DEPTH 64-bit blocks feeding a
// 17-stage pipeline (key/initial-permutation stage plus sixteen Feistel rounds) that accepts
// one block per clock, with an output queue and an 8-bit block counter. The encryption engine
// turns plaintext into ciphertext; the decryption engine has the same structure with its round
// keys applied in reverse order. The two engines share only clock and reset; each has its own
// key, data, load, counter, valid and queue-read ports (prefix enc_ or dec_).
//
// Timing: a block entering either engine on a rising edge leaves it 17 edges later; both accept
// a new block every clock, i.e. 64 bits per clock per engine.
module des_fpga_top
  import des_pkg::*;
#(
  parameter int QUEUE_DEPTH = 8,
  localparam int AW         = (QUEUE_DEPTH > 1) ? $clog2(QUEUE_DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // encryption engine
  input  block_t        enc_key_s,
  input  block_t        enc_plain,
  input  logic          enc_load,
  output block_t        enc_cipher,
  output logic [7:0]    enc_clk_no,
  output logic          enc_valid,
  input  logic [AW-1:0] enc_rd_idx,
  output block_t        enc_rd_data,
  // decryption engine
  input  block_t        dec_key_s,
  input  block_t        dec_cipher,
  input  logic          dec_load,
  output block_t        dec_plain,
  output logic [7:0]    dec_clk_no,
  output logic          dec_valid,
  input  logic [AW-1:0] dec_rd_idx,
  output block_t        dec_rd_data
);

  des_crypt_system #(.DECRYPT(1'b0), .QUEUE_DEPTH(QUEUE_DEPTH)) u_encrypt (
    .clk       (clk),
    .rst_n     (rst_n),
    .key_s     (enc_key_s),
    .din       (enc_plain),
    .load      (enc_load),
    .dout      (enc_cipher),
    .clk_no    (enc_clk_no),
    .dout_valid(enc_valid),
    .rd_idx    (enc_rd_idx),
    .rd_data   (enc_rd_data)
  );

  des_crypt_system #(.DECRYPT(1'b1), .QUEUE_DEPTH(QUEUE_DEPTH)) u_decrypt (
    .clk       (clk),
    .rst_n     (rst_n),
    .key_s     (dec_key_s),
    .din       (dec_cipher),
    .load      (dec_load),
    .dout      (dec_plain),
    .clk_no    (dec_clk_no),
    .dout_valid(dec_valid),
    .rd_idx    (dec_rd_idx),
    .rd_data   (dec_rd_data)
  );

endmodule
