// des_key_schedule: the DES round-key generator.
//
// The 64-bit key (the eight parity bits, bits 8, 16, .., 64, are ignored) goes through PC-1 to
// give the 28-bit halves C0 and D0. For encryption (REVERSE = 0) C and D are rotated left by
// 1 or 2 places before each round, giving C1,D1 .. C16,D16, and PC-2 of each pair is the
// round key K1 .. K16. For decryption (REVERSE = 1) the same halves are produced in the
// opposite order, C16,D16 down to C1,D1: since the sixteen left rotations add up to 28 places,
// C16 = C0 and D16 = D0, and each earlier pair is reached by rotating right by the count of the
// rotation that produced the later one. The outputs are then K16 .. K1, the order in which
// the decryption pipeline needs them.
//
// Every round-key bit is a copy of one key bit (rotations and PC-2 only select bits), so
// after synthesis this block is wiring only, with no gates. Purely combinational. Interface: key (64 bits) -> rk[0..15] (48 bits each), rk[j] being
// the key of round stage j+1.
module des_key_schedule
  import des_pkg::*;
#(
  parameter bit REVERSE = 1'b0
) (
  input  logic [KEY_W-1:0] key,
  output subkey_t          rk [ROUNDS]
);

  always_comb begin
    cd_half_t c, d;
    {c, d} = pc1(key);
    for (int j = 0; j < ROUNDS; j++) begin
      if (!REVERSE) begin
        c = rotl28(c, int'(SHIFT_TAB[j]));
        d = rotl28(d, int'(SHIFT_TAB[j]));
        rk[j] = pc2({c, d});
      end else begin
        rk[j] = pc2({c, d});
        c = rotr28(c, int'(SHIFT_TAB[ROUNDS-1-j]));
        d = rotr28(d, int'(SHIFT_TAB[ROUNDS-1-j]));
      end
    end
  end

endmodule
