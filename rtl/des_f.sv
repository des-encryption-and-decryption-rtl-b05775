// des_f: the DES round function f(R, K).
//
// The 32-bit right half is expanded to 48 bits by the E table, XORed with the 48-bit round
// key, split into eight 6-bit groups that address the eight S-boxes (4 bits out each), and the
// 32 S-box output bits are rearranged by the P permutation. The function is the one fixed by
// the DES standard; here it is a purely combinational block with no registers, used once in
// every pipeline round stage.
//
// Interface: r (R(i-1), 32 bits), k (K(i), 48 bits) -> f_out (32 bits), same cycle.
module des_f
  import des_pkg::*;
(
  input  half_t   r,
  input  subkey_t k,
  output half_t   f_out
);

  subkey_t x;
  half_t   s_out;

  always_comb begin
    x = expand(r) ^ k;
    for (int n = 0; n < 8; n++) begin
      s_out[31-4*n -: 4] = sbox(3'(n), x[47-6*n -: 6]);
    end
    f_out = pbox(s_out);
  end

endmodule
