// des_round: one Feistel round, registered, as one stage of the DES pipeline.
//
// Computes L(i) = R(i-1) and R(i) = L(i-1) xor f(R(i-1), K(i)) and stores both halves on the
// rising clock edge, so a block moves one round further on every clock. Every stage performs
// the half swap; the pipeline undoes the last swap before the final permutation, which gives
// the same result as the usual drawing in which round 16 has no swap.
//
// Interface: l_in/r_in (32 bits each) and round key k (48 bits) in; l_out/r_out registered,
// valid one clock after the inputs. No reset: the stage only carries data.
module des_round
  import des_pkg::*;
(
  input  logic    clk,
  input  half_t   l_in,
  input  half_t   r_in,
  input  subkey_t k,
  output half_t   l_out,
  output half_t   r_out
);

  half_t f_val;

  des_f u_f (
    .r    (r_in),
    .k    (k),
    .f_out(f_val)
  );

  always_ff @(posedge clk) begin
    l_out <= r_in;
    r_out <= l_in ^ f_val;
  end

endmodule
