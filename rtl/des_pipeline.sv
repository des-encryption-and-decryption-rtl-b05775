// des_pipeline: fully pipelined DES, one 64-bit block per clock, 17 clocks latency.
//
// Stage 1 registers the key and the initial permutation of the incoming block (L0, R0); the
// round-key generator derives all sixteen round keys (through C0,D0 .. C16,D16) from the
// registered key. Stages 2 to 17 are sixteen registered Feistel rounds, each with its own
// round key. The output is the final permutation of (R16, L16) taken from the stage-17
// register, so a block presented on din at one rising edge appears on dout 17 rising edges
// later, and a new block can enter on every edge. With DECRYPT = 1 the round keys are applied
// in reverse order (K16 in the first round), which turns the same structure into the
// decryptor.
//
// The key is held in a single register and is not carried along with each block: this keeps
// the flip-flop count at 17 x 64 for data plus 64 for the key. A change of key_s therefore
// takes effect for every stage at once; a block is processed with one key only if key_s is
// stable from the edge on which the block enters until 15 edges later. The data registers have
// no reset; the output is meaningless until the pipeline has filled.
//
// Interface: clk, key_s (64 bits, parity bits ignored), din (64 bits), dout (64 bits).
module des_pipeline
  import des_pkg::*;
#(
  parameter bit DECRYPT = 1'b0
) (
  input  logic   clk,
  input  block_t key_s,
  input  block_t din,
  output block_t dout
);

  logic [KEY_W-1:0] key_q;
  subkey_t          rk [ROUNDS];
  half_t            l_q [ROUNDS+1];
  half_t            r_q [ROUNDS+1];

  // Stage 1: key register and initial permutation.
  always_ff @(posedge clk) begin
    key_q          <= key_s;
    {l_q[0], r_q[0]} <= initial_perm(din);
  end

  des_key_schedule #(.REVERSE(DECRYPT)) u_key_schedule (
    .key(key_q),
    .rk (rk)
  );

  // Stages 2..17: one Feistel round each.
  for (genvar i = 0; i < ROUNDS; i++) begin : g_round
    des_round u_round (
      .clk  (clk),
      .l_in (l_q[i]),
      .r_in (r_q[i]),
      .k    (rk[i]),
      .l_out(l_q[i+1]),
      .r_out(r_q[i+1])
    );
  end

  // Undo the last swap, then the final permutation.
  assign dout = final_perm({r_q[ROUNDS], l_q[ROUNDS]});

endmodule
