# Fully pipelined DES encryption and decryption engines

DES turns a 64-bit block into another 64-bit block in sixteen Feistel rounds. Done
round by round, one block takes sixteen trips through the same logic. This design
unrolls the rounds instead and puts a register after each one. That gives a 17-stage
pipeline which accepts a new block on every clock and returns each result 17 clocks
after its block went in. At the 167 MHz reached by the reference FPGA implementation
of this architecture (a Spartan-3E), 64 bits per clock comes to about 10.7 Gbit/s.

There are two engines, one for each direction. The encryption engine turns plaintext
into ciphertext. The decryption engine has the same structure but applies the round
keys in reverse order. Each engine also has:

- a small queue of 8 blocks that feeds the pipeline round-robin;
- a queue that collects the results;
- an 8-bit block counter, `clk_no`.

The top level, `des_fpga_top`, places the two engines side by side. They share only
clock and reset.

## The pipeline (`des_pipeline`)

```
 din ─► IP ─► [stage 1: L0,R0 | key] ─► round 1 ─► [stage 2] ─► … ─► round 16 ─► [stage 17] ─► swap ─► FP ─► dout
                            │
                            └─► round-key generator ─► K1 … K16 (one per round)
```

- **Stage 1** registers the initial permutation IP of the incoming block (halves L0 and
  R0) and the 64-bit key.
- **Stages 2–17** are `des_round` instances. Each computes `L(i) = R(i-1)` and
  `R(i) = L(i-1) xor f(R(i-1), K(i))` and registers both halves.
- **`des_f`** is the round function. It expands R to 48 bits (table E), XORs in the round
  key, passes the result through the eight S-boxes and then permutation P.
- **Output.** Every stage swaps the halves, so the output undoes the last swap and then
  applies the final permutation FP. This gives the same function as the textbook
  drawing, in which round 16 has no swap.

Timing: a block on `din` at rising edge *n* is in stage *k* after edge *n+k−1*. Its result
is on `dout` after edge *n+16*, which is 17 clock periods after the block was presented.
A new block can enter on every edge. The data registers have no reset. `dout` is
meaningless until the pipeline has filled.

### The key is shared by every stage, not carried with the blocks

The round keys are not passed down the pipeline alongside each block. There is one
64-bit key register in stage 1, and `des_key_schedule` derives all sixteen round keys
from it combinationally. This keeps the register count at 17 × 64 for data plus 64 for
the key. The reference implementation reports 1160 flip-flops, which is exactly that
total plus the 8-bit block counter. The cost is this:

> A block is processed under one key only if `key_s` stays stable from the edge on which
> the block enters until 15 edges later. After a key change, the up to 15 blocks already
> in the rounds come out as a mixture of old and new keys. Blocks entering from the edge
> of the change onward are correct under the new key.

If you need per-block keys, pipeline `rk[]` (16 × 48 extra bits per stage) or the 56-bit
C/D pair together with the data.

### Round keys in the two directions (`des_key_schedule`)

1. PC-1 maps the key to C0 and D0, two 28-bit halves. The parity bits 8, 16, …, 64 are
   dropped.
2. For encryption (`REVERSE = 0`), C and D rotate left by 1, 1, 2, 2, 2, 2, 2, 2, 1, 2, 2,
   2, 2, 2, 2, 1 places before rounds 1 to 16.
3. PC-2 of each C, D pair gives the 48-bit round key.

The decryption engine needs the same keys in the order K16 … K1. The rotations add up to
28 places, a full turn, so C16 = C0 and D16 = D0. With `REVERSE = 1` the generator
therefore starts from C0, D0 as C16, D16 and walks backwards with right rotations, taking
the count of the rotation that produced each pair. Round stage 1 then gets K16.

Every round-key bit is simply one of the key bits, so this block is pure wiring after
synthesis.

## The engine around the pipeline (`des_crypt_system`)

- **`clk_no`** is cleared by reset and counts every clock, wrapping at 255. It numbers
  the blocks. The block that enters while `clk_no = n` leaves while `clk_no = n + 17`.
  For example, a block entering at 00h comes out at 11h.
- **Input queue** (`block_queue`, 8 × 64 bits). A slot pointer steps through the 8
  entries, one per clock. Each clock, the block in the current slot enters the pipeline.
  If `load` is high, `din` is written into that slot and also enters the pipeline in the
  same clock. With `load` low, the stored blocks go round again every 8 clocks. A result
  therefore repeats 8 clocks later: the block that came out at 11h comes out again at 19h.
  After reset the queue holds zeros.
- **Output queue** (`block_queue`, 8 × 64 bits). Each result is written into the slot its
  block came from, which is the current slot minus 17 modulo 8. `rd_idx` selects a slot
  and `rd_data` returns it combinationally.
- **`dout_valid`** goes high 17 clocks after reset and stays high. It marks the end of
  pipeline fill.

To stream data, hold `load` high and present one block per clock. The queue then acts as
a pass-through and each result appears 17 clocks later on `dout`. To reproduce the
reference test, load 8 blocks, drop `load` and watch the results cycle.

## Ports of `des_fpga_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (counter, slot pointer, queues, valid) |
| `enc_key_s` / `dec_key_s` | in | 64 | key including parity bits |
| `enc_plain` / `dec_cipher` | in | 64 | block to encrypt / decrypt |
| `enc_load` / `dec_load` | in | 1 | write the block into the current queue slot (and send it in) |
| `enc_cipher` / `dec_plain` | out | 64 | result from the last stage |
| `enc_valid` / `dec_valid` | out | 1 | pipeline has filled since reset |
| `enc_clk_no` / `dec_clk_no` | out | 8 | block counter |
| `enc_rd_idx` / `dec_rd_idx` | in | 3 | output-queue slot to read |
| `enc_rd_data` / `dec_rd_data` | out | 64 | that slot's content |

The only parameter is `QUEUE_DEPTH`, which defaults to 8. `des_crypt_system` and
`des_pipeline` take `DECRYPT`, and `block_queue` takes `DEPTH` and `WIDTH`. Shared
types, sizes and all DES tables live in `rtl/des_pkg.sv`. Bit 1 in DES numbering is the
most significant bit of each vector.

## What is taken from the reference design and what is not

These come from the published architecture:

- 64-bit data and key lines;
- a first stage that forms L0, R0 and the key halves, followed by sixteen round stages;
- output from stage 17 and a latency of 17 clocks;
- one block per clock;
- decryption with the round keys reversed, generated from C16, D16 back to C0, D0;
- an 8-block plaintext queue and a ciphertext queue;
- the 8-bit block number;
- the test vector, key 2025042507100702 and plaintext 0123456789ABCDEF giving
  ciphertext AACD8CB814B1BE9F. This is standard DES, and the testbenches check it.

These are choices made in this implementation:

- **Reset.** A synchronous active-low reset for the control state.
- **The `load` protocol** and the same-cycle bypass of a loaded block into the pipeline.
- **Output-queue indexing and read port.**
- **`dout_valid`.**
- **Queue width of 64 bits.** The reference describes the queue's storage as 56 bits per
  entry. A DES block is 64 bits wide, so 64 was used.
- **Two engines in one top level.** The reference built the two directions as separate
  FPGA designs. Here they sit side by side in one top level.

Known differences:

- Each engine has 20 more flip-flops than the reference count: a 3-bit slot pointer and
  the 17-bit valid shift register.
- The reference decryption design has 8 more flip-flops than its encryption design. Where
  they come from is not known, and nothing here corresponds to them.
- Timing closure at 167 MHz is a property of the FPGA implementation and has not been
  checked here. The critical path is one round: E, XOR, S-box, P, XOR.

## Verification

Every module has a self-checking testbench in `tb/`. Expected values come from
`tb/des_model_pkg.sv`, a separately written, bit-serial DES model, and from published
values. The model itself is checked against these:

- the standard worked example (key 133457799BBCDFF1: K1 = 1B02EFFC7072, K16 =
  CB3D8B0E17F5, f(F0AAF0AA, K1) = 234AA9BB, ciphertext 85E813540F0AB405);
- the reference test vector above.

| testbench | what it establishes |
|---|---|
| `tb_des_f` | round function on the known value plus 2000 random inputs |
| `tb_des_key_schedule` | both key orders for 300 random keys; parity bits ignored |
| `tb_des_round` | one-clock round stage on 1000 random inputs |
| `tb_block_queue` | reset clears; 2000 random reads and writes against a model |
| `tb_des_pipeline` | 400 back-to-back blocks in both directions. Each result is checked exactly 17 clocks after its block entered, with one result per clock. At the key change at clock 200, every block entering from that edge on must be correct under the new key. The 15 blocks that straddle the change are left unchecked. |
| `tb_des_crypt_system` | the 8-block reference run: AACD8CB814B1BE9F at `clk_no` 11h and again at 19h; recirculation; reloading a slot mid-run; `dout_valid`; output queue |
| `tb_des_fpga_top` | end to end at default parameters. Ciphertext from the encryption engine is streamed into the decryption engine and must return the original plaintext 34 clocks later, across a key change. It counts queue loads, recirculated blocks, the published ciphertext, pipeline fill, results after the key change, round trips and output-queue reads, and fails if any of them never happens. |

Each testbench ends with a line `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

Simulating with Verilator 5, for example the top level:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/des_pkg.sv tb/des_model_pkg.sv tb/tb_des_fpga_top.sv --top-module tb_des_fpga_top
./obj_dir/Vtb_des_fpga_top
```

Replace the testbench file and `--top-module` to run any other testbench. All of them
finish in well under a second.
