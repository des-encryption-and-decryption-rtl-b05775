// des_crypt_system: one complete DES encryption (DECRYPT = 0) or decryption (DECRYPT = 1)
// engine: input block queue, 17-stage pipeline, output block queue and block counter.
//
// Operation. An 8-bit counter clk_no is cleared by reset and counts every clock; it numbers
// the blocks. A slot pointer walks round-robin over the QUEUE_DEPTH entries of the input
// queue, one slot per clock. On each clock the block in the current slot enters the pipeline;
// if load is high, din is written into that slot instead and enters the pipeline in the same
// clock. With load held low the stored blocks therefore re-enter every QUEUE_DEPTH clocks,
// so the same results come out again QUEUE_DEPTH clocks later. The block that entered when
// clk_no was n appears on dout while clk_no is n+17, and is also written into the output queue
// at the slot it came from, where rd_idx/rd_data can read it. dout_valid rises once the
// pipeline has filled after reset (17 clocks) and stays high.
//
// The queue depth (8), the 17-clock latency, the 64-bit data and key lines and the 8-bit block
// number follow the published design. How load, the slot pointer and the output-queue read
// port work, the reset and dout_valid are choices of this implementation.
//
// Timing: din/load sampled on the rising edge; dout is combinational from the last pipeline
// register; one block per clock.
module des_crypt_system
  import des_pkg::*;
#(
  parameter bit DECRYPT     = 1'b0,
  parameter int QUEUE_DEPTH = 8,
  localparam int AW         = (QUEUE_DEPTH > 1) ? $clog2(QUEUE_DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  block_t        key_s,
  input  block_t        din,
  input  logic          load,
  output block_t        dout,
  output logic [7:0]    clk_no,
  output logic          dout_valid,
  input  logic [AW-1:0] rd_idx,
  output block_t        rd_data
);

  localparam int LATENCY = ROUNDS + 1;
  // Output slot trails the input slot by LATENCY clocks, modulo the queue depth.
  localparam int OUT_LAG = LATENCY % QUEUE_DEPTH;

  logic [AW-1:0]      in_slot, out_slot;
  logic [LATENCY-1:0] fill_q;
  block_t             q_rdata, pipe_in, pipe_out;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clk_no  <= '0;
      in_slot <= '0;
      fill_q  <= '0;
    end else begin
      clk_no  <= clk_no + 8'd1;
      in_slot <= (int'(in_slot) == QUEUE_DEPTH - 1) ? '0 : in_slot + AW'(1);
      fill_q  <= {fill_q[LATENCY-2:0], 1'b1};
    end
  end

  // The round-robin pointer never leaves the queue.
  a_slot_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    int'(in_slot) < QUEUE_DEPTH);

  always_comb begin
    int s;
    s = int'(in_slot) - OUT_LAG;
    if (s < 0) s += QUEUE_DEPTH;
    out_slot = AW'(s);
  end

  block_queue #(.DEPTH(QUEUE_DEPTH), .WIDTH(BLOCK_W)) u_in_queue (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (load),
    .waddr(in_slot),
    .wdata(din),
    .raddr(in_slot),
    .rdata(q_rdata)
  );

  assign pipe_in = load ? din : q_rdata;

  des_pipeline #(.DECRYPT(DECRYPT)) u_pipeline (
    .clk  (clk),
    .key_s(key_s),
    .din  (pipe_in),
    .dout (pipe_out)
  );

  assign dout       = pipe_out;
  assign dout_valid = fill_q[LATENCY-1];

  block_queue #(.DEPTH(QUEUE_DEPTH), .WIDTH(BLOCK_W)) u_out_queue (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (dout_valid),
    .waddr(out_slot),
    .wdata(pipe_out),
    .raddr(rd_idx),
    .rdata(rd_data)
  );

endmodule
