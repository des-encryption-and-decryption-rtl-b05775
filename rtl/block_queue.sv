// block_queue: small register array holding the blocks that circulate through the cipher.
//
// DEPTH entries of WIDTH bits with one synchronous write port and one combinational read port.
// It serves both as the input queue (blocks waiting to enter the pipeline, re-sent round-robin)
// and as the output queue (results collected in the slot their input came from). Reset clears
// every entry, so a queue that was never loaded feeds all-zero blocks.
//
// Interface: we/waddr/wdata written on the rising edge; rdata = entry raddr, same cycle.
module block_queue #(
  parameter int DEPTH = 8,
  parameter int WIDTH = 64,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];

endmodule
