// tb_block_queue: self-checking test of the block queue register array.
//
// After reset every entry must read zero. Then 2000 clocks of random writes and reads are
// compared with a plain array kept by the testbench; reads are combinational, so a read of
// the slot written on the last edge must already return the new data.
module tb_block_queue;
  localparam int DEPTH = 8, WIDTH = 64;

  logic             clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  logic [2:0]       waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0, cycles = 0;

  block_queue #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (
    .clk(clk), .rst_n(rst_n), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    // random contents before reset, so the reset has something to clear
    we = 1'b1;
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      waddr = 3'(i); wdata = {$urandom, $urandom}; @(negedge clk);
    end
    we = 1'b0; rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = '0;
      raddr = 3'(i); #1;
      checks++;
      if (rdata !== '0) begin failures++; $display("FAIL entry %0d not cleared", i); end
    end
    for (int n = 0; n < 2000; n++) begin
      we = 1'($urandom); waddr = 3'($urandom); wdata = {$urandom, $urandom};
      @(posedge clk); #1;
      if (we) model[waddr] = wdata;
      raddr = 3'($urandom); #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("FAIL read %0d got %h expected %h", raddr, rdata, model[raddr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
