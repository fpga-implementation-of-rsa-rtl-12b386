// tb_bit_ram: self-checking test of the one-bit operand RAM.
// Writes a random pattern to every address, reads it back asynchronously
// (same clock as the address is applied) against a model array, then
// overwrites random addresses and checks that a written bit is readable in
// the clock right after the write edge.
module tb_bit_ram;
  localparam int DEPTH = 2048;
  localparam int AW    = 11;
  logic clk = 1'b0;
  logic we = 1'b0, wdata = 1'b0, rdata;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bit_ram #(.DEPTH(DEPTH)) dut (.clk(clk), .we(we), .waddr(waddr), .wdata(wdata),
                                .raddr(raddr), .rdata(rdata));

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = 1'($urandom); model[i] = wdata;
    end
    @(negedge clk) we = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      raddr = AW'(i);
      #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("FAIL addr %0d got %0d exp %0d", i, rdata, model[i]);
      end
    end
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'($urandom_range(DEPTH - 1)); wdata = 1'($urandom);
      model[waddr] = wdata;
      raddr = waddr;
      @(negedge clk);
      we = 1'b0;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("FAIL read after write addr %0d", raddr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
