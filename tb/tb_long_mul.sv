// tb_long_mul: self-checking test of the shift-and-add long multiplier.
// Random and corner operands are checked against the * operator on 2W-bit
// values, and done must come W clocks after start.
module tb_long_mul;
  localparam int W = 48;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [W-1:0] a, b;
  logic [2*W-1:0] prod;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  long_mul #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b), .busy(busy),
                         .done(done), .prod(prod));

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y);
    int cyc = 0;
    a = x; b = y;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (prod !== (2*W)'(x) * (2*W)'(y) || cyc != W) begin
      failures++;
      $display("FAIL a=%h b=%h prod=%h cyc=%0d", x, y, prod, cyc);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run('1, '1); run(0, '1); run('1, 1); run(1, 0);
    for (int i = 0; i < 100; i++) run({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
