// tb_long_sub: self-checking test of the digit-serial conditional subtractor.
// Random and corner operands (equal, a = b - 1, a = b + 1, zero, all ones);
// checks diff = a - b modulo 2^W, borrow = (a < b), res = a >= b ? a - b : a,
// and that done comes ceil(W/8) clocks after start.
module tb_long_sub;
  localparam int W = 61;
  localparam int DIG = 8;
  localparam int ND = (W + DIG - 1) / DIG;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [W-1:0] a, b, diff, res;
  logic busy, done, borrow;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  long_sub #(.W(W), .DIG(DIG)) dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
                                    .busy(busy), .done(done), .diff(diff), .borrow(borrow),
                                    .res(res));

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y);
    int cyc = 0;
    a = x; b = y;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    a = '0; b = '0;  // operands are sampled at start
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (diff !== W'(x - y) || borrow !== (x < y) || res !== ((x >= y) ? W'(x - y) : x)
        || cyc != ND) begin
      failures++;
      $display("FAIL a=%h b=%h diff=%h borrow=%0d res=%h cyc=%0d", x, y, diff, borrow, res, cyc);
    end
  endtask

  initial begin
    logic [W-1:0] x;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    x = {$urandom, $urandom};
    run(x, x); run(x, x + 1); run(x + 1, x); run('0, x); run('1, x); run(x, '1); run('0, '0);
    for (int i = 0; i < 200; i++) run({$urandom, $urandom}, {$urandom, $urandom});
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
