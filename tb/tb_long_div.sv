// tb_long_div: self-checking test of the restoring long divider.
// Random dividends and divisors (including divisor 1, divisor larger than the
// dividend and the exponentiation's constant 2^(2m+4)) are checked against
// the / and % operators, and done must come NW clocks after start.
module tb_long_div;
  localparam int DW = 40;
  localparam int NW = 2 * DW + 5;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [NW-1:0] dividend, quot;
  logic [DW-1:0] divisor, rem;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  long_div #(.NW(NW), .DW(DW)) dut (.clk(clk), .rst_n(rst_n), .start(start),
                                    .dividend(dividend), .divisor(divisor), .busy(busy),
                                    .done(done), .quot(quot), .rem(rem));

  task automatic run(input logic [NW-1:0] n, input logic [DW-1:0] d);
    int cyc = 0;
    dividend = n; divisor = d;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (quot !== n / NW'(d) || rem !== DW'(n % NW'(d)) || cyc != NW) begin
      failures++;
      $display("FAIL n=%h d=%h q=%h r=%h cyc=%0d", n, d, quot, rem, cyc);
    end
  endtask

  function automatic logic [NW-1:0] rnd();
    logic [NW-1:0] v;
    for (int i = 0; i < NW; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    logic [DW-1:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(rnd(), 1);
    run(5, DW'(1000));
    for (int i = 0; i < 30; i++) begin
      d = DW'(rnd()); d[0] = 1'b1; d[DW-1] = 1'b1;
      run(NW'(1) << (2 * DW + 4), d);
      d = DW'(rnd()) >> $urandom_range(DW - 2);
      if (d == 0) d = 3;
      run(rnd(), d);
    end
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
