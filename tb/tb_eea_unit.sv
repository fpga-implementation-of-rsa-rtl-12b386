// tb_eea_unit: self-checking test of the extended Euclidean unit.
// For random moduli f and values e < f it checks gcd against a software
// Euclid, and, when the gcd is 1, that inv < f and inv*e mod f = 1.  Corner
// cases: e = 1, e = f-1, e = 0, a shared factor, and an even f with odd e
// (as with a private exponent modulo phi).
module tb_eea_unit;
  localparam int W = 40;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [W-1:0] f, e, inv, gcd;
  logic busy, done;
  int checks = 0, failures = 0, coprime = 0;

  always #5 clk = ~clk;

  eea_unit #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .start(start), .f(f), .e(e), .busy(busy),
                         .done(done), .inv(inv), .gcd(gcd));

  function automatic logic [W-1:0] sw_gcd(input logic [W-1:0] x, input logic [W-1:0] y);
    logic [W-1:0] t;
    while (y != 0) begin
      t = x % y; x = y; y = t;
    end
    return x;
  endfunction

  task automatic run(input logic [W-1:0] ff, input logic [W-1:0] ee);
    logic [W-1:0] g;
    f = ff; e = ee;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) @(negedge clk);
    g = sw_gcd(ff, ee);
    checks++;
    if (gcd !== g) begin
      failures++;
      $display("FAIL gcd f=%h e=%h got %h exp %h", ff, ee, gcd, g);
    end
    if (g == 1) begin
      coprime++;
      checks++;
      if (inv >= ff || ((2*W)'(inv) * (2*W)'(ee)) % (2*W)'(ff) != 1) begin
        failures++;
        $display("FAIL inv f=%h e=%h got %h", ff, ee, inv);
      end
    end
  endtask

  initial begin
    logic [W-1:0] ff, ee;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    ff = W'({$urandom, $urandom}) | 1;
    run(ff, 1); run(ff, ff - 1); run(ff, 0); run(W'(3 * 5 * 7 * 11 * 13), W'(7 * 3));
    run(W'(1000000), W'(65537));
    for (int i = 0; i < 40; i++) begin
      ff = W'({$urandom, $urandom});
      if (ff < 3) ff = 3;
      ee = W'({$urandom, $urandom}) % ff;
      if (i % 2 == 0) ff[0] = 1'b0;
      if (ee >= ff) ee = ff - 1;
      run(ff, ee);
    end
    checks++;
    if (coprime < 10) begin
      failures++;
      $display("FAIL too few invertible cases (%0d)", coprime);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
