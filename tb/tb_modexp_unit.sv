// tb_modexp_unit: self-checking test of the modular exponentiation unit.
//
// Runs random exponentiations X^E mod M with a random odd MW-bit modulus
// (top bit set), X < M and random exponents of random length, and compares
// the result with square-and-multiply on plain wide integers.  R^2 mod M is
// computed here with the % operator.  It also checks the clock count of each
// exponentiation against 2(MW+3)(n+1) pair clocks plus load, drain, final
// multiplication and subtraction, and that a pair follows the previous one
// without a gap (the RAM bypass is used) and that exponent bits of 0 and 1
// both occurred.
module tb_modexp_unit;
  localparam int MW  = 64;
  localparam int EW  = 64;
  localparam int NBW = $clog2(EW + 1);
  localparam int NIT = MW + 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [MW-1:0] m_val, x_val, r2_val;
  logic [EW-1:0] e_val;
  logic [NBW-1:0] n_bits;
  logic busy, done;
  logic [MW-1:0] result;
  int checks = 0, failures = 0;
  int bypass_seen = 0;

  always #5 clk = ~clk;

  modexp_unit #(.MW(MW), .EW(EW)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .m_val(m_val), .e_val(e_val), .n_bits(n_bits),
    .x_val(x_val), .r2_val(r2_val), .busy(busy), .done(done), .result(result));

  // the first multiplier bit of a pair taken from the bit being written
  always @(posedge clk)
    if (dut.state == 3'd2 && dut.cnt == 0 && dut.p_we && dut.p_wa == 0) bypass_seen++;

  function automatic logic [MW-1:0] ref_modexp(input logic [MW-1:0] x, input logic [EW-1:0] e,
                                               input int n, input logic [MW-1:0] m);
    logic [2*MW-1:0] p, z;
    p = 1;
    z = {{MW{1'b0}}, x};
    for (int i = 0; i < n; i++) begin
      if (e[i]) p = (p * z) % {{MW{1'b0}}, m};
      z = (z * z) % {{MW{1'b0}}, m};
    end
    p = p % {{MW{1'b0}}, m};
    return p[MW-1:0];
  endfunction

  function automatic logic [MW-1:0] rand_wide();
    logic [MW-1:0] v;
    for (int i = 0; i < MW; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  task automatic run_one(input logic [MW-1:0] m, input logic [MW-1:0] x,
                         input logic [EW-1:0] e, input int n);
    logic [2*MW+4:0] r2w;
    logic [MW-1:0] exp_r;
    int cyc;
    int exp_cyc;
    r2w = ((2*MW+5)'(1) << (2*MW+4)) % (2*MW+5)'(m);
    m_val = m; x_val = x; e_val = e; n_bits = NBW'(n); r2_val = r2w[MW-1:0];
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    exp_r = ref_modexp(x, e, n, m);
    checks++;
    if (result !== exp_r) begin
      failures++;
      $display("FAIL m=%h x=%h e=%h n=%0d got %h exp %h", m, x, e, n, result, exp_r);
    end
    // load, (n+1) pairs, drain and B load, final multiplication, drain,
    // digit-serial subtraction, done
    exp_cyc = NIT + 2*NIT*(n+1) + (NIT + 2) + 2*NIT + (NIT + 2) + (MW + 1 + 7) / 8 + 1;
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL cycles %0d expected %0d", cyc, exp_cyc);
    end
  endtask

  initial begin
    logic [MW-1:0] m, x;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // small corner cases
    m = rand_wide(); m[0] = 1'b1; m[MW-1] = 1'b1;
    run_one(m, 0, 5, 3);
    run_one(m, 1, '1, EW);
    run_one(m, m - 1, 2, 2);
    run_one(m, 12345, 0, 0);
    for (int t = 0; t < 12; t++) begin
      m = rand_wide(); m[0] = 1'b1; m[MW-1] = 1'b1;
      x = rand_wide() % m;
      run_one(m, x, rand_wide(), 1 + $urandom_range(EW - 1));
    end
    // a modulus with a clear top bit
    m = rand_wide() >> 5; m[0] = 1'b1;
    x = rand_wide() % m;
    run_one(m, x, rand_wide(), EW);
    checks++;
    if (bypass_seen == 0) begin
      failures++;
      $display("FAIL back-to-back pair bypass never used");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
