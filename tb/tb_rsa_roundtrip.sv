// tb_rsa_roundtrip: a complete 512-bit RSA key set-up, encryption and
// decryption on the coprocessor at its default size.
//
// The testbench finds two 256-bit primes p and q (trial division by small
// primes, then Miller-Rabin with several bases, on plain wide integers).  The
// coprocessor then does the rest through its host port: N = p*q and
// phi = (p-1)(q-1) with CMD_MUL, the private exponent D = 65537^-1 mod phi
// with CMD_INV (a new prime pair is drawn if the gcd is not 1),
// C = X^65537 mod N and X' = C^D mod N with CMD_MODEXP.  It checks N and phi,
// D*65537 = 1 (mod phi), C against a software exponentiation, and X' = X.
module tb_rsa_roundtrip;
  import rsa_pkg::*;
  localparam int MW    = 512;
  localparam int HW    = MW / 2;
  localparam int WORDS = MW / 32;
  localparam int RA    = $clog2(2 * WORDS);
  localparam int HAW   = 4 + RA;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_wr = 1'b0;
  logic [HAW-1:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic irq_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rsa_coprocessor dut (.clk(clk), .rst_n(rst_n), .host_wr(host_wr), .host_addr(host_addr),
                       .host_wdata(host_wdata), .host_rdata(host_rdata), .irq_done(irq_done));

  task automatic wr(input int region, input int word, input logic [31:0] d);
    @(negedge clk);
    host_wr = 1'b1;
    host_addr = {4'(region), RA'(word)};
    host_wdata = d;
    @(negedge clk);
    host_wr = 1'b0;
  endtask

  task automatic rd(input int region, input int word, output logic [31:0] d);
    @(negedge clk);
    host_addr = {4'(region), RA'(word)};
    #1 d = host_rdata;
  endtask

  task automatic wr_wide(input int region, input logic [MW-1:0] v);
    for (int w = 0; w < WORDS; w++) wr(region, w, 32'(v >> (32 * w)));
  endtask

  task automatic rd_res(output logic [2*MW-1:0] v);
    logic [31:0] d;
    for (int w = 0; w < 2 * WORDS; w++) begin
      rd(6, w, d);
      v[32*w +: 32] = d;
    end
  endtask

  task automatic run_cmd(input cmd_e c, output logic [2*MW-1:0] res);
    logic [31:0] st;
    wr(0, 0, 32'(c));
    do rd(0, 0, st); while (!st[1]);
    rd_res(res);
  endtask

  // software arithmetic for the primality test and the reference
  function automatic logic [MW-1:0] sw_powmod(input logic [MW-1:0] x, input logic [MW-1:0] e,
                                              input logic [MW-1:0] m);
    logic [2*MW-1:0] p, z;
    p = 1;
    z = (2*MW)'(x) % (2*MW)'(m);
    for (int i = 0; i < MW; i++) begin
      if (e[i]) p = (p * z) % (2*MW)'(m);
      z = (z * z) % (2*MW)'(m);
    end
    return MW'(p);
  endfunction

  function automatic bit is_probable_prime(input logic [MW-1:0] n);
    int small_p[] = '{3, 5, 7, 11, 13, 17, 19, 23, 29, 31, 37, 41, 43, 47, 53, 59, 61, 67, 71,
                      73, 79, 83, 89, 97, 101, 103, 107, 109, 113, 127, 131, 137, 139, 149};
    int bases[] = '{2, 3, 5, 7, 11};
    logic [MW-1:0] d, x;
    int s;
    foreach (small_p[k]) if (n % MW'(small_p[k]) == 0) return 1'b0;
    d = n - 1;
    s = 0;
    while (!d[0]) begin
      d = d >> 1;
      s++;
    end
    foreach (bases[k]) begin
      bit ok;
      x = sw_powmod(MW'(bases[k]), d, n);
      if (x == 1 || x == n - 1) continue;
      ok = 1'b0;
      for (int r = 1; r < s; r++) begin
        x = MW'(((2*MW)'(x) * (2*MW)'(x)) % (2*MW)'(n));
        if (x == n - 1) begin
          ok = 1'b1;
          break;
        end
      end
      if (!ok) return 1'b0;
    end
    return 1'b1;
  endfunction

  function automatic logic [MW-1:0] rand_prime();
    logic [MW-1:0] c;
    c = '0;
    for (int i = 0; i < HW; i += 32) c[i +: 32] = $urandom;
    c[HW-1] = 1'b1;
    c[HW-2] = 1'b1;  // p*q then has its top bit set
    c[0] = 1'b1;
    while (!is_probable_prime(c)) c = c + 2;
    return c;
  endfunction

  initial begin
    logic [MW-1:0] p, q, n, phi, d, x, c, c_ref;
    logic [2*MW-1:0] r;
    logic [MW-1:0] e;
    int tries;
    e = 65537;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    tries = 0;
    do begin
      p = rand_prime();
      q = rand_prime();
      // N = p*q and phi = (p-1)(q-1) on the coprocessor
      wr_wide(4, p); wr_wide(5, q);
      run_cmd(CMD_MUL, r);
      n = r[MW-1:0];
      checks++;
      if (r !== (2*MW)'(p) * (2*MW)'(q)) begin
        failures++;
        $display("FAIL N = p*q");
      end
      wr_wide(4, p - 1); wr_wide(5, q - 1);
      run_cmd(CMD_MUL, r);
      phi = r[MW-1:0];
      // D = e^-1 mod phi
      wr_wide(4, phi); wr_wide(5, e);
      run_cmd(CMD_INV, r);
      d = r[MW-1:0];
      tries++;
    end while (r[MW +: MW] != 1 && tries < 5);
    checks++;
    if (r[MW +: MW] != 1 || ((2*MW)'(d) * (2*MW)'(e)) % (2*MW)'(phi) != 1) begin
      failures++;
      $display("FAIL private exponent");
    end
    $display("N = %h", n);
    for (int t = 0; t < 2; t++) begin
      for (int i = 0; i < MW; i += 32) x[i +: 32] = $urandom;
      x = x % n;
      // encrypt: C = X^e mod N
      wr_wide(1, n); wr_wide(2, e); wr_wide(3, x); wr(0, 1, 17);
      run_cmd(CMD_MODEXP, r);
      c = r[MW-1:0];
      c_ref = sw_powmod(x, e, n);
      checks++;
      if (c !== c_ref) begin
        failures++;
        $display("FAIL encryption got %h exp %h", c, c_ref);
      end
      // decrypt: X' = C^D mod N
      wr_wide(2, d); wr_wide(3, c); wr(0, 1, MW);
      run_cmd(CMD_MODEXP, r);
      checks++;
      if (r[MW-1:0] !== x) begin
        failures++;
        $display("FAIL decryption got %h exp %h", r[MW-1:0], x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
