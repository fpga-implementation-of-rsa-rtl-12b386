// tb_rsa_coprocessor: end-to-end test of the RSA coprocessor through its host
// register port, at MW = 64.
//
// The host model writes M, E, X and the exponent length word by word, starts
// CMD_MODEXP, polls the status register and reads RES back; the result is
// compared with square-and-multiply on plain wide integers.  CMD_MUL, CMD_DIV
// and CMD_INV are checked against the *, /, % operators and the defining
// property of an inverse.  The test also counts how often each mechanism of
// the design occurred and fails if one never did: R^2 mod M formed by the
// divider, both multiplications of a pair in the row at once, a pair issued
// straight after the previous one using the write-through bypass, a P update
// skipped for e_i = 0, register B reloaded with 1 before the last
// multiplication, the final subtraction taken and not taken, a command
// ignored while busy.  Two runs use X = M, the one case where the value
// before the final subtraction equals M.
module tb_rsa_coprocessor;
  import rsa_pkg::*;
  localparam int MW    = 64;
  localparam int WORDS = (MW + 31) / 32;
  localparam int RA    = $clog2(2 * WORDS);
  localparam int HAW   = 4 + RA;
  localparam int NRUN  = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_wr = 1'b0;
  logic [HAW-1:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic irq_done;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_r2 = 0, n_pair_overlap = 0, n_bypass = 0, n_skip_p = 0, n_bload1 = 0;
  int n_sub_taken = 0, n_sub_not = 0, n_ignored = 0;

  always #5 clk = ~clk;

  rsa_coprocessor #(.MW(MW)) dut (.clk(clk), .rst_n(rst_n), .host_wr(host_wr),
                                  .host_addr(host_addr), .host_wdata(host_wdata),
                                  .host_rdata(host_rdata), .irq_done(irq_done));

  always @(posedge clk) begin
    if (dut.state == 3'd1 && dut.div_done) n_r2++;
    if (dut.u_exp.u_row.tok_r[1].valid && dut.u_exp.u_row.tok_r[0].valid
        && dut.u_exp.u_row.tok_r[1].slot != dut.u_exp.u_row.tok_r[0].slot) n_pair_overlap++;
    if (dut.u_exp.state == 3'd2 && dut.u_exp.cnt == 0 && dut.u_exp.p_we && dut.u_exp.p_wa == 0)
      n_bypass++;
    if (dut.u_exp.tok.valid && dut.u_exp.tok.first && !dut.u_exp.tok.slot && !dut.u_exp.tok.wen)
      n_skip_p++;
    if (dut.u_exp.b_load && dut.u_exp.b_val == 1) n_bload1++;
    if (dut.u_exp.sub_done) begin
      if (dut.u_exp.sub_borrow) n_sub_not++;
      else n_sub_taken++;
    end
  end

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

  task automatic rd_res(output logic [2*WORDS*32-1:0] v);
    logic [31:0] d;
    v = '0;
    for (int w = 0; w < 2 * WORDS; w++) begin
      rd(6, w, d);
      v[32*w +: 32] = d;
    end
  endtask

  task automatic run_cmd(input cmd_e c);
    logic [31:0] st;
    wr(0, 0, 32'(c));
    // a second start while busy must be ignored
    wr(0, 0, 32'(CMD_MUL));
    rd(0, 0, st);
    if (st[0] && dut.cmd_r == c) n_ignored++;
    do rd(0, 0, st); while (!st[1]);
    checks++;
    if (st[6:4] != 3'(c) || !irq_done) begin
      failures++;
      $display("FAIL status %h after command %0d", st, c);
    end
  endtask

  function automatic logic [MW-1:0] ref_modexp(input logic [MW-1:0] x, input logic [MW-1:0] e,
                                               input int n, input logic [MW-1:0] m);
    logic [2*MW-1:0] p, z;
    p = 1;
    z = (2*MW)'(x);
    for (int i = 0; i < n; i++) begin
      if (e[i]) p = (p * z) % (2*MW)'(m);
      z = (z * z) % (2*MW)'(m);
    end
    p = p % (2*MW)'(m);
    return MW'(p);
  endfunction

  function automatic logic [MW-1:0] rnd();
    logic [MW-1:0] v;
    for (int i = 0; i < MW; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  task automatic modexp(input logic [MW-1:0] m, input logic [MW-1:0] x, input logic [MW-1:0] e,
                        input int n);
    logic [2*WORDS*32-1:0] r;
    logic [MW-1:0] expv;
    wr_wide(1, m); wr_wide(2, e); wr_wide(3, x); wr(0, 1, 32'(n));
    run_cmd(CMD_MODEXP);
    rd_res(r);
    expv = ref_modexp(x, e, n, m);
    checks++;
    if (r !== (2*WORDS*32)'(expv)) begin
      failures++;
      $display("FAIL modexp m=%h x=%h e=%h n=%0d got %h exp %h", m, x, e, n, r[MW-1:0], expv);
    end
  endtask

  initial begin
    logic [MW-1:0] m, x, a, b;
    logic [2*WORDS*32-1:0] r;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NRUN; t++) begin
      m = rnd(); m[0] = 1'b1; m[MW-1] = 1'b1;
      x = rnd() % m;
      modexp(m, x, rnd(), (t == 0) ? MW : 1 + $urandom_range(MW - 1));
    end
    // small exponents: X^1, X^3, X^65537
    m = rnd(); m[0] = 1'b1; m[MW-1] = 1'b1;
    x = rnd() % m;
    modexp(m, x, 1, 1);
    modexp(m, x, 3, 2);
    modexp(m, x, 65537, 17);
    // X = M (not reduced): the Montgomery result before the final step is M
    modexp(m, m, 1, 1);
    modexp(m, m, 5, 3);
    // CMD_MUL
    a = rnd(); b = rnd();
    wr_wide(4, a); wr_wide(5, b);
    run_cmd(CMD_MUL);
    rd_res(r);
    checks++;
    if (r[2*MW-1:0] !== (2*MW)'(a) * (2*MW)'(b)) begin
      failures++;
      $display("FAIL mul");
    end
    // CMD_DIV
    b = rnd() >> 20;
    wr_wide(5, b);
    run_cmd(CMD_DIV);
    rd_res(r);
    checks++;
    if (r[MW-1:0] !== a / b || r[WORDS*32 +: MW] !== a % b) begin
      failures++;
      $display("FAIL div");
    end
    // CMD_INV: inverse of an odd value modulo an odd modulus
    a = rnd(); a[0] = 1'b1; a[MW-1] = 1'b1;
    b = 65537;
    wr_wide(4, a); wr_wide(5, b);
    run_cmd(CMD_INV);
    rd_res(r);
    checks++;
    if (r[WORDS*32 +: MW] == 1 && ((2*MW)'(r[MW-1:0]) * (2*MW)'(b)) % (2*MW)'(a) != 1) begin
      failures++;
      $display("FAIL inv");
    end
    $display("mechanisms: r2=%0d pair_overlap=%0d bypass=%0d skip_p=%0d bload1=%0d sub_taken=%0d sub_not=%0d ignored=%0d",
             n_r2, n_pair_overlap, n_bypass, n_skip_p, n_bload1, n_sub_taken, n_sub_not, n_ignored);
    checks++; if (n_r2 == 0)           begin failures++; $display("FAIL no R^2 division"); end
    checks++; if (n_pair_overlap == 0) begin failures++; $display("FAIL no pair overlap"); end
    checks++; if (n_bypass == 0)       begin failures++; $display("FAIL no bypass"); end
    checks++; if (n_skip_p == 0)       begin failures++; $display("FAIL no skipped P update"); end
    checks++; if (n_bload1 == 0)       begin failures++; $display("FAIL no B reload"); end
    checks++; if (n_sub_taken == 0)    begin failures++; $display("FAIL final subtraction never taken"); end
    checks++; if (n_sub_not == 0)      begin failures++; $display("FAIL final subtraction always taken"); end
    checks++; if (n_ignored == 0)      begin failures++; $display("FAIL busy command never ignored"); end
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
