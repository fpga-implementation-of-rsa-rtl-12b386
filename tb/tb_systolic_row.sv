// tb_systolic_row: self-checking test of the one-row Montgomery array.
//
// Issues back-to-back pairs of multiplications (one token per clock,
// alternating slot 0 and slot 1, no gap between pairs).  Slot 0 computes
// A0*B, slot 1 computes A1*B and replaces register B with its result, as the
// squaring does in the exponentiation.  Each result must satisfy
// res * 2^(MW+2) = A*B (mod M) and res < 2M for A, B < 2M.  The result bits
// must start exactly 2(MW+3) clocks after the first token of a multiplication,
// and pairs follow every 2(MW+3) clocks.  Some slot-0 tokens carry wen = 0
// and must produce no result.
module tb_systolic_row;
  import rsa_pkg::*;
  localparam int MW  = 24;
  localparam int NIT = MW + 3;
  localparam int NP  = 40;  // pairs

  logic clk = 1'b0, rst_n = 1'b0;
  mm_token_t tok;
  logic [MW-1:0] m_val;
  logic b_load = 1'b0;
  logic [MW:0] b_val = '0;
  logic [1:0] res_valid, res_bit;
  logic busy;
  int checks = 0, failures = 0;
  int cyc = 0;

  logic [MW+2:0] a_op [NP][2];
  logic [MW:0]   b_exp [NP+1];
  logic          wen0 [NP];
  logic [MW+2:0] got [2];
  int            gpos [2];
  int            gidx [2];
  int            first_bit_cyc [2];

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  systolic_row #(.MW(MW)) dut (.clk(clk), .rst_n(rst_n), .in_tok(tok), .m_val(m_val),
                               .b_load(b_load), .b_val(b_val), .res_valid(res_valid),
                               .res_bit(res_bit), .busy(busy));

  function automatic logic [MW:0] mont(input logic [MW+2:0] a, input logic [MW:0] b);
    // a*b*2^-(MW+2) mod M by repeated halving
    logic [2*MW+8:0] t;
    t = (2*MW+9)'(a) * (2*MW+9)'(b);
    t = t % (2*MW+9)'(m_val);
    for (int i = 0; i < MW + 2; i++) begin
      if (t[0]) t = t + (2*MW+9)'(m_val);
      t = t >> 1;
    end
    return (MW+1)'(t);
  endfunction

  function automatic logic [MW:0] rnd2m();
    logic [63:0] v;
    v = {$urandom, $urandom};
    return (MW+1)'(v % (64'(m_val) * 2));
  endfunction

  // collect result bits per slot, least significant first
  always @(negedge clk) begin
    for (int s = 0; s < 2; s++) begin
      if (res_valid[s]) begin
        if (gpos[s] == 0) first_bit_cyc[s] = cyc;
        got[s][gpos[s]] = res_bit[s];
        gpos[s]++;
        if (gpos[s] == NIT) begin
          int k;
          logic [MW:0] e;
          // slot 0 results of pairs with wen = 0 never appear
          k = gidx[s];
          if (s == 0) while (!wen0[k]) k++;
          e = mont(a_op[k][s], b_exp[k]);
          checks++;
          if (64'(got[s]) % 64'(m_val) != 64'(e) % 64'(m_val) || 64'(got[s]) >= 2 * 64'(m_val)) begin
            failures++;
            $display("FAIL pair %0d slot %0d got %h exp %h (mod M)", k, s, got[s], e);
          end
          // bit 0 appears 2(MW+3) clocks after the first token (issued at clock 2*NIT*k + s)
          checks++;
          if (first_bit_cyc[s] != 2 * NIT * k + s + 2 * NIT + 4) begin
            failures++;
            $display("FAIL pair %0d slot %0d first bit at %0d", k, s, first_bit_cyc[s]);
          end
          gpos[s] = 0;
          gidx[s] = k + 1;
        end
      end
    end
  end

  initial begin
    logic [63:0] mv;
    tok = MM_TOKEN_IDLE;
    gpos = '{0, 0}; gidx = '{0, 0};
    mv = {$urandom, $urandom};
    m_val = MW'(mv) | MW'(1) | (MW'(1) << (MW - 1));
    for (int k = 0; k < NP; k++) begin
      a_op[k][0] = (MW+3)'(rnd2m());
      a_op[k][1] = (MW+3)'(rnd2m());
      wen0[k] = (k % 3 != 1);
    end
    wen0[NP-1] = 1'b1;
    b_exp[0] = rnd2m();
    for (int k = 0; k < NP; k++) b_exp[k+1] = mont(a_op[k][1], b_exp[k]);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    b_load = 1'b1; b_val = b_exp[0];
    @(negedge clk);
    b_load = 1'b0;
    wait (cyc == 4);
    @(negedge clk);
    // clock 4 + 2*NIT*k + 2*i + s carries iteration i of pair k, slot s
    for (int k = 0; k < NP; k++) begin
      for (int i = 0; i < NIT; i++) begin
        for (int s = 0; s < 2; s++) begin
          tok = MM_TOKEN_IDLE;
          tok.valid = 1'b1;
          tok.slot  = 1'(s);
          tok.a     = (i <= MW) ? a_op[k][s][i] : 1'b0;
          tok.first = (i == 0);
          tok.last  = (i == NIT - 1);
          tok.wen   = (s == 1) || wen0[k];
          tok.updb  = (s == 1);
          @(negedge clk);
        end
      end
    end
    tok = MM_TOKEN_IDLE;
    wait (!busy);
    repeat (3) @(negedge clk);
    checks++;
    if (gidx[1] != NP || gidx[0] != NP) begin
      failures++;
      $display("FAIL results seen: slot0 %0d slot1 %0d", gidx[0], gidx[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NIT * NP + 500) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
