// tb_mm_cell: exhaustive self-checking test of the Montgomery cell.
// Every combination of p_in, a, b, q, m and the carry-in values 0..2 is
// applied; one clock later p_out + 2*c_out must equal the arithmetic sum
// p_in + a*b + q*m + c_in, and p_d must equal p_out.  With en low the
// registers must clear.
module tb_mm_cell;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic a, q, p_in, m_bit, b_bit, p_d, p_out;
  logic [1:0] c_in, c_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mm_cell dut (.clk(clk), .rst_n(rst_n), .en(en), .a(a), .q(q), .p_in(p_in), .c_in(c_in),
               .m_bit(m_bit), .b_bit(b_bit), .p_d(p_d), .p_out(p_out), .c_out(c_out));

  initial begin
    int s;
    logic pd_prev;
    {a, q, p_in, m_bit, b_bit, c_in} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 32; v++) begin
      for (int c = 0; c < 3; c++) begin
        {p_in, a, b_bit, q, m_bit} = 5'(v);
        c_in = 2'(c);
        en = 1'b1;
        s = int'(p_in) + int'(a & b_bit) + int'(q & m_bit) + c;
        #1 pd_prev = p_d;
        @(negedge clk);
        checks++;
        if (int'(p_out) + 2 * int'(c_out) != s || pd_prev != p_out) begin
          failures++;
          $display("FAIL v=%0d c=%0d got p=%0d c=%0d exp sum %0d", v, c, p_out, c_out, s);
        end
      end
    end
    en = 1'b0;
    {p_in, a, b_bit, q, m_bit} = '1;
    @(negedge clk);
    checks++;
    if (p_out !== 1'b0 || c_out !== 2'b00) begin
      failures++;
      $display("FAIL idle column kept a value");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
