// systolic_row: one row of the Montgomery modular multiplication array.
//
// The row has MW+4 columns for an MW-bit odd modulus M (m+4 columns: the
// partial sum before the halving stays below 10M).  Each clock a token
// (rsa_pkg::mm_token_t) carrying a_i enters column 0 and moves one column left
// per clock; column 0 sets q_i to p_{i,0}.  Column j works on iteration i of a
// multiplication at clock t0 + 2i + j, so a new iteration of the same
// multiplication can enter every second clock, once column 1 has produced
// p_{i+1,0}.  The free clocks carry a second, independent multiplication: the
// row computes P*Z and Z*Z of one exponentiation step side by side, both with
// multiplier B.  A multiplication takes MW+3 iterations (radix 2, B shifted
// up one bit, a_{m+1} = a_{m+2} = 0), and its result bit k leaves column k+1
// at clock t0 + 2(MW+3) + k.
//
// Columns 0..MW+2 are mm_cell instances.  The leftmost column MW+3 has no M
// or B bit and no incoming P bit, so its carry-in (at most 1) is its sum bit.
//
// Register B is distributed: column j keeps bit j-1.  It is loaded in
// parallel by b_load, or, when a token with `updb` set finishes its last
// iteration, each column copies its own result bit into its B bit.  That is
// the clock after the last use of the old bit there, so a new multiplication
// can follow straight away with the new B.
//
// Outputs: for each slot s, res_valid[s] is high for MW+3 consecutive clocks
// while result bits 0..MW+2 of a multiplication whose token had `wen` set
// appear on res_bit[s], least significant first.  busy is high while any
// column holds a valid token.
//
// The cell equation, the column count, the q_i rule, the interleaving of two
// multiplications and the timing follow the document; the token encoding, the
// distributed B register and the result outputs are this design's choices.
module systolic_row
  import rsa_pkg::*;
#(
  parameter int MW = 512
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mm_token_t     in_tok,
  input  logic [MW-1:0] m_val,
  input  logic          b_load,
  input  logic [MW:0]   b_val,
  output logic [1:0]    res_valid,
  output logic [1:0]    res_bit,
  output logic          busy
);

  localparam int NC = MW + 4;  // number of columns, 0 .. MW+3

  mm_token_t  tok_in [NC];
  mm_token_t  tok_r  [NC];
  logic [1:0] c_in   [NC];
  logic [1:0] c_r    [NC];
  logic [NC-2:0] p_in;   // the leftmost column has no P, M or B input
  logic [NC-1:0] p_d;
  logic [NC-1:0] p_r;
  logic [NC-2:0] m_col;
  logic [NC-2:0] b_col;
  logic          p_left;
  logic [MW:0] b_r;

  // token and carry entering each column
  always_comb begin
    for (int j = 0; j < NC; j++) begin
      if (j == 0) begin
        tok_in[j] = in_tok;
        c_in[j]   = 2'b00;
      end else begin
        tok_in[j] = tok_r[j-1];
        c_in[j]   = c_r[j-1];
      end
    end
    for (int j = 0; j < NC - 1; j++) begin
      p_in[j]  = tok_in[j].first ? 1'b0 : p_r[j+1];
      m_col[j] = (j < MW) ? m_val[j] : 1'b0;
      b_col[j] = (j >= 1 && j <= MW + 1) ? b_r[j-1] : 1'b0;
    end
    tok_in[0].q = p_in[0];  // q_i = p_{i,0}
  end

  for (genvar j = 0; j < NC - 1; j++) begin : g_cell
    mm_cell u_cell (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (tok_in[j].valid),
      .a    (tok_in[j].a),
      .q    (tok_in[j].q),
      .p_in (p_in[j]),
      .c_in (c_in[j]),
      .m_bit(m_col[j]),
      .b_bit(b_col[j]),
      .p_d  (p_d[j]),
      .p_out(p_r[j]),
      .c_out(c_r[j])
    );
  end

  // leftmost column: no M, B or P input; its carry-in is at most 1
  assign p_d[NC-1]  = c_in[NC-1][0];
  assign p_r[NC-1]  = p_left;
  assign c_r[NC-1]  = 2'b00;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p_left <= 1'b0;
    else        p_left <= tok_in[NC-1].valid ? c_in[NC-1][0] : 1'b0;
  end

  // token pipeline
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NC; j++) tok_r[j] <= MM_TOKEN_IDLE;
    end else begin
      for (int j = 0; j < NC; j++) tok_r[j] <= tok_in[j];
    end
  end

  // distributed register B: column j holds b_{j-1}
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_r <= '0;
    end else if (b_load) begin
      b_r <= b_val;
    end else begin
      for (int j = 1; j <= MW + 1; j++) begin
        if (tok_in[j].valid && tok_in[j].last && tok_in[j].updb && tok_in[j].slot)
          b_r[j-1] <= p_d[j];
      end
    end
  end

  // result bits: column k+1 holds result bit k after the last iteration
  always_comb begin
    res_valid = '0;
    res_bit   = '0;
    busy      = 1'b0;
    for (int j = 0; j < NC; j++) begin
      busy = busy | tok_r[j].valid;
      if (j >= 1 && tok_r[j].valid && tok_r[j].last && tok_r[j].wen) begin
        res_valid[tok_r[j].slot] = 1'b1;
        res_bit[tok_r[j].slot]   = res_bit[tok_r[j].slot] | p_r[j];
      end
    end
  end

  // the leftmost carry is bounded by 1 and no carry leaves the row
  a_left_carry : assert property (@(posedge clk) disable iff (!rst_n)
                                  tok_in[NC-1].valid |-> c_in[NC-1] <= 2'd1)
    else $error("systolic_row: leftmost carry exceeds 1");

endmodule
