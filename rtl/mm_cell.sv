// mm_cell: typical processing element of the one-row Montgomery systolic array.
//
// Column j of the row computes, for iteration i of the radix-2 Montgomery loop
// P_{i+1} = (P_i + q_i*M)/2 + a_i*B, the one-bit sum
//     p_out + 2*c_out = p_in + a*b + q*m + c_in
// where p_in is bit j of P_i (coming from the column on the left, i.e. the
// previous iteration), m is bit j of M, b is bit j-1 of B (B shifted up one
// position, so that q_i is just p_{i,0}) and c_in is the carry of the column on
// the right in the same iteration.  The sum is at most 5, so the carry needs
// two bits; the sum bit is bit j-1 of P_{i+1}.  This follows the cell equation
// of the document.
//
// Timing: one clock per cell.  p_out and c_out are registered; p_d is the
// same sum bit before the register, used by the row to load register B in the
// same clock.  When `en` is low the registers clear, so idle columns hold no
// stale carries.  Reset (asynchronous, active low) clears P, as the algorithm
// starts from P_0 = 0.
module mm_cell (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       a,
  input  logic       q,
  input  logic       p_in,
  input  logic [1:0] c_in,
  input  logic       m_bit,
  input  logic       b_bit,
  output logic       p_d,
  output logic       p_out,
  output logic [1:0] c_out
);

  logic [2:0] sum;

  always_comb begin
    sum = {2'b00, p_in} + {2'b00, a & b_bit} + {2'b00, q & m_bit} + {1'b0, c_in};
    p_d = sum[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_out <= 1'b0;
      c_out <= 2'b00;
    end else if (en) begin
      p_out <= sum[0];
      c_out <= sum[2:1];
    end else begin
      p_out <= 1'b0;
      c_out <= 2'b00;
    end
  end

endmodule
