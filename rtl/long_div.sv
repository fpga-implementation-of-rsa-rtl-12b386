// long_div: long-integer division, quot = dividend / divisor and
// rem = dividend mod divisor.
//
// Restoring binary division: one quotient bit per clock, most significant
// first.  Each clock the partial remainder is shifted left by one dividend bit
// and the divisor is subtracted when it fits.  A division takes NW clocks after
// `start`; `done` pulses for one clock, after which quot and rem hold.  The
// coprocessor uses it for the precomputed constant R^2 mod M of the
// exponentiation and as its general long-integer divider.  Division by zero
// gives an all-ones quotient and returns the low DW bits of the dividend as the
// remainder.  The document names a long-integer divider among the pre- and
// post-processing modules but gives no structure; the bit-serial restoring
// form is this design's choice.
module long_div #(
  parameter int NW = 1029,  // dividend width (2*512+5 holds 2^(2m+4))
  parameter int DW = 512    // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quot,
  output logic [DW-1:0] rem
);

  localparam int CW = $clog2(NW + 1);

  logic [NW-1:0] n_sr;
  logic [DW-1:0] d_r;
  logic [DW:0]   r_r;
  logic [DW:0]   r_sh;
  logic [DW+1:0] r_sub;
  logic [CW-1:0] cnt;

  always_comb begin
    r_sh  = {r_r[DW-1:0], n_sr[NW-1]};
    r_sub = {1'b0, r_sh} - {2'b00, d_r};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_sr <= '0; d_r <= '0; r_r <= '0; quot <= '0;
      cnt <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        n_sr <= dividend;
        d_r  <= divisor;
        r_r  <= '0;
        quot <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        n_sr <= n_sr << 1;
        if (!r_sub[DW+1]) begin
          r_r  <= r_sub[DW:0];
          quot <= {quot[NW-2:0], 1'b1};
        end else begin
          r_r  <= r_sh;
          quot <= {quot[NW-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (cnt == CW'(NW - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign rem = r_r[DW-1:0];

endmodule
