// long_mul: long-integer multiplication, prod = a * b.
//
// Shift-and-add multiplier: the product register starts as {0, b}; each clock
// the low bit selects whether a is added to the upper half, and the register
// shifts right one place.  W clocks after `start`, `done` pulses for one
// clock and prod holds the 2W-bit product until the next start.  The
// document names a long-integer multiplier among the pre- and post-processing
// modules (for example forming the modulus from its two primes) but gives no
// structure; the bit-serial form is this design's choice.
module long_mul #(
  parameter int W = 512
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*W-1:0] prod
);

  localparam int CW = $clog2(W + 1);

  logic [W-1:0]  a_r;
  logic [2*W:0]  p_r;
  logic [W:0]    hi_sum;
  logic [CW-1:0] cnt;

  assign hi_sum = {1'b0, p_r[2*W-1:W]} + (p_r[0] ? {1'b0, a_r} : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_r <= '0; p_r <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a_r  <= a;
        p_r  <= {{(W+1){1'b0}}, b};
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        p_r <= {1'b0, hi_sum, p_r[W-1:1]};
        cnt <= cnt + 1'b1;
        if (cnt == CW'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign prod = p_r[2*W-1:0];

endmodule
