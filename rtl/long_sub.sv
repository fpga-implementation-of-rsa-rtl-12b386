// long_sub: long-integer conditional subtraction, res = (a >= b) ? a - b : a.
//
// The exponentiation keeps its intermediate results below 2M and leaves out
// the subtraction of M until the very end; this unit performs that final
// step (and is the coprocessor's long-integer subtractor).  It works on DIG-bit
// digits, least significant first, one digit per clock, with the borrow kept
// in a flip-flop between digits, so a W-bit subtraction takes ceil(W/DIG)
// clocks after `start`.  `done` pulses for one clock when diff, borrow
// (a < b) and res are valid; they then hold until the next start.  a and b
// are sampled at start.  The digit-serial structure and the digit width of 8
// (the widest shape of the embedded RAM) are this design's choices; the
// document gives only the function.
module long_sub #(
  parameter int W   = 513,
  parameter int DIG = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] diff,
  output logic         borrow,
  output logic [W-1:0] res
);

  localparam int ND = (W + DIG - 1) / DIG;  // number of digits
  localparam int WP = ND * DIG;             // padded width
  localparam int CW = $clog2(ND + 1);

  logic [WP-1:0]  a_sr, b_sr, d_sr, a_keep;
  logic           br;
  logic [CW-1:0]  cnt;
  logic [DIG:0]   dsum;

  assign dsum = {1'b0, a_sr[DIG-1:0]} - {1'b0, b_sr[DIG-1:0]} - {{DIG{1'b0}}, br};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_sr <= '0; b_sr <= '0; d_sr <= '0; a_keep <= '0;
      br <= 1'b0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        a_sr   <= WP'(a);
        b_sr   <= WP'(b);
        a_keep <= WP'(a);
        br     <= 1'b0;
        cnt    <= '0;
        busy   <= 1'b1;
      end else if (busy) begin
        a_sr <= a_sr >> DIG;
        b_sr <= b_sr >> DIG;
        d_sr <= {dsum[DIG-1:0], d_sr[WP-1:DIG]};
        br   <= dsum[DIG];
        cnt  <= cnt + 1'b1;
        if (cnt == CW'(ND - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign diff   = d_sr[W-1:0];
  assign borrow = br;
  assign res    = br ? a_keep[W-1:0] : d_sr[W-1:0];

endmodule
