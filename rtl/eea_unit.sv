// eea_unit: extended Euclidean algorithm, inv = e^-1 mod f and gcd(f, e).
//
// Used in key preparation (a private exponent from the public one, or the
// Montgomery constant).  The unit keeps the remainder pair (r0, r1), starting
// at (f, e), and the signed coefficient pair (t0, t1), starting at (0, 1), with
// r = t*e (mod f) throughout.  Each Euclid step divides r0 by r1 with a
// restoring divider, one quotient bit per clock, most significant first; in
// the same clock the product q*t1 is built Horner-style (acc = 2*acc + q_k*t1),
// so no multiplier is needed.  After W clocks (r0, r1) <- (r1, r0 mod r1) and
// (t0, t1) <- (t1, t0 - q*t1).  When r1 reaches zero, gcd = r0 and
// inv = t0 mod f; inv is meaningful only when gcd = 1.  e must be below f.
// A step takes W+1 clocks and there are at most about 1.44*W steps.  `done`
// pulses for one clock; inv and gcd hold until the next start.  The document
// only names an extended-Euclid module; this structure is this design's own.
module eea_unit #(
  parameter int W = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] f,
  input  logic [W-1:0] e,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] inv,
  output logic [W-1:0] gcd
);

  localparam int CW = $clog2(W + 1);

  typedef enum logic [1:0] {S_IDLE, S_CHECK, S_DIV} state_e;

  state_e                state;
  logic [W-1:0]          f_r, r0, r1, n_sr, rr;
  logic signed [W+1:0]   t0, t1, acc;
  logic [CW-1:0]         cnt;
  logic [W:0]            rr_sh;
  logic [W+1:0]          rr_sub;
  logic                  qb;
  logic signed [W+1:0]   acc_nx;

  always_comb begin
    rr_sh  = {rr, n_sr[W-1]};
    rr_sub = {1'b0, rr_sh} - {2'b00, r1};
    qb     = ~rr_sub[W+1];
    acc_nx = (acc <<< 1) + (qb ? t1 : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      f_r <= '0; r0 <= '0; r1 <= '0; n_sr <= '0; rr <= '0;
      t0 <= '0; t1 <= '0; acc <= '0; cnt <= '0;
      inv <= '0; gcd <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            f_r   <= f;
            r0    <= f;
            r1    <= e;
            t0    <= '0;
            t1    <= (W+2)'(1);
            state <= S_CHECK;
          end
        end
        S_CHECK: begin
          if (r1 == '0) begin
            gcd   <= r0;
            inv   <= (t0 < 0) ? W'(t0 + $signed({2'b00, f_r})) : W'(t0);
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            n_sr  <= r0;
            rr    <= '0;
            acc   <= '0;
            cnt   <= '0;
            state <= S_DIV;
          end
        end
        S_DIV: begin
          n_sr <= n_sr << 1;
          rr   <= qb ? rr_sub[W-1:0] : rr_sh[W-1:0];
          acc  <= acc_nx;
          cnt  <= cnt + 1'b1;
          if (cnt == CW'(W - 1)) begin
            r0    <= r1;
            r1    <= qb ? rr_sub[W-1:0] : rr_sh[W-1:0];
            t0    <= t1;
            t1    <= t0 - acc_nx;
            state <= S_CHECK;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
