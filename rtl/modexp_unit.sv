// modexp_unit: modular exponentiation X^E mod M on the one-row Montgomery
// systolic array (square-and-multiply, exponent scanned from its least
// significant bit, all products in the Montgomery domain with R = 2^(MW+2)).
//
// Sequence after `start` (inputs must hold until `done`):
//   load   P RAM <- 1, Z RAM <- X (MW+3 clocks), register B <- R^2 mod M
//   step 1 P0 = MonMult(1, R^2), Z0 = MonMult(X, R^2), run side by side
//   step 2 for i = 0 .. n_bits-1: Ptmp = MonMult(Pi, Zi), Zi+1 = MonMult(Zi, Zi)
//          run side by side; Zi+1 goes to Z RAM and register B, Ptmp is
//          written to P RAM only when e_i = 1
//   step 4 after the row drains, B <- 1 and P = MonMult(Pn, 1)
//   final  res = P - M if P >= M (long_sub), then done
// Each pair of multiplications issues 2(MW+3) tokens, one per clock,
// alternating P slot and Z slot, and the next pair follows without a gap: its
// first multiplier bit is read in the same clock as the previous result's bit 0
// is written, so the RAM read takes the bit being written (write-through
// bypass).  The multiplier bits a_{MW+1} and a_{MW+2} are forced to zero.
// A whole exponentiation takes about 2(MW+3)(n_bits+2) + 3(MW+3) clocks.
//
// The algorithm, the operand RAMs, register B, the pairing of the two
// multiplications and the final subtraction follow the document; the state
// machine, the bypass, and the port list are this design's choices.
module modexp_unit
  import rsa_pkg::*;
#(
  parameter int MW  = 512,
  parameter int EW  = 512,
  parameter int NBW = $clog2(EW + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [MW-1:0]  m_val,
  input  logic [EW-1:0]  e_val,
  input  logic [NBW-1:0] n_bits,
  input  logic [MW-1:0]  x_val,
  input  logic [MW-1:0]  r2_val,
  output logic           busy,
  output logic           done,
  output logic [MW-1:0]  result
);

  localparam int NIT = MW + 3;              // iterations per multiplication
  localparam int AW  = $clog2(NIT);
  localparam int XIW = (MW > 1) ? $clog2(MW) : 1;  // bit index into X
  localparam int EIW = (EW > 1) ? $clog2(EW) : 1;  // bit index into E

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_PAIRS, S_DRAIN, S_LAST, S_DRAIN2, S_SUB
  } state_e;

  state_e         state;
  logic [AW-1:0]  cnt;      // load address / iteration index
  logic           ph;       // slot of the token issued this clock
  logic [NBW-1:0] pair;     // 0: step 1, k: exponent bit k-1
  logic [AW-1:0]  wcnt_p, wcnt_z;
  logic [NIT-1:0] res_sr;

  // RAM ports
  logic          p_we, z_we, p_wd, z_wd, p_rd, z_rd;
  logic [AW-1:0] p_wa, z_wa;
  logic          a_p, a_z;

  // row ports
  mm_token_t     tok;
  logic          b_load;
  logic [MW:0]   b_val;
  logic [1:0]    res_valid, res_bit;
  logic          row_busy;

  // subtractor ports
  logic          sub_start, sub_done, sub_busy, sub_borrow;
  logic [MW:0]   sub_res, sub_diff;

  bit_ram #(.DEPTH(NIT), .AW(AW)) u_pram (
    .clk(clk), .we(p_we), .waddr(p_wa), .wdata(p_wd), .raddr(cnt), .rdata(p_rd));
  bit_ram #(.DEPTH(NIT), .AW(AW)) u_zram (
    .clk(clk), .we(z_we), .waddr(z_wa), .wdata(z_wd), .raddr(cnt), .rdata(z_rd));

  systolic_row #(.MW(MW)) u_row (
    .clk(clk), .rst_n(rst_n), .in_tok(tok), .m_val(m_val), .b_load(b_load),
    .b_val(b_val), .res_valid(res_valid), .res_bit(res_bit), .busy(row_busy));

  long_sub #(.W(MW + 1)) u_sub (
    .clk(clk), .rst_n(rst_n), .start(sub_start), .a(res_sr[MW:0]), .b({1'b0, m_val}),
    .busy(sub_busy), .done(sub_done), .diff(sub_diff), .borrow(sub_borrow), .res(sub_res));

  // RAM write side: initial load, or result bits streaming out of the row
  always_comb begin
    if (state == S_LOAD) begin
      p_we = 1'b1; p_wa = cnt; p_wd = (cnt == '0);
      z_we = 1'b1; z_wa = cnt; z_wd = (int'(cnt) < MW) ? x_val[XIW'(cnt)] : 1'b0;
    end else begin
      p_we = res_valid[0]; p_wa = wcnt_p; p_wd = res_bit[0];
      z_we = res_valid[1]; z_wa = wcnt_z; z_wd = res_bit[1];
    end
  end

  // multiplier bits with write-through bypass; a_{MW+1} = a_{MW+2} = 0
  always_comb begin
    a_p = (p_we && p_wa == cnt) ? p_wd : p_rd;
    a_z = (z_we && z_wa == cnt) ? z_wd : z_rd;
    if (int'(cnt) > MW) begin
      a_p = 1'b0;
      a_z = 1'b0;
    end
  end

  // token issued into the row
  always_comb begin
    tok    = MM_TOKEN_IDLE;
    b_load = 1'b0;
    b_val  = '0;
    if (state == S_LOAD && cnt == '0) begin
      b_load = 1'b1;
      b_val  = {1'b0, r2_val};
    end
    if (state == S_DRAIN && !row_busy) begin
      b_load = 1'b1;
      b_val  = {{MW{1'b0}}, 1'b1};
    end
    if (state == S_PAIRS || (state == S_LAST && !ph)) begin
      tok.valid = 1'b1;
      tok.slot  = ph;
      tok.a     = ph ? a_z : a_p;
      tok.first = (cnt == '0);
      tok.last  = (cnt == AW'(NIT - 1));
      tok.wen   = ph || state == S_LAST || pair == '0 || e_val[EIW'(pair - 1'b1)];
      tok.updb  = ph;
    end
  end

  assign sub_start = (state == S_DRAIN2) && !row_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cnt    <= '0;
      ph     <= 1'b0;
      pair   <= '0;
      wcnt_p <= '0;
      wcnt_z <= '0;
      res_sr <= '0;
      result <= '0;
      done   <= 1'b0;
    end else begin
      done   <= 1'b0;
      wcnt_p <= res_valid[0] ? wcnt_p + 1'b1 : '0;
      wcnt_z <= res_valid[1] ? wcnt_z + 1'b1 : '0;
      if (res_valid[0] && state != S_PAIRS)
        res_sr <= {res_bit[0], res_sr[NIT-1:1]};
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state <= S_LOAD;
            cnt   <= '0;
          end
        end
        S_LOAD: begin
          if (cnt == AW'(NIT - 1)) begin
            state <= S_PAIRS;
            cnt   <= '0;
            ph    <= 1'b0;
            pair  <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_PAIRS, S_LAST: begin
          ph <= ~ph;
          if (ph) begin
            if (cnt == AW'(NIT - 1)) begin
              cnt <= '0;
              if (state == S_LAST)      state <= S_DRAIN2;
              else if (pair == n_bits)  state <= S_DRAIN;
              else                      pair  <= pair + 1'b1;
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        end
        S_DRAIN: begin
          if (!row_busy) begin
            state <= S_LAST;
            cnt   <= '0;
            ph    <= 1'b0;
          end
        end
        S_DRAIN2: begin
          if (!row_busy) state <= S_SUB;
        end
        S_SUB: begin
          if (sub_done) begin
            result <= sub_res[MW-1:0];
            done   <= 1'b1;
            state  <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // the row is empty while the operand RAMs are loaded
  a_no_result_during_load : assert property (@(posedge clk) disable iff (!rst_n)
                                           !(res_valid[0] && state == S_LOAD))
    else $error("modexp_unit: result bits during operand load");

endmodule
