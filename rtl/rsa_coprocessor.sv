// rsa_coprocessor: RSA processing unit behind the host (PCI) bus.
//
// The host writes the key and message into operand registers through a
// simple word-wide register port, starts an operation through the control
// register and reads the result back.  The operations are:
//   CMD_MODEXP  RES = X^E mod M: the long divider first forms R^2 mod M
//               (R = 2^(MW+2)), then modexp_unit runs the square-and-multiply
//               loop on the one-row Montgomery array and subtracts M at the end
//   CMD_MUL     RES = OPA * OPB                      (long_mul)
//   CMD_DIV     RES = {OPA mod OPB, OPA div OPB}     (long_div)
//   CMD_INV     RES = {gcd(OPA, OPB), OPB^-1 mod OPA} (eea_unit)
// The modular exponentiation is the main function; the other operations are
// the pre- and post-processing arithmetic of key preparation.
//
// Register map (host_addr = {region[3:0], word[RA-1:0]}, 32-bit words, least
// significant word first, WORDS = ceil(MW/32), RA = clog2(2*WORDS)):
//   region 0 word 0  write: start command cmd_e (bits 2:0), ignored while busy
//                    read:  {25'b0, last command[2:0], gcd = 1 after INV, 1'b0,
//                            done, busy}
//   region 0 word 1  exponent length n in bits (at most EW)
//   region 1..5      M, E, X, OPA, OPB (read/write, WORDS words each)
//   region 6         RES, read only, 2*WORDS words
// Writes take effect at the clock edge; reads are combinational.  `done` is set
// when a command finishes and cleared when the next one starts.  The bus
// adapter that turns PCI cycles into this port is not part of this design.
// The partition into exponentiation, long-integer arithmetic and Euclid
// modules follows the document's block diagram; the register map and command
// set are this design's own.
module rsa_coprocessor
  import rsa_pkg::*;
#(
  parameter int MW    = 512,
  parameter int EW    = MW,
  parameter int WORDS = (MW + 31) / 32,
  parameter int RA    = $clog2(2 * WORDS),
  parameter int HAW   = 4 + RA
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           host_wr,
  input  logic [HAW-1:0] host_addr,
  input  logic [31:0]    host_wdata,
  output logic [31:0]    host_rdata,
  output logic           irq_done
);

  localparam int OW  = WORDS * 32;      // operand register width
  localparam int NBW = $clog2(EW + 1);
  localparam int DNW = 2 * MW + 5;      // divider dividend width

  typedef enum logic [2:0] {T_IDLE, T_R2, T_EXP, T_MUL, T_DIV, T_INV} top_state_e;

  top_state_e       state;
  cmd_e             cmd_r;
  logic [OW-1:0]    m_r, e_r, x_r, opa_r, opb_r;
  logic [2*OW-1:0]  res_r;
  logic [NBW-1:0]   nbits_r;
  logic             done_r;

  logic [3:0]       region;
  logic [RA-1:0]    word;
  logic             cmd_go;
  cmd_e             cmd_in;

  // unit handshakes
  logic             div_start, div_busy, div_done;
  logic [DNW-1:0]   div_dividend, div_quot;
  logic [MW-1:0]    div_divisor, div_rem;
  logic             exp_start, exp_busy, exp_done;
  logic [MW-1:0]    exp_result;
  logic             mul_start, mul_busy, mul_done;
  logic [2*MW-1:0]  mul_prod;
  logic             inv_start, inv_busy, inv_done;
  logic [MW-1:0]    inv_inv, inv_gcd;
  logic             gcd_one;

  assign region = host_addr[HAW-1:RA];
  assign word   = host_addr[RA-1:0];
  assign cmd_in = cmd_e'(host_wdata[2:0]);
  assign cmd_go = host_wr && region == 4'd0 && word == '0 && state == T_IDLE
                  && cmd_in != CMD_NONE && host_wdata[2:0] <= 3'd4;

  // ---------------- host writes ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_r <= '0; e_r <= '0; x_r <= '0; opa_r <= '0; opb_r <= '0; nbits_r <= '0;
    end else if (host_wr && int'(word) < WORDS) begin
      unique case (region)
        4'd0: if (word == RA'(1)) nbits_r <= NBW'(host_wdata);
        4'd1: m_r[word*32 +: 32]   <= host_wdata;
        4'd2: e_r[word*32 +: 32]   <= host_wdata;
        4'd3: x_r[word*32 +: 32]   <= host_wdata;
        4'd4: opa_r[word*32 +: 32] <= host_wdata;
        4'd5: opb_r[word*32 +: 32] <= host_wdata;
        default: ;
      endcase
    end
  end

  // ---------------- host reads ----------------
  always_comb begin
    host_rdata = '0;
    unique case (region)
      4'd0: begin
        if (word == '0)       host_rdata = {25'd0, cmd_r, gcd_one, 1'b0, done_r, state != T_IDLE};
        else if (word == 1)   host_rdata = 32'(nbits_r);
      end
      4'd1: host_rdata = (int'(word) < WORDS) ? m_r[word*32 +: 32]   : '0;
      4'd2: host_rdata = (int'(word) < WORDS) ? e_r[word*32 +: 32]   : '0;
      4'd3: host_rdata = (int'(word) < WORDS) ? x_r[word*32 +: 32]   : '0;
      4'd4: host_rdata = (int'(word) < WORDS) ? opa_r[word*32 +: 32] : '0;
      4'd5: host_rdata = (int'(word) < WORDS) ? opb_r[word*32 +: 32] : '0;
      4'd6: host_rdata = res_r[word*32 +: 32];
      default: host_rdata = '0;
    endcase
  end

  // ---------------- command sequencer ----------------
  assign div_start = (state == T_IDLE && cmd_go && (cmd_in == CMD_MODEXP || cmd_in == CMD_DIV));
  assign mul_start = (state == T_IDLE && cmd_go && cmd_in == CMD_MUL);
  assign inv_start = (state == T_IDLE && cmd_go && cmd_in == CMD_INV);
  assign exp_start = (state == T_R2 && div_done);

  always_comb begin
    if (cmd_in == CMD_MODEXP) div_dividend = DNW'(1) << (2 * MW + 4);  // R^2
    else                      div_dividend = DNW'(opa_r[MW-1:0]);
    div_divisor = (cmd_in == CMD_MODEXP) ? m_r[MW-1:0] : opb_r[MW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= T_IDLE;
      cmd_r   <= CMD_NONE;
      res_r   <= '0;
      done_r  <= 1'b0;
      gcd_one <= 1'b0;
    end else begin
      unique case (state)
        T_IDLE: begin
          if (cmd_go) begin
            cmd_r   <= cmd_in;
            done_r  <= 1'b0;
            gcd_one <= 1'b0;
            unique case (cmd_in)
              CMD_MODEXP: state <= T_R2;
              CMD_MUL:    state <= T_MUL;
              CMD_DIV:    state <= T_DIV;
              CMD_INV:    state <= T_INV;
              default:    state <= T_IDLE;
            endcase
          end
        end
        T_R2:  if (div_done) state <= T_EXP;
        T_EXP: begin
          if (exp_done) begin
            res_r  <= (2*OW)'(exp_result);
            done_r <= 1'b1;
            state  <= T_IDLE;
          end
        end
        T_MUL: begin
          if (mul_done) begin
            res_r  <= (2*OW)'(mul_prod);
            done_r <= 1'b1;
            state  <= T_IDLE;
          end
        end
        T_DIV: begin
          if (div_done) begin
            res_r  <= '0;
            res_r[MW-1:0]       <= div_quot[MW-1:0];
            res_r[OW +: MW]     <= div_rem;
            done_r <= 1'b1;
            state  <= T_IDLE;
          end
        end
        T_INV: begin
          if (inv_done) begin
            res_r  <= '0;
            res_r[MW-1:0]   <= inv_inv;
            res_r[OW +: MW] <= inv_gcd;
            gcd_one <= (inv_gcd == MW'(1));
            done_r <= 1'b1;
            state  <= T_IDLE;
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  assign irq_done = done_r;

  // ---------------- processing units ----------------
  long_div #(.NW(DNW), .DW(MW)) u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start), .dividend(div_dividend),
    .divisor(div_divisor), .busy(div_busy), .done(div_done), .quot(div_quot), .rem(div_rem));

  modexp_unit #(.MW(MW), .EW(EW)) u_exp (
    .clk(clk), .rst_n(rst_n), .start(exp_start), .m_val(m_r[MW-1:0]), .e_val(e_r[EW-1:0]),
    .n_bits(nbits_r), .x_val(x_r[MW-1:0]), .r2_val(div_rem), .busy(exp_busy),
    .done(exp_done), .result(exp_result));

  long_mul #(.W(MW)) u_mul (
    .clk(clk), .rst_n(rst_n), .start(mul_start), .a(opa_r[MW-1:0]), .b(opb_r[MW-1:0]),
    .busy(mul_busy), .done(mul_done), .prod(mul_prod));

  eea_unit #(.W(MW)) u_inv (
    .clk(clk), .rst_n(rst_n), .start(inv_start), .f(opa_r[MW-1:0]), .e(opb_r[MW-1:0]),
    .busy(inv_busy), .done(inv_done), .inv(inv_inv), .gcd(inv_gcd));

  // a command only starts while every unit is idle
  a_units_idle_at_start : assert property (@(posedge clk) disable iff (!rst_n)
                                           cmd_go |-> !(div_busy || exp_busy || mul_busy || inv_busy))
    else $error("rsa_coprocessor: command started while a unit is busy");

endmodule
