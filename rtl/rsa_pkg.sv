// rsa_pkg: types and constants shared by the RSA coprocessor.
//
// mm_token_t is the control word that travels from the rightmost cell of the
// Montgomery systolic row to the leftmost one, one column per clock, together
// with the multiplier bit a_i and the quotient bit q_i.  Two multiplications
// are interleaved in the row; `slot` tells them apart (0 = the multiplication
// whose A operand is P, 1 = the squaring whose A operand is Z).
// cmd_e lists the operations the host can start through the control register.
package rsa_pkg;

  typedef struct packed {
    logic valid;  // a real iteration occupies this column
    logic slot;   // 0: P*Z (or P*1), 1: Z*Z
    logic a;      // multiplier bit a_i of this iteration
    logic q;      // quotient bit q_i, taken from p_{i,0} in column 0
    logic first;  // iteration 0: the incoming partial result P_0 is zero
    logic last;   // iteration m+2: the cell outputs are result bits
    logic wen;    // the result of this multiplication is written back
    logic updb;   // the result also replaces register B (squaring result)
  } mm_token_t;

  localparam mm_token_t MM_TOKEN_IDLE = '0;

  typedef enum logic [2:0] {
    CMD_NONE   = 3'd0,
    CMD_MODEXP = 3'd1,  // RES = X^E mod M
    CMD_MUL    = 3'd2,  // RES = OPA * OPB
    CMD_DIV    = 3'd3,  // RES = {OPA mod OPB, OPA div OPB}
    CMD_INV    = 3'd4   // RES = {gcd, OPB^-1 mod OPA}
  } cmd_e;

endpackage
