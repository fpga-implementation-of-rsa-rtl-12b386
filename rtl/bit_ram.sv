// bit_ram: one-bit-wide operand memory for the P and Z values of the
// exponentiation (one embedded RAM block in its 2048 x 1 shape).
//
// The Montgomery row consumes its multiplier A one bit per iteration, least
// significant bit first, and produces its result one bit per clock in the same
// order, so each operand lives in a memory one bit wide, addressed by bit
// index.  Write is synchronous (we, waddr, wdata sampled at the clock edge);
// read is asynchronous (rdata follows raddr in the same clock), so a bit
// written at an edge can be read in the next clock.  The contents are not
// reset; the exponentiation controller writes every bit it later reads.  The
// 2048 x 1 depth comes from the document's embedded RAM block; the port
// arrangement and the asynchronous read are this design's choices.
module bit_ram #(
  parameter int DEPTH = 2048,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic          wdata,
  input  logic [AW-1:0] raddr,
  output logic          rdata
);

  logic mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
