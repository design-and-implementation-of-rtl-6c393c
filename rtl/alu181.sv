// alu181: one 74181 4-bit arithmetic logic unit slice (active-high data).
//
// Two of these form the P8's 8-bit ALU.  The slice offers the sixteen logic
// functions (M = 1) and sixteen arithmetic functions (M = 0) of the 74181,
// selected by S[3:0].  Carry in (cn_n) and carry out (cn4_n) are active low,
// as on the part: cn_n = 0 adds one to the arithmetic result.  aeqb is high
// when all four F outputs are high; on the part it is an open-collector output
// that is wired-AND across slices, and in the subtract-minus-one function it
// signals A = B.
//
// How it works: per bit, x = A | (B & S0) | (~B & S1) and y = (A & B & S3) |
// (A & ~B & S2).  The arithmetic result is x + y + carry, the logic result is
// ~(x ^ y); this reproduces the part's function table.  The group propagate
// and generate outputs of the part are not modelled: the P8 ripples the carry
// from one slice to the next and does not use them.
//
// Purely combinational.
module alu181 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic [3:0] s,
  input  logic       m,      // 1: logic, 0: arithmetic
  input  logic       cn_n,   // carry in, active low
  output logic [3:0] f,
  output logic       cn4_n,  // carry out, active low
  output logic       aeqb    // all F outputs high
);
  logic [3:0] x, y;
  logic [4:0] sum;

  always_comb begin
    x   = a | (b & {4{s[0]}}) | (~b & {4{s[1]}});
    y   = (a & b & {4{s[3]}}) | (a & ~b & {4{s[2]}});
    sum = {1'b0, x} + {1'b0, y} + {4'b0, ~cn_n};
    f   = m ? ~(x ^ y) : sum[3:0];
    cn4_n = ~sum[4];
    aeqb  = &f;
  end
endmodule
