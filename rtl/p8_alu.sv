// p8_alu: the P8's 8-bit ALU, two 74181 slices in cascade.
//
// The carry out of the low slice feeds the carry in of the high slice, and the
// two A=B outputs are wired together (AND), so aeqb is high when all eight F
// bits are high.  Operand A is always the accumulator; operand B is the
// internal bus.  Mode, select and carry in come from the ALU encoder.  Only the
// zero (A=B) condition is used by the CPU; the final carry out is brought out
// for completeness.  Purely combinational.
module p8_alu (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic [3:0] s,
  input  logic       m,
  input  logic       cn_n,   // carry in of the low slice, active low
  output logic [7:0] f,
  output logic       cn8_n,  // carry out of the high slice, active low
  output logic       aeqb
);
  logic c4_n, eq_lo, eq_hi;

  alu181 u_lo (.a(a[3:0]), .b(b[3:0]), .s(s), .m(m), .cn_n(cn_n),
               .f(f[3:0]), .cn4_n(c4_n), .aeqb(eq_lo));
  alu181 u_hi (.a(a[7:4]), .b(b[7:4]), .s(s), .m(m), .cn_n(c4_n),
               .f(f[7:4]), .cn4_n(cn8_n), .aeqb(eq_hi));

  assign aeqb = eq_lo & eq_hi;
endmodule
