// p8_alu_encoder: PAL 2 of the P8, the ALU function encoder.
//
// The microword carries one bit per ALU operation (C15 pass B, C16 add,
// C17 subtract, C18 decrement, C19 OR, C20 invert, C21 shift left, C28
// compare).  This encoder turns them into the 74181 mode, select and carry-in
// inputs, with the same sum-of-products as the P8's PAL 2:
//   mode = pass | or | inv            -> logic functions
//   S    = 1010 pass (F = B), 1001 add, 0110 subtract/compare, 1111 decrement,
//          1110 or, 0101 invert, 1100 shift (A plus A), 0000 idle (F = A)
//   cn_n = ~sub (carry in only for subtract; compare is A minus B minus 1 so
//          that F is all ones, and A=B high, when A equals B)
// It also forms the clear of the instruction register from the latched
// IR-reset bit and the system reset.  On the part both are active low; here
// they are active high (ir_clear = ir_reset | sys_reset).  Combinational.
module p8_alu_encoder (
  input  logic       pass,    // C15
  input  logic       add,     // C16
  input  logic       sub,     // C17
  input  logic       dec,     // C18
  input  logic       lor,     // C19
  input  logic       inv,     // C20
  input  logic       shl,     // C21
  input  logic       cmp,     // C28
  input  logic       ir_reset,
  input  logic       sys_reset,
  output logic       m,
  output logic [3:0] s,
  output logic       cn_n,
  output logic       ir_clear
);
  always_comb begin
    m    = pass | lor | inv;
    s[0] = add | dec | inv;
    s[1] = pass | sub | dec | lor | cmp;
    s[2] = sub | dec | lor | inv | shl | cmp;
    s[3] = pass | add | dec | lor | shl;
    cn_n = ~sub;
    ir_clear = ir_reset | sys_reset;
  end
endmodule
