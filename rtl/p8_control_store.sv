// p8_control_store: the microprogram ROM of the P8 (4096 x 32).
//
// In the P8 the control store is four 8-bit PROMs side by side, giving a
// 32-bit microword, addressed by 12 bits: the opcode in IR (A11-A4), the
// conditional sub-block bit A3 and the microinstruction pointer (A2-A0).  Each
// opcode owns 16 words, split into two sub-blocks of eight selected by A3.
//
// The ROM contents are a constant computed at elaboration from the microprogram in
// p8_pkg (p8_microword), which lists, for each instruction and addressing mode,
// the microinstructions of the P8 instruction set in order.  Reads are
// asynchronous, as from a PROM.  A second read port, addr_b, lets the control
// unit look at the C27 (conditional) bit of the A3 = 0 sub-block without
// making the A3 address bit depend on its own output; both sub-blocks of a
// conditional instruction carry C27, so the two reads agree.
module p8_control_store
  import p8_pkg::*;
(
  input  logic [CS_AW-1:0] addr,
  output logic [31:0]      data,
  input  logic [CS_AW-1:0] addr_b,
  output logic [31:0]      data_b
);
  localparam p8_rom_t ROM = p8_rom_image();

  assign data   = ROM[addr];
  assign data_b = ROM[addr_b];
endmodule
