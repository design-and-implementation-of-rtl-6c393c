// p8_control: the microprogrammed control unit of the P8.
//
// The control store is addressed by {IR, A3, MIP}.  A3 is the Z flag gated by
// C27, which only conditional jumps set; they have microcode in both
// sub-blocks, so Z selects between the "jump" and "skip" sequences.  The MIP
// counts through the words of an instruction and is loaded with zero when a
// word carries IR load (end of FETCH, IR now holds the opcode) or IR reset
// (end of an instruction, IR is cleared to 00h, the opcode of FETCH).
//
// Timing: one microword per clock.  The word on cw is the one executed at the
// next rising edge.  memr and ior come straight from the control store;
// addr_out, data_out, memw and iow are latched and follow one word later.
// Only C27 of the word on the second control-store port is used; the rest of
// that word is left unread on purpose.
module p8_control
  import p8_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] ir,
  input  logic       z,
  output p8_cw_t     cw,
  output p8_strobe_t stb,
  output logic       addr_out,
  output logic       data_out,
  output logic       memw,
  output logic       iow,
  output logic [2:0] mip,
  output logic       a3
);
  logic [31:0] word, word_b;
  p8_cw_t      cw_b;
  logic        mip_load;

  p8_control_store u_cs (
    .addr  ({ir, a3, mip}),
    .data  (word),
    .addr_b({ir, 1'b0, mip}),
    .data_b(word_b)
  );

  assign cw   = p8_cw_t'(word);
  assign cw_b = p8_cw_t'(word_b);

  p8_pipeline u_pipe (
    .clk         (clk),
    .rst         (rst),
    .cw          (cw),
    .cond_en     (cw_b.cond_en),
    .latched_zero(z),
    .stb         (stb),
    .mip_load    (mip_load),
    .zero_branch (a3),
    .addr_out    (addr_out),
    .data_out    (data_out),
    .memw        (memw),
    .iow         (iow)
  );

  p8_mip #(.W(3)) u_mip (
    .clk (clk),
    .rst (rst),
    .load(mip_load),
    .mip (mip)
  );
endmodule
