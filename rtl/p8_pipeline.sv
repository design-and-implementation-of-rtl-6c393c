// p8_pipeline: PAL 1 and PAL 3 of the P8, the control-bit pipeline register.
//
// In the P8 the register-clocking control bits pass through registered PALs
// clocked by the second clock phase, so that all datapath registers change
// together once the control store outputs have settled.  With the two phases
// merged into one clock edge, those bits become load enables that act on the
// same edge as the microword that carries them, so most of the load-enable
// outputs are plain copies of their microword bits:
//   PAL 1: AR (gated off during reset), DR(IN), DR(OUT), OR, A, R, Z loads
//   PAL 3: IR load, IR reset, and the MIP load, asserted when exactly one of
//          IR reset (C0) and IR load (C1) is set
// The bits that PAL 3 latches toward the outside world are real registers
// here too: the AR output enable (C4), the DR(OUT) output enable (C8), MEMW
// (C3) and IOW (C31) take effect one microword after the word that sets them,
// which is why every write sequence holds address and data for a further word.
// zero_branch is the control store address bit A3: Z gated by C27.
// Microword bits that neither PAL handles (ALU operation, internal output
// enables) are not read here.
module p8_pipeline
  import p8_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  p8_cw_t     cw,
  input  logic       cond_en,      // C27 of the current instruction
  input  logic       latched_zero, // Z register
  output p8_strobe_t stb,
  output logic       mip_load,
  output logic       zero_branch,
  output logic       addr_out,     // AR drives the external address bus
  output logic       data_out,     // DR(OUT) drives the external data bus
  output logic       memw,
  output logic       iow
);
  always_comb begin
    stb.ar_load  = cw.ar_load & ~rst;
    stb.dri_load = cw.drin_load;
    stb.dro_load = cw.drout_load;
    stb.or_load  = cw.or_load;
    stb.a_load   = cw.a_load;
    stb.r_load   = cw.r_load;
    stb.z_load   = cw.z_load;
    stb.ir_load  = cw.ir_load;
    stb.ir_reset = cw.ir_reset;
    mip_load     = cw.ir_reset ^ cw.ir_load;
    zero_branch  = latched_zero & cond_en;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      addr_out <= 1'b0;
      data_out <= 1'b0;
      memw     <= 1'b0;
      iow      <= 1'b0;
    end else begin
      addr_out <= ~cw.ar_out_n;
      data_out <= ~cw.drout_out_n;
      memw     <= cw.memw;
      iow      <= cw.iow;
    end
  end
endmodule
