// p8_datapath: registers, buses and ALU of the P8.
//
// Registers (all 8 bits, loaded on the rising clock edge when enabled):
//   A   accumulator; loads the ALU output; always drives ALU operand A and,
//       through a buffer, can drive the internal bus IB
//   R   data / address register; loads from IB, drives IB through a buffer,
//       and is always visible on r_monitor
//   DR  data register, split into DR(IN), loaded from the external data bus
//       and driving IB, and DR(OUT), loaded from IB and driving the external
//       data bus
//   OR  operand register; loads an operand address from IB
//   AR  address register; loads from the address bus shared by IP and OR and
//       drives the external address bus
//   IP  instruction pointer (p8_ip_counter); loads from IB, counts by one
//   IR  instruction register; loads the opcode from IB, cleared to 00h (FETCH)
//       at the end of every instruction
//   Z   one-bit zero flag; loads the ALU A=B output on a compare
//
// IB has three sources (DR(IN), A, R) and feeds ALU operand B, OR, IR, R, IP
// and DR(OUT).  The tri-state buffers of the original become multiplexers
// selected by the active-low output-enable bits of the microword; an IB or
// address bus with no source enabled reads 00h.  Assertions check that at most
// one source drives each bus and that a register loading from a bus has one.
// The register that feeds AR is reached through a separate address bus, since
// IP and OR both drive AR and IP is loaded from IB; this layout is this design's
// reading of the block diagram.  All registers reset to zero.
// Control bits that act outside the datapath (strobes, latched enables) are
// not read here, and the ALU carry out is left unused: the P8 has no carry flag.
module p8_datapath
  import p8_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  p8_cw_t     cw,
  input  p8_strobe_t stb,
  input  logic [7:0] data_i,      // external data bus into DR(IN)
  output logic [7:0] addr_o,      // AR
  output logic [7:0] data_o,      // DR(OUT)
  output logic [7:0] ir,
  output logic       z,
  output logic [7:0] a,
  output logic [7:0] r,
  output logic [7:0] ip,
  output logic [7:0] r_monitor
);
  logic [7:0] ib, abus, dr_in, dr_out, opr, ar;
  logic [7:0] alu_f;
  logic       alu_m, alu_cn_n, alu_cn8_n, alu_aeqb, ir_clear;
  logic [3:0] alu_s;

  // internal bus and address bus
  always_comb begin
    ib = 8'h00;
    if (!cw.drin_out_n)  ib = dr_in;
    else if (!cw.a_out_n) ib = a;
    else if (!cw.r_out_n) ib = r;
    abus = 8'h00;
    if (!cw.ip_out_n)      abus = ip;
    else if (!cw.or_out_n) abus = opr;
  end

  // ALU and its encoder (PAL 2)
  p8_alu_encoder u_enc (
    .pass(cw.pass), .add(cw.add), .sub(cw.sub), .dec(cw.dec), .lor(cw.lor),
    .inv(cw.inv), .shl(cw.shl), .cmp(cw.cmp),
    .ir_reset(stb.ir_reset), .sys_reset(rst),
    .m(alu_m), .s(alu_s), .cn_n(alu_cn_n), .ir_clear(ir_clear)
  );

  p8_alu u_alu (
    .a(a), .b(ib), .s(alu_s), .m(alu_m), .cn_n(alu_cn_n),
    .f(alu_f), .cn8_n(alu_cn8_n), .aeqb(alu_aeqb)
  );

  p8_ip_counter #(.W(8)) u_ip (
    .clk(clk), .clear(rst), .load_n(cw.ip_load_n), .inc(cw.ip_inc),
    .d(ib), .q(ip)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      a <= '0; r <= '0; dr_in <= '0; dr_out <= '0; opr <= '0; ar <= '0; z <= 1'b0;
    end else begin
      if (stb.a_load)   a      <= alu_f;
      if (stb.r_load)   r      <= ib;
      if (stb.dri_load) dr_in  <= data_i;
      if (stb.dro_load) dr_out <= ib;
      if (stb.or_load)  opr    <= ib;
      if (stb.ar_load)  ar     <= abus;
      if (stb.z_load)   z      <= alu_aeqb;
    end
  end

  // instruction register: synchronous clear has priority over load
  always_ff @(posedge clk) begin
    if (ir_clear)         ir <= 8'h00;
    else if (stb.ir_load) ir <= ib;
  end

  assign addr_o    = ar;
  assign data_o    = dr_out;
  assign r_monitor = r;

  // bus rules
  logic ib_used, ab_used;
  assign ib_used = stb.r_load | stb.dro_load | stb.or_load | stb.ir_load | ~cw.ip_load_n |
                   (stb.a_load & (cw.pass | cw.add | cw.sub | cw.lor | cw.inv)) | stb.z_load;
  assign ab_used = stb.ar_load;

  a_ib_one_driver: assert property (@(posedge clk) disable iff (rst)
    $onehot0({~cw.drin_out_n, ~cw.a_out_n, ~cw.r_out_n}))
    else $error("internal bus driven by more than one source");
  a_ab_one_driver: assert property (@(posedge clk) disable iff (rst)
    $onehot0({~cw.ip_out_n, ~cw.or_out_n}))
    else $error("address bus driven by more than one source");
  a_ib_driven: assert property (@(posedge clk) disable iff (rst)
    ib_used |-> (~cw.drin_out_n | ~cw.a_out_n | ~cw.r_out_n))
    else $error("register loads from an undriven internal bus");
  a_ab_driven: assert property (@(posedge clk) disable iff (rst)
    ab_used |-> (~cw.ip_out_n | ~cw.or_out_n))
    else $error("AR loads from an undriven address bus");
endmodule
