// p8_cpu: the P8 educational CPU, top level.
//
// An 8-bit accumulator CPU with an 8-bit address bus (256 bytes of memory and,
// separately, 256 I/O ports), two data registers (A and R), a one-bit zero
// flag and a microprogrammed control unit.  Sixteen instruction types in five
// addressing modes (direct, register A, register R, register indirect through
// R, immediate).  Every instruction starts with the three-word FETCH and ends
// by clearing IR to 00h, which re-enters FETCH.
//
// External bus (one microword per clock):
//   addr_o/addr_oe  address from AR; addr_oe is the latched AR output enable
//   memr, ior       read strobes, asserted in the word that loads AR and in the
//                   next one; the CPU samples data_i at the end of the second
//   data_o/data_oe  write data from DR(OUT), latched output enable
//   memw, iow       write strobes, latched: high for one clock, during which
//                   address and data are stable; the device writes at the
//                   rising edge that ends that clock
//   r_monitor       R register, for observation
// The two clock phases of the original (CLK1 for the MIP, CLK2 for the
// datapath) are merged into one edge; rst_n is synchronised by one flip-flop.
// The observation outputs of the submodules (A, R, IP, MIP, A3) are left
// unconnected here; R alone is brought out, as on the original board.
module p8_cpu
  import p8_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  output logic [7:0] addr_o,
  output logic       addr_oe,
  input  logic [7:0] data_i,
  output logic [7:0] data_o,
  output logic       data_oe,
  output logic       memr,
  output logic       memw,
  output logic       ior,
  output logic       iow,
  output logic [7:0] r_monitor
);
  logic       rst;
  p8_cw_t     cw;
  p8_strobe_t stb;
  logic [7:0] ir;
  logic       z;

  p8_reset_sync u_rst (.clk(clk), .rst_n_i(rst_n), .rst(rst));

  p8_control u_ctl (
    .clk(clk), .rst(rst), .ir(ir), .z(z),
    .cw(cw), .stb(stb),
    .addr_out(addr_oe), .data_out(data_oe), .memw(memw), .iow(iow),
    .mip(), .a3()
  );

  p8_datapath u_dp (
    .clk(clk), .rst(rst), .cw(cw), .stb(stb),
    .data_i(data_i), .addr_o(addr_o), .data_o(data_o),
    .ir(ir), .z(z), .a(), .r(), .ip(), .r_monitor(r_monitor)
  );

  assign memr = cw.memr;
  assign ior  = cw.ior;
endmodule
