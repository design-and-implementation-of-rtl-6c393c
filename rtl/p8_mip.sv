// p8_mip: the microinstruction pointer (control store sequencer).
//
// In the P8 this is a 74LS163 counter whose three low bits address the
// microword within an instruction's block of the control store.  The count
// enables are tied high, so it advances on every clock.  A synchronous reset
// (system reset) or a synchronous load, asserted on the last microword of an
// instruction and on the last word of FETCH, returns it to zero.  The load
// value is always zero.  Reset wins over load, load over count.
module p8_mip #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,    // load zero on the next edge
  output logic [W-1:0] mip
);
  always_ff @(posedge clk) begin
    if (rst || load) mip <= '0;
    else             mip <= mip + 1'b1;
  end
endmodule
