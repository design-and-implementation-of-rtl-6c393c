// p8_reset_sync: reset synchroniser.
//
// A single D flip-flop registers the external, active-low reset so that the
// reset seen by the CPU is released on a clock edge and the first edge after
// release executes the first FETCH microword.  The P8 uses one flip-flop for
// this; with the two clock phases merged into one here, one flip-flop again
// suffices.  rst is active high and follows rst_n_i one clock later.
module p8_reset_sync (
  input  logic clk,
  input  logic rst_n_i,
  output logic rst
);
  always_ff @(posedge clk) rst <= ~rst_n_i;
endmodule
