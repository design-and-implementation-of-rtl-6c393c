// p8_ip_counter: the P8 instruction pointer.
//
// An 8-bit synchronous binary counter built, in the P8, from two cascaded
// 74LS163 counters.  On a rising clock edge: clear wins, then a parallel load
// from the internal bus, then a count by one when inc is high.  The load
// input is active low, as on the 74LS163 and in the microword.  The tri-state
// output buffer of the original is represented by the select on the bus that
// feeds the address register, outside this module.
module p8_ip_counter #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         clear,    // synchronous clear (system reset)
  input  logic         load_n,   // synchronous parallel load, active low
  input  logic         inc,      // count enable
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (clear)        q <= '0;
    else if (!load_n) q <= d;
    else if (inc)     q <= q + 1'b1;
  end
endmodule
