// lut_n -- an n-input look-up table with a one-bit output.
//
// A LUT is a small memory of 2**N one-bit cells addressed by its N inputs;
// the contents (INIT) select which Boolean function of the inputs it
// computes, so any function of up to N variables costs one LUT and one LUT
// delay. The controller uses it as the unit of logic depth: every transition
// function of the state machine is one instance of this module.
//
// Interface: in[N-1:0] is the address, out = INIT[in]. Purely
// combinational, no clock. N defaults to 4, the LUT size of the 4-LUT
// devices the controller targets; the INIT convention (bit i of INIT is the
// output for in == i) is this design's own.

module lut_n #(
  parameter int unsigned       N    = 4,
  parameter logic [2**N-1:0]   INIT = '0
) (
  input  logic [N-1:0] in,
  output logic         out
);

  always_comb out = INIT[in];

endmodule
