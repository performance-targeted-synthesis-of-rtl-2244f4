// asm_output_logic -- Moore output functions of the high-speed ASM controller.
//
// Output y_k is asserted in every state whose output set Y(a) contains y_k
// (asm_pkg::y_of, gathered per output by asm_pkg::states_asserting). With
// one-hot coding y_k is the OR of the state bits of those states; in this
// chart no output is shared by more than three states, so each output is a
// single 4-input LUT. The additional states a10 and a11
// repeat the outputs of a3 and a6, which keeps the outputs seen outside the
// controller the same as in the unmodified chart, only held one clock longer.
//
// Interface: state is the present one-hot state, y the outputs y1..y8.
// Purely combinational. The output sets follow the reference chart; the
// table-driven decoding is this design's own.

module asm_output_logic
  import asm_pkg::*;
(
  input  state_vec_t state,
  output y_vec_t     y
);

  for (genvar k = 1; k <= NUM_Y; k++) begin : g_y
    localparam state_vec_t ASSERTED_IN = states_asserting(k);
    assign y[k] = |(state & ASSERTED_IN);
  end

endmodule
