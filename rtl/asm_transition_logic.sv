// asm_transition_logic -- next-state logic of the high-speed ASM controller.
//
// The machine is one-hot coded, so the transition from a_m to a_s is the
// AND of state bit a_m with the transition condition X(a_m, a_s). After the
// additional states a10/a11 are inserted, every condition depends on at most
// three inputs, so each transition is exactly one 4-input LUT: the LUT's top
// address bit reads the present-state bit, the lower three read the inputs
// named in the transition list (asm_pkg::TRANS). The LUT contents are the
// condition's truth table in the upper half and zeros in the lower half, so
// a LUT can only fire while its source state is active.
//
// Next-state bit a_s is the OR of the LUTs of all transitions that end in
// a_s. The transition list and the one-LUT-per-transition structure follow
// the reference method; collecting the LUT outputs with an OR per target
// state is this design's own choice (the method bounds the depth of each
// transition function, not of this merge).
//
// Interface: state is the present one-hot state, x the inputs x1..x8;
// next_state is the one-hot successor. Purely combinational.

module asm_transition_logic
  import asm_pkg::*;
(
  input  state_vec_t state,
  input  x_vec_t     x,
  output state_vec_t next_state
);

  // x_ext[0] is the constant read by unused LUT inputs.
  logic [NUM_X:0]         x_ext;
  logic [NUM_TRANS-1:0]   fire;

  assign x_ext = {x, 1'b0};

  for (genvar t = 0; t < NUM_TRANS; t++) begin : g_trans
    localparam trans_t TR = TRANS[t];
    lut_n #(
      .N    (LUT_N),
      .INIT ({TR.tt, 8'h00})
    ) u_lut (
      .in  ({state[TR.src], x_ext[TR.v2], x_ext[TR.v1], x_ext[TR.v0]}),
      .out (fire[t])
    );
  end

  for (genvar s = 0; s < NUM_STATES; s++) begin : g_next
    localparam logic [NUM_TRANS-1:0] INTO = transitions_into(state_e'(s));
    assign next_state[s] = |(fire & INTO);
  end

endmodule
