// asm_controller -- high-speed Moore ASM controller with additional states.
//
// The controller executes the reference ASM chart (inputs x1..x8, outputs
// y1..y8, states a1..a9) in the form produced by the performance-targeted
// synthesis method for 4-input LUTs: two additional states, a10 and a11, sit
// at the input of decision vertex x4. A path that left a3 (through x6, x7)
// or a6 (through x2, x3) and would have continued through x4 and x5/x8 now
// stops one clock in a10 (outputs of a3) or a11 (outputs of a6). Every
// transition therefore depends on at most three inputs and is one LUT deep.
// The price is one extra clock on those paths; the gain is a shorter
// critical path and a higher clock frequency.
//
// Structure: a one-hot state register (this file), asm_transition_logic
// (one LUT per transition) and asm_output_logic (Moore outputs).
//
// Interface and timing: x is sampled on the rising edge of clk; y depends
// only on the state register (Moore), so it changes right after a clock
// edge. a1 is both the start and the stop state: the machine leaves it on
// the next clock (to a2 if x1 = 0, to a6 if x1 = 1), so a controlled
// operation runs from a1 back to a1. rst_n is asynchronous and active low
// and puts the machine in a1; the reset style is this design's own choice.
// state exposes the one-hot state for observation.

module asm_controller
  import asm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  x_vec_t     x,
  output y_vec_t     y,
  output state_vec_t state
);

  state_vec_t next_state;

  asm_transition_logic u_transition (
    .state      (state),
    .x          (x),
    .next_state (next_state)
  );

  asm_output_logic u_output (
    .state (state),
    .y     (y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= RESET_STATE;
    else        state <= next_state;
  end

  // Exactly one state is active, and every state has a successor for every
  // input combination.
  a_state_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot(state));
  a_next_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot(next_state));

endmodule
