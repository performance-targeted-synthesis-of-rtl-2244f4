// tb_asm_transition_logic -- exhaustive check of the next-state logic.
//
// Every one-hot state a1..a11 is combined with all 256 values of x1..x8 and
// the next state compared with the chart-walking reference model. It also
// checks that, after the insertion of a10/a11, no transition depends on more
// than three inputs: for every (state, next state) pair the set of inputs
// whose change can alter whether that transition is taken is counted.

module tb_asm_transition_logic;
  import asm_pkg::*;
  import asm_ref_pkg::*;

  int checks = 0, failures = 0;

  state_vec_t state, next_state;
  x_vec_t     x;

  asm_transition_logic dut (.state(state), .x(x), .next_state(next_state));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // next-state function
    for (int unsigned a = 1; a <= 11; a++) begin
      for (int v = 0; v < 256; v++) begin
        state = onehot(a);
        x     = 8'(v);
        #1;
        checks++;
        if (next_state !== onehot(ref_next(a, x))) begin
          failures++;
          if (failures < 10)
            $display("a%0d x=%b: next=%b expected a%0d", a, x, next_state, ref_next(a, x));
        end
      end
    end
    // support of every transition in the reference model: at most 3 inputs
    for (int unsigned a = 1; a <= 11; a++) begin
      for (int unsigned s = 1; s <= 11; s++) begin
        logic [8:1] support;
        support = '0;
        for (int v = 0; v < 256; v++) begin
          for (int k = 1; k <= 8; k++) begin
            logic [8:1] xa, xb;
            xa = 8'(v);
            xb = xa ^ (8'(1) << (k - 1));
            if ((ref_next(a, xa) == s) != (ref_next(a, xb) == s)) support[k] = 1'b1;
          end
        end
        // the same support measured on the RTL
        begin
          logic [8:1] dut_support;
          dut_support = '0;
          for (int v = 0; v < 256; v++) begin
            for (int k = 1; k <= 8; k++) begin
              logic fa;
              state = onehot(a);
              x = 8'(v); #1; fa = next_state[s-1];
              x = 8'(v) ^ (8'(1) << (k - 1)); #1;
              if (fa != next_state[s-1]) dut_support[k] = 1'b1;
            end
          end
          checks++;
          if (dut_support !== support || $countones(dut_support) > LUT_N - 1) begin
            failures++;
            $display("a%0d->a%0d: inputs %b (reference %b)", a, s, dut_support, support);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
