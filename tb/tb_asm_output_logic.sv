// tb_asm_output_logic -- checks the Moore output decoder for every state.
//
// Each of the eleven one-hot states is applied and the outputs compared with
// the output sets of the chart (reference model). a10 must repeat the
// outputs of a3 and a11 those of a6.

module tb_asm_output_logic;
  import asm_pkg::*;
  import asm_ref_pkg::*;

  int checks = 0, failures = 0;

  state_vec_t state;
  y_vec_t     y;

  asm_output_logic dut (.state(state), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned a = 1; a <= 11; a++) begin
      state = onehot(a);
      #1;
      checks++;
      if (y !== ref_y(a)) begin
        failures++;
        $display("a%0d: y=%b expected %b", a, y, ref_y(a));
      end
    end
    state = onehot(10); #1;
    begin
      y_vec_t y10;
      y10 = y;
      state = onehot(3); #1;
      checks++;
      if (y10 !== y) begin failures++; $display("Y(a10) != Y(a3)"); end
    end
    state = onehot(11); #1;
    begin
      y_vec_t y11;
      y11 = y;
      state = onehot(6); #1;
      checks++;
      if (y11 !== y) begin failures++; $display("Y(a11) != Y(a6)"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
