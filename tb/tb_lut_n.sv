// tb_lut_n -- exhaustive check of the n-input LUT.
//
// Three instances with different contents (a 4-input parity, a 4-input AND,
// and a 3-input LUT with an irregular pattern) are driven through every
// address; the expected value is computed from the Boolean function, not
// from INIT.

module tb_lut_n;

  int checks = 0, failures = 0;

  logic [3:0] a4;
  logic [2:0] a3;
  logic       o_par, o_and, o_3;

  // parity of 4 inputs: bit i set when i has an odd number of ones
  lut_n #(.N(4), .INIT(16'h6996)) u_par (.in(a4), .out(o_par));
  lut_n #(.N(4), .INIT(16'h8000)) u_and (.in(a4), .out(o_and));
  // 3 inputs: f = a[2] ? a[0] : ~a[1]
  lut_n #(.N(3), .INIT(8'hA3))    u_3   (.in(a3), .out(o_3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      a4 = 4'(i);
      a3 = 3'(i);
      #1;
      checks++;
      if (o_par !== ^a4) begin failures++; $display("parity addr %0d: %b", i, o_par); end
      checks++;
      if (o_and !== &a4) begin failures++; $display("and addr %0d: %b", i, o_and); end
      if (i < 8) begin
        checks++;
        if (o_3 !== (a3[2] ? a3[0] : ~a3[1])) begin
          failures++; $display("lut3 addr %0d: %b", i, o_3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
