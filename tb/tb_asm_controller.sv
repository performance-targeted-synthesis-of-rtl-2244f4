// tb_asm_controller -- end-to-end test of the high-speed ASM controller.
//
// Part 1, directed: with fixed inputs the machine runs one operation from a1
// back to a1. Each path through the chart is checked for its state sequence
// and its length in clocks; paths that pass x4 coming from a3 or a6 take one
// clock more than in the unmodified chart because they stop in a10 or a11.
// Part 2, random: the inputs change randomly every clock (with occasional
// asynchronous resets) and the state and outputs are compared each clock
// with the chart-walking reference model. Every transition of the modified
// transition list, entry into each additional state, the a7 self-loop, the
// a6 -> a3 back edge and a mid-operation reset must each happen at least
// once. The top has no parameters, so this is also the full-size test.

module tb_asm_controller;
  import asm_pkg::*;
  import asm_ref_pkg::*;

  int checks = 0, failures = 0;

  logic       clk = 1'b0;
  logic       rst_n;
  x_vec_t     x;
  y_vec_t     y;
  state_vec_t state;

  asm_controller dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y), .state(state));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned model;  // reference state, 1..11

  task automatic check_now(string where);
    checks++;
    if (state !== onehot(model) || y !== ref_y(model)) begin
      failures++;
      if (failures < 20)
        $display("%s: state=%b y=%b, expected a%0d y=%b", where, state, y, model, ref_y(model));
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    #1;
    model = 1;
    check_now("reset");
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  // Run one operation from a1 with constant inputs; check the sequence of
  // states and the number of clocks until the machine is back in a1.
  task automatic run_path(x_vec_t xin, int unsigned exp_seq[$], string name);
    int unsigned cycles = 0;
    x = xin;
    checks++;
    if (state !== onehot(1)) begin failures++; $display("%s: not in a1", name); end
    foreach (exp_seq[i]) begin
      @(posedge clk); #1;
      cycles++;
      checks++;
      if (state !== onehot(exp_seq[i])) begin
        failures++;
        $display("%s step %0d: state=%b expected a%0d", name, i, state, exp_seq[i]);
      end
    end
    checks++;
    if (cycles != exp_seq.size() || state !== onehot(1)) begin
      failures++;
      $display("%s: %0d clocks, not back in a1", name, cycles);
    end
  endtask

  // mechanism counters
  int trans_cnt [11][11];
  int n_a10, n_a11, n_loop7, n_back3, n_resets, n_ops;

  initial begin
    // reset before the first clock edge
    rst_n = 1'b1;
    x = '0;
    #1;
    do_reset();

    // ---------------- directed paths ----------------
    //          x8..x1
    // a1-a2-a3-a4-a1: x1=0, x6=0                        4 clocks
    run_path(8'b0000_0000, '{2, 3, 4, 1}, "a2 a3 a4");
    // a1-a2-a3-a5-a1: x6=1, x7=1                        4 clocks
    run_path(8'b0110_0000, '{2, 3, 5, 1}, "a2 a3 a5");
    // a1-a2-a3-a10-a8-a1: x6=1 x7=0 x4=1 x5=1           5 clocks (4 unmodified)
    run_path(8'b0011_1000, '{2, 3, 10, 8, 1}, "a3 via a10 to a8");
    // a1-a6-a11-a8-a1: x1 x2 x3 x4 x5                   4 clocks (3 unmodified)
    run_path(8'b0001_1111, '{6, 11, 8, 1}, "a6 via a11 to a8");
    // a1-a6-a11-a9-a1: x1 x2 x3 x4, x5=0                4 clocks
    run_path(8'b0000_1111, '{6, 11, 9, 1}, "a6 via a11 to a9 (x5=0)");
    // a1-a6-a11-a9-a1: x1 x2 x3, x4=0, x8=1             4 clocks
    run_path(8'b1000_0111, '{6, 11, 9, 1}, "a6 via a11 to a9 (x8=1)");
    // a1-a6-a7-a8-a1: x1, x2=0, x4 x5                   4 clocks, no extra state
    run_path(8'b0001_1001, '{6, 7, 8, 1}, "a6 a7 a8");

    // ---------------- random run ----------------
    model = 1;
    for (int cyc = 0; cyc < 200000; cyc++) begin
      int unsigned prev;
      x = x_vec_t'($urandom);
      if ($urandom_range(0, 999) == 0) begin
        @(negedge clk);
        do_reset();
        n_resets++;
        if (failures > 50) break;
        continue;
      end
      prev = model;
      @(posedge clk); #1;
      model = ref_next(prev, x);
      trans_cnt[prev-1][model-1]++;
      if (model == 10) n_a10++;
      if (model == 11) n_a11++;
      if (prev == 7 && model == 7) n_loop7++;
      if (prev == 6 && model == 3) n_back3++;
      if (model == 1) n_ops++;
      check_now("random");
      @(negedge clk);
      if (failures > 50) break;
    end

    // every transition of the modified list was taken at least once
    foreach (TRANS[t]) begin
      checks++;
      if (trans_cnt[TRANS[t].src][TRANS[t].dst] == 0) begin
        failures++;
        $display("transition a%0d -> a%0d never taken", TRANS[t].src + 1, TRANS[t].dst + 1);
      end
    end
    checks++; if (n_a10 == 0)    begin failures++; $display("a10 never entered"); end
    checks++; if (n_a11 == 0)    begin failures++; $display("a11 never entered"); end
    checks++; if (n_loop7 == 0)  begin failures++; $display("a7 loop never taken"); end
    checks++; if (n_back3 == 0)  begin failures++; $display("a6 -> a3 never taken"); end
    checks++; if (n_resets == 0) begin failures++; $display("no reset in random run"); end
    $display("operations=%0d a10=%0d a11=%0d a7_loop=%0d a6_to_a3=%0d resets=%0d",
             n_ops, n_a10, n_a11, n_loop7, n_back3, n_resets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
