// asm_ref_pkg -- reference model of the controller for the testbenches.
//
// Written independently of the RTL tables: it walks the ASM chart vertex by
// vertex, the way the chart is drawn (a1 -> x1 -> a2 or a6, a3 -> x6 -> x7,
// a6 -> x2 -> x3, the shared block x4 -> x5 / x8), and stops at the first
// state label it meets. The additional labels a10 (reached from a3) and a11
// (reached from a6) sit at the input of x4; paths from a7 pass them. The
// model uses plain integers 1..11 for the states a1..a11.

package asm_ref_pkg;

  // Shared block below the additional labels: x4, then x5 or x8.
  function automatic int unsigned after_x4(logic [8:1] x);
    if (x[4]) return x[5] ? 8 : 9;
    else      return x[8] ? 9 : 7;
  endfunction

  function automatic int unsigned ref_next(int unsigned a, logic [8:1] x);
    case (a)
      1:  return x[1] ? 6 : 2;
      2:  return 3;
      3:  begin
            if (!x[6]) return 4;
            if (x[7])  return 5;
            return 10;
          end
      4, 5, 8, 9: return 1;
      6:  begin
            if (!x[2]) return 7;
            if (!x[3]) return 3;
            return 11;
          end
      7, 10, 11: return after_x4(x);
      default: return 0;
    endcase
  endfunction

  // Moore outputs as a list of indices, built into a y1..y8 vector.
  function automatic logic [8:1] ref_y(int unsigned a);
    logic [8:1] y = '0;
    case (a)
      2:  y = 8'b0000_0011;  // y1 y2
      3:  y = 8'b0000_0110;  // y2 y3
      4:  y = 8'b0000_1100;  // y3 y4
      5:  y = 8'b0001_1000;  // y4 y5
      6:  y = 8'b0011_0000;  // y5 y6
      7:  y = 8'b0110_0000;  // y6 y7
      8:  y = 8'b1100_0000;  // y7 y8
      9:  y = 8'b1000_0001;  // y1 y8
      10: y = 8'b0000_0110;  // as a3
      11: y = 8'b0011_0000;  // as a6
      default: y = '0;
    endcase
    return y;
  endfunction

  // One-hot vector of state a (bit a-1).
  function automatic logic [10:0] onehot(int unsigned a);
    return 11'(1) << (a - 1);
  endfunction

endpackage
