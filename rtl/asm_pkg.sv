// asm_pkg -- shared types and tables of the high-speed ASM controller.
//
// The controller is a Moore machine for an eight-input, eight-output ASM
// chart (inputs x1..x8, outputs y1..y8). Nine states a1..a9 come from the
// operator vertices of the chart; two additional states a10 and a11 are
// inserted in front of the decision vertex x4 so that no transition depends
// on more than n-1 = 3 inputs. With one-hot state coding every transition
// function then fits a single 4-input LUT: one LUT input reads the present
// state bit, the other three read the transition condition.
//
// This package holds:
//   * the state indices and the one-hot state vector type,
//   * the Moore output sets Y(a) of every state,
//   * the transition list of the modified machine: for each transition
//     (a_m, a_s) the inputs that form its condition and the condition's
//     truth table over those inputs.
// The chart, the state labels, the output sets and the placement of a10/a11
// follow the reference example; the table layout, the coding of the truth
// tables and the index numbering are this design's own.

package asm_pkg;

  // LUT size the machine is built for (4-LUT devices).
  parameter int unsigned LUT_N      = 4;
  // Number of controller inputs x1..x8 and outputs y1..y8.
  parameter int unsigned NUM_X      = 8;
  parameter int unsigned NUM_Y      = 8;
  // Main states a1..a9 and the two additional states a10, a11.
  parameter int unsigned NUM_STATES = 11;
  // Number of transitions in the modified transition list.
  parameter int unsigned NUM_TRANS  = 22;

  // State a_k has one-hot bit k-1.
  typedef enum logic [3:0] {
    A1 = 4'd0, A2 = 4'd1, A3 = 4'd2, A4 = 4'd3, A5  = 4'd4,  A6  = 4'd5,
    A7 = 4'd6, A8 = 4'd7, A9 = 4'd8, A10 = 4'd9, A11 = 4'd10
  } state_e;

  typedef logic [NUM_STATES-1:0] state_vec_t;  // one-hot, bit k-1 = a_k
  typedef logic [NUM_X:1]        x_vec_t;      // x[k] = input x_k
  typedef logic [NUM_Y:1]        y_vec_t;      // y[k] = output y_k

  localparam state_vec_t RESET_STATE = state_vec_t'(1) << A1;

  // Moore output sets. a1 (start/stop) asserts nothing. The additional
  // states copy the outputs of the state their transition started from:
  // Y(a10) = Y(a3), Y(a11) = Y(a6).
  function automatic y_vec_t y_of(state_e s);
    y_vec_t y = '0;
    unique case (s)
      A1:  ;
      A2:  begin y[1] = 1'b1; y[2] = 1'b1; end
      A3:  begin y[2] = 1'b1; y[3] = 1'b1; end
      A4:  begin y[3] = 1'b1; y[4] = 1'b1; end
      A5:  begin y[4] = 1'b1; y[5] = 1'b1; end
      A6:  begin y[5] = 1'b1; y[6] = 1'b1; end
      A7:  begin y[6] = 1'b1; y[7] = 1'b1; end
      A8:  begin y[7] = 1'b1; y[8] = 1'b1; end
      A9:  begin y[1] = 1'b1; y[8] = 1'b1; end
      A10: begin y[2] = 1'b1; y[3] = 1'b1; end
      A11: begin y[5] = 1'b1; y[6] = 1'b1; end
      default: ;
    endcase
    return y;
  endfunction

  // One element of the transition list. The condition of the transition is
  // a function of at most three inputs x[v2], x[v1], x[v0]; index 0 means
  // "unused" and reads a constant 0. tt[{c2,c1,c0}] is the condition for
  // the input values c2 = x[v2], c1 = x[v1], c0 = x[v0].
  typedef struct packed {
    state_e     src;
    state_e     dst;
    logic [3:0] v2;
    logic [3:0] v1;
    logic [3:0] v0;
    logic [7:0] tt;
  } trans_t;

  // Frequent truth tables over (c2,c1,c0).
  localparam logic [7:0] TT_ONE      = 8'hFF;  // unconditional
  localparam logic [7:0] TT_C0       = 8'hAA;  //  c0
  localparam logic [7:0] TT_NC0      = 8'h55;  // ~c0
  localparam logic [7:0] TT_C1_C0    = 8'h88;  //  c1 &  c0
  localparam logic [7:0] TT_C1_NC0   = 8'h44;  //  c1 & ~c0
  localparam logic [7:0] TT_NC1_NC0  = 8'h11;  // ~c1 & ~c0
  // c2 & ~c1 | ~c2 & c0: the two paths from x4 into a9
  // (x4 & ~x5, or ~x4 & x8) with c2 = x4, c1 = x5, c0 = x8.
  localparam logic [7:0] TT_X4_TO_A9 = 8'h3A;

  // The transition list of the modified machine. Paths from a3 and a6 that
  // used to run through x6,x7,x4,x5/x8 or x2,x3,x4,x5/x8 (four inputs) now
  // stop in a10 or a11; the block below x4 is then left from a7, a10 and
  // a11 with identical conditions.
  localparam trans_t TRANS [NUM_TRANS] = '{
    '{src: A1,  dst: A2,  v2: 4'd0, v1: 4'd0, v0: 4'd1, tt: TT_NC0     },
    '{src: A1,  dst: A6,  v2: 4'd0, v1: 4'd0, v0: 4'd1, tt: TT_C0      },
    '{src: A2,  dst: A3,  v2: 4'd0, v1: 4'd0, v0: 4'd0, tt: TT_ONE     },
    '{src: A3,  dst: A4,  v2: 4'd0, v1: 4'd0, v0: 4'd6, tt: TT_NC0     },
    '{src: A3,  dst: A5,  v2: 4'd0, v1: 4'd6, v0: 4'd7, tt: TT_C1_C0   },
    '{src: A3,  dst: A10, v2: 4'd0, v1: 4'd6, v0: 4'd7, tt: TT_C1_NC0  },
    '{src: A4,  dst: A1,  v2: 4'd0, v1: 4'd0, v0: 4'd0, tt: TT_ONE     },
    '{src: A5,  dst: A1,  v2: 4'd0, v1: 4'd0, v0: 4'd0, tt: TT_ONE     },
    '{src: A6,  dst: A7,  v2: 4'd0, v1: 4'd0, v0: 4'd2, tt: TT_NC0     },
    '{src: A6,  dst: A3,  v2: 4'd0, v1: 4'd2, v0: 4'd3, tt: TT_C1_NC0  },
    '{src: A6,  dst: A11, v2: 4'd0, v1: 4'd2, v0: 4'd3, tt: TT_C1_C0   },
    '{src: A7,  dst: A8,  v2: 4'd0, v1: 4'd4, v0: 4'd5, tt: TT_C1_C0   },
    '{src: A7,  dst: A9,  v2: 4'd4, v1: 4'd5, v0: 4'd8, tt: TT_X4_TO_A9},
    '{src: A7,  dst: A7,  v2: 4'd0, v1: 4'd4, v0: 4'd8, tt: TT_NC1_NC0 },
    '{src: A10, dst: A8,  v2: 4'd0, v1: 4'd4, v0: 4'd5, tt: TT_C1_C0   },
    '{src: A10, dst: A9,  v2: 4'd4, v1: 4'd5, v0: 4'd8, tt: TT_X4_TO_A9},
    '{src: A10, dst: A7,  v2: 4'd0, v1: 4'd4, v0: 4'd8, tt: TT_NC1_NC0 },
    '{src: A11, dst: A8,  v2: 4'd0, v1: 4'd4, v0: 4'd5, tt: TT_C1_C0   },
    '{src: A11, dst: A9,  v2: 4'd4, v1: 4'd5, v0: 4'd8, tt: TT_X4_TO_A9},
    '{src: A11, dst: A7,  v2: 4'd0, v1: 4'd4, v0: 4'd8, tt: TT_NC1_NC0 },
    '{src: A8,  dst: A1,  v2: 4'd0, v1: 4'd0, v0: 4'd0, tt: TT_ONE     },
    '{src: A9,  dst: A1,  v2: 4'd0, v1: 4'd0, v0: 4'd0, tt: TT_ONE     }
  };

  // For every output y_k, the set of states that assert it (one-hot mask).
  function automatic state_vec_t states_asserting(int unsigned k);
    state_vec_t m = '0;
    for (int s = 0; s < NUM_STATES; s++) begin
      y_vec_t ys = y_of(state_e'(s));
      m[s] = ys[k];
    end
    return m;
  endfunction

  // For every state a_s, the set of transitions that end in it (bit t
  // stands for TRANS[t]).
  function automatic logic [NUM_TRANS-1:0] transitions_into(state_e s);
    logic [NUM_TRANS-1:0] m = '0;
    for (int t = 0; t < NUM_TRANS; t++) m[t] = (TRANS[t].dst == s);
    return m;
  endfunction

endpackage
