// gcd_cc - combinational circuit (CC) of the GCD HFSM.
//
// It works on the pair {module, state} held by the Register and computes the
// outputs of the current state and the next pair. Three kinds of transition
// leave a state:
//   * ordinary: to another state of the same module;
//   * call: from a state holding a macro-operation (z1..z4) to the Begin
//     state a0 of the called module; `push` is raised and the machine pushes
//     the Register's pair as the return code;
//   * return: in the End state of a called module with a non-empty stack,
//     `pop` is raised and the transition is evaluated from the calling pair
//     found at the top of the stack, as if its macro-operation had just
//     finished. The return and the step out of the calling state thus take
//     one clock cycle, the cycle spent in the End state.
// Micro-operations (datapath controls, handshakes, y1) always belong to the
// state in the Register. Unused codes lead back to z0/a0.
//
// Modules z2 and z4 follow the state tables given for them. The main loop z0
// follows its flow chart: receive a pair (z1), compute the GCD (z2), and if
// the GCD is 1 receive the next pair, otherwise raise y1 and run z3, then
// repeat. The insides of z1 (a valid/ready input handshake) and of z3 (a
// valid/ready output handshake) and the labels a1..a3 of z0 are this
// design's own choices. Pushing the calling state rather than its successor
// is the general scheme of the source, of which pushing the successor (as
// in its table for z2) is the special case.
//
// SPLIT = 1 keeps {module, state} codes (6 bits) in the register and on the
// stack; SPLIT = 0 gives every state one code of its own (5 bits, modules
// implicit). The behaviour is the same.
module gcd_cc
  import gcd_pkg::*;
#(
  parameter bit SPLIT = 1'b1,
  localparam int unsigned CW = SPLIT ? CODE_W : FLAT_W
) (
  input  logic [CW-1:0] cur_code,  // Register
  input  logic [CW-1:0] ret_code_in, // top of the stack
  input  logic       stack_empty,
  input  dp_status_t st,
  input  logic       in_valid,
  input  logic       out_ready,
  output logic [CW-1:0] next_code,
  output logic       push,
  output logic       pop,
  output dp_ctrl_t   ctrl,
  output logic       in_ready,
  output logic       out_valid,
  output logic       y1
);
  code_t cur, ret, next, eval;
  logic  is_end;

  assign cur       = SPLIT ? code_t'(cur_code)    : from_flat(FLAT_W'(cur_code));
  assign ret       = SPLIT ? code_t'(ret_code_in) : from_flat(FLAT_W'(ret_code_in));
  assign next_code = SPLIT ? CW'(next)            : CW'(to_flat(next));

  // End states of the called modules.
  always_comb begin
    unique case (cur.m)
      Z1:      is_end = (cur.s == A1);
      Z2:      is_end = (cur.s == A5);
      Z3:      is_end = (cur.s == A1);
      Z4:      is_end = (cur.s == A2);
      default: is_end = 1'b0;
    endcase
  end

  assign pop      = is_end && !stack_empty;
  assign eval     = pop ? ret : cur;   // Return / Current state multiplexer

  // Micro-operations of the current state.
  always_comb begin
    ctrl      = '0;
    in_ready  = 1'b0;
    out_valid = 1'b0;
    y1        = 1'b0;
    unique case (cur.m)
      Z0: if (cur.s == A3) y1 = 1'b1;
      Z1: if (cur.s == A0) begin
            in_ready    = 1'b1;
            ctrl.ld_in  = in_valid;
          end
      Z2: unique case (cur.s)
            A0:      ctrl.ld_ab     = 1'b1;
            A1:      ctrl.swap_args = 1'b1;
            A2:      ctrl.ld_result = 1'b1;
            A4:      ctrl.rec_args  = 1'b1;
            default: ;
          endcase
      Z3: if (cur.s == A0) out_valid = 1'b1;
      Z4: if (cur.s == A1) ctrl.sub = 1'b1;
      default: ;
    endcase
  end

  // Transitions, evaluated from `eval`; `pop` marks a return into `eval`.
  always_comb begin
    next = RESET_CODE;
    push = 1'b0;
    unique case (eval.m)
      Z0: unique case (eval.s)
            A0: next = mk(Z0, A1);
            A1: if (pop) next = mk(Z0, A2);
                else begin push = 1'b1; next = mk(Z1, A0); end
            A2: if (pop) next = st.gcd_is_one ? mk(Z0, A1) : mk(Z0, A3);
                else begin push = 1'b1; next = mk(Z2, A0); end
            A3: if (pop) next = mk(Z0, A0);
                else begin push = 1'b1; next = mk(Z3, A0); end
            default: next = RESET_CODE;
          endcase
      Z1: unique case (eval.s)
            A0: next = in_valid ? mk(Z1, A1) : mk(Z1, A0);
            A1: next = mk(Z1, A1);
            default: next = RESET_CODE;
          endcase
      Z2: unique case (eval.s)
            A0: if (st.data_b_gt_a)      next = mk(Z2, A1);
                else if (st.data_b_zero) next = mk(Z2, A2);
                else                     next = mk(Z2, A3);
            A1: if (pop) next = mk(Z2, A5);
                else begin push = 1'b1; next = mk(Z2, A0); end
            A2: next = mk(Z2, A5);
            A3: if (pop) next = mk(Z2, A4);
                else begin push = 1'b1; next = mk(Z4, A0); end
            A4: if (pop) next = mk(Z2, A5);
                else begin push = 1'b1; next = mk(Z2, A0); end
            A5: next = mk(Z2, A5);
            default: next = RESET_CODE;
          endcase
      Z3: unique case (eval.s)
            A0: next = out_ready ? mk(Z3, A1) : mk(Z3, A0);
            A1: next = mk(Z3, A1);
            default: next = RESET_CODE;
          endcase
      Z4: unique case (eval.s)
            A0: next = st.a_ge_b ? mk(Z4, A1) : mk(Z4, A2);
            A1: next = mk(Z4, A0);
            A2: next = mk(Z4, A2);
            default: next = RESET_CODE;
          endcase
      default: next = RESET_CODE;
    endcase
  end
endmodule
