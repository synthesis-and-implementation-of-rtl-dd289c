// fig7_cc - combinational circuit of the four-module example HFSM.
//
// Module z0 (main, cyclic: its End is its Begin a0) outputs y1,y4 in a1 and
// then branches on {x1,x2}: 00 -> a2 (y2) -> a4 (call z2) -> a5 (y1,y2,y3);
// 01 -> a6 (y2,y3) -> a7 (call z1); 10 -> a3 (y3) -> a7; 11 -> a1 again.
// Module z1 tests x5 in Begin: 1 -> a1 (y5) -> a2 (call z1, recursively) ->
// a3 (y6) -> a4 (call z2); 0 -> a4 directly; after z2 returns, x4 = 1 ends
// z1 (a5) and x4 = 0 goes back to a1. Module z2 tests x2 then x3: 0 -> a1
// (y2,y7) -> a3 (y3,y5); 10 -> a3; 11 -> a2 (call z3); all then End a4.
// Module z3 tests x1: 0 -> a1 (y4,y5,y7) -> End a4; 1 -> a2 (y2) -> a3 (y1)
// -> End a4. The unconditional step from z3/a3 to End is this design's own
// choice; everything else follows the flow charts of the example.
//
// A calling state pushes its own code and loads the Begin state of the called
// module. In the End state of a called module with a non-empty stack, `pop`
// is raised and the next state is the successor of the calling state found
// on top of the stack, taken with the inputs of that cycle (z1/a4 shows a
// conditional successor). Micro-operations belong to the state in the
// register; End states output none.
//
// SPLIT = 0 uses one unique code per state; SPLIT = 1 uses the {module,
// state} code pairs. The behaviour is the same.
module fig7_cc
  import fig7_pkg::*;
#(
  parameter bit SPLIT = 1'b0
) (
  input  logic [CODE_W-1:0] cur,
  input  logic [CODE_W-1:0] ret,
  input  logic              stack_empty,
  input  logic [5:1]        x,
  output logic [CODE_W-1:0] next,
  output logic              push,
  output logic              pop,
  output logic [7:1]        y
);
  state_e cs, rs, es, ns;

  assign cs = decode(cur, SPLIT);
  assign rs = decode(ret, SPLIT);

  assign pop      = (cs == Z1_A5 || cs == Z2_A4 || cs == Z3_A4) && !stack_empty;
  assign es       = pop ? rs : cs;
  assign next     = encode(ns, SPLIT);

  // Micro-operations of the current state (bit i is y_i).
  always_comb begin
    y = '0;
    unique case (cs)
      Z0_A1:   begin y[1] = 1'b1; y[4] = 1'b1; end
      Z0_A2:   y[2] = 1'b1;
      Z0_A3:   y[3] = 1'b1;
      Z0_A5:   begin y[1] = 1'b1; y[2] = 1'b1; y[3] = 1'b1; end
      Z0_A6:   begin y[2] = 1'b1; y[3] = 1'b1; end
      Z1_A1:   y[5] = 1'b1;
      Z1_A3:   y[6] = 1'b1;
      Z2_A1:   begin y[2] = 1'b1; y[7] = 1'b1; end
      Z2_A3:   begin y[3] = 1'b1; y[5] = 1'b1; end
      Z3_A1:   begin y[4] = 1'b1; y[5] = 1'b1; y[7] = 1'b1; end
      Z3_A2:   y[2] = 1'b1;
      Z3_A3:   y[1] = 1'b1;
      default: ;
    endcase
  end

  // Transitions from `es`; `pop` marks the return into a calling state.
  always_comb begin
    ns   = es;
    push = 1'b0;
    unique case (es)
      Z0_A0: ns = Z0_A1;
      Z0_A1: unique case ({x[1], x[2]})
               2'b00:   ns = Z0_A2;
               2'b01:   ns = Z0_A6;
               2'b10:   ns = Z0_A3;
               default: ns = Z0_A1;
             endcase
      Z0_A2: ns = Z0_A4;
      Z0_A3: ns = Z0_A7;
      Z0_A4: if (pop) ns = Z0_A5; else begin push = 1'b1; ns = Z2_A0; end
      Z0_A5: ns = Z0_A0;
      Z0_A6: ns = Z0_A7;
      Z0_A7: if (pop) ns = Z0_A0; else begin push = 1'b1; ns = Z1_A0; end
      Z1_A0: ns = x[5] ? Z1_A1 : Z1_A4;
      Z1_A1: ns = Z1_A2;
      Z1_A2: if (pop) ns = Z1_A3; else begin push = 1'b1; ns = Z1_A0; end
      Z1_A3: ns = Z1_A4;
      Z1_A4: if (pop) ns = x[4] ? Z1_A5 : Z1_A1;
             else begin push = 1'b1; ns = Z2_A0; end
      Z1_A5: ns = Z1_A5;
      Z2_A0: ns = x[2] ? (x[3] ? Z2_A2 : Z2_A3) : Z2_A1;
      Z2_A1: ns = Z2_A3;
      Z2_A2: if (pop) ns = Z2_A4; else begin push = 1'b1; ns = Z3_A0; end
      Z2_A3: ns = Z2_A4;
      Z2_A4: ns = Z2_A4;
      Z3_A0: ns = x[1] ? Z3_A2 : Z3_A1;
      Z3_A1: ns = Z3_A4;
      Z3_A2: ns = Z3_A3;
      Z3_A3: ns = Z3_A4;
      Z3_A4: ns = Z3_A4;
      default: ns = Z0_A0;
    endcase
  end
endmodule
