// fig7_hfsm - four-module example HFSM with implicit modules.
//
// Register + single return stack + combinational circuit (fig7_cc). Inputs
// x1..x5 are logic conditions, outputs y1..y7 micro-operations of the current
// state. Every state lasts one clock cycle; a hierarchical call moves to the
// Begin state of the called module in the next cycle, and a hierarchical
// return moves from the End state of the called module straight to the
// successor of the calling state, with no extra cycle.
//
// SPLIT selects the state encoding: 0 gives every one of the 24 states a code
// of its own (modules implicit), 1 uses {module, state-in-module} pairs
// (4 modules of at most 8 states). Module z1 calls itself while x5 is 1 in
// its Begin state, so the recursion depth is set by the inputs; a call onto a
// full stack is lost and sets the sticky `stack_overflow`; `stack_full` shows
// that all DEPTH words are in use. DEPTH = 16 is this design's own choice.
// Synchronous active-low reset to z0/a0.
module fig7_hfsm
  import fig7_pkg::*;
#(
  parameter bit          SPLIT = 1'b0,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [5:1]                 x,
  output logic [7:1]                 y,
  output logic [CODE_W-1:0]          state_code,
  output logic [$clog2(DEPTH+1)-1:0] stack_pointer,
  output logic                       stack_overflow,
  output logic                       stack_full
);
  logic [CODE_W-1:0] cur, next, ret;
  logic push, pop, stack_empty;

  hfsm_register #(.W(CODE_W), .RESET_CODE('0)) u_register (
    .clk, .rst_n, .next_code(next), .code(cur)
  );

  hfsm_stack #(.W(CODE_W), .DEPTH(DEPTH)) u_stack (
    .clk, .rst_n, .push, .pop, .push_data(cur), .top(ret),
    .sp(stack_pointer), .empty(stack_empty), .full(stack_full),
    .overflow(stack_overflow)
  );

  fig7_cc #(.SPLIT(SPLIT)) u_cc (
    .cur, .ret, .stack_empty, .x, .next, .push, .pop, .y
  );

  assign state_code = cur;
endmodule
