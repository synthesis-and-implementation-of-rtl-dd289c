// rhfsm - reconfigurable HFSM with implicit modules.
//
// Register + single return stack + RAM-based combinational circuit (rcc).
// What the machine does is set entirely by the RAM contents written through
// the configuration port, so one circuit runs any set of flow charts with at
// most 2**SW states, L conditions, N micro-operations and K tested
// conditions per state and block. Loading new contents reconfigures the whole
// machine; the machine should be held in reset while it is loaded.
//
// Timing: one state per clock cycle; a call moves to the callee's Begin
// state in the next cycle and pushes the return code; the End state of a
// callee pops and moves straight to the successor of the calling state.
// Synchronous active-low reset to state code 0 (the Begin state of the main
// module) with an empty stack. DEPTH = 16 is this design's own choice; a call
// onto a full stack is lost and sets the sticky `stack_overflow`;
// `stack_full` shows that all DEPTH words are in use.
module rhfsm
  import rcc_pkg::*;
#(
  parameter int unsigned SW    = 5,
  parameter int unsigned L     = 5,
  parameter int unsigned K     = 2,
  parameter int unsigned N     = 7,
  parameter int unsigned G     = 2,
  parameter int unsigned DEPTH = 16
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [L-1:0]                       x,
  output logic [N-1:0]                       y,
  output logic [SW-1:0]                      state_code,
  output logic [$clog2(DEPTH+1)-1:0]         stack_pointer,
  output logic                               stack_overflow,
  output logic                               stack_full,
  input  logic                               cfg_we,
  input  cfg_target_e                        cfg_target,
  input  logic [(G > 1 ? $clog2(G) : 1)-1:0] cfg_block,
  input  logic [(K > 1 ? $clog2(K) : 1)-1:0] cfg_k,
  input  logic [SW+K:0]                      cfg_addr,
  input  logic [((N+1 > 2*SW+2) ? N+1 : 2*SW+2)-1:0] cfg_data
);
  logic [SW-1:0] cur, next, ret, push_state;
  logic push, pop, stack_empty;

  hfsm_register #(.W(SW), .RESET_CODE('0)) u_register (
    .clk, .rst_n, .next_code(next), .code(cur)
  );

  hfsm_stack #(.W(SW), .DEPTH(DEPTH)) u_stack (
    .clk, .rst_n, .push, .pop, .push_data(push_state), .top(ret),
    .sp(stack_pointer), .empty(stack_empty), .full(stack_full),
    .overflow(stack_overflow)
  );

  rcc #(.SW(SW), .L(L), .K(K), .N(N), .G(G)) u_cc (
    .clk, .cur_state(cur), .ret_state(ret), .stack_empty, .x, .y,
    .next_state(next), .push, .pop, .push_state,
    .cfg_we, .cfg_target, .cfg_block, .cfg_k, .cfg_addr, .cfg_data
  );

  assign state_code = cur;
endmodule
