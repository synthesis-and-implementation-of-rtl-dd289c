// gcd_hfsm - HFSM that receives pairs of unsigned integers and computes their
// greatest common divisor with a recursive module.
//
// Structure: Register {module, state} + single return stack + combinational
// circuit (gcd_cc) + datapath (gcd_datapath). Module z0 loops for ever:
// it calls z1, which waits for `in_valid` and takes `in_a`/`in_b` (one
// handshake cycle with `in_ready` high); it calls z2, which computes
// gcd(Data_A, Data_B) by the recursion gcd(a, b) = gcd(b, a % b), calling z4
// for the remainder; if the GCD is not 1 it raises `y1` for one cycle and
// calls z3, which holds `out_valid` with `out_gcd` until `out_ready`. Pairs
// whose GCD is 1 produce no output.
//
// Timing: every state takes one clock cycle and a return costs no cycle over
// the End state of the called module. From the accepting cycle of a pair to
// the first `out_valid` cycle there are C(z2) + 3 cycles, where C(z2) is the
// number of cycles spent in z2 and the modules it calls.
//
// `stack_overflow` is sticky and means that a call was lost; `stack_full`
// shows that all DEPTH words are in use. DEPTH = 32 is
// enough for every 16-bit pair. W and DEPTH are this design's own choices.
// SPLIT = 1 (default) holds {module, state} codes in the register and stack;
// SPLIT = 0 gives each of the 17 states a 5-bit code of its own.
module gcd_hfsm
  import gcd_pkg::*;
#(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 32,
  parameter bit          SPLIT = 1'b1,
  localparam int unsigned CW   = SPLIT ? CODE_W : FLAT_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [W-1:0]               in_a,
  input  logic [W-1:0]               in_b,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [W-1:0]               out_gcd,
  output logic                       y1,
  output logic                       stack_overflow,
  output logic                       stack_full,
  output logic [$clog2(DEPTH+1)-1:0] stack_pointer,
  output logic [CW-1:0]              state_code
);
  logic [CW-1:0] cur, next, ret;
  logic       push, pop, stack_empty;
  dp_ctrl_t   ctrl;
  dp_status_t st;

  hfsm_register #(.W(CW), .RESET_CODE('0)) u_register (
    .clk, .rst_n, .next_code(next), .code(cur)
  );

  hfsm_stack #(.W(CW), .DEPTH(DEPTH)) u_stack (
    .clk, .rst_n, .push, .pop, .push_data(cur), .top(ret),
    .sp(stack_pointer), .empty(stack_empty), .full(stack_full),
    .overflow(stack_overflow)
  );

  gcd_cc #(.SPLIT(SPLIT)) u_cc (
    .cur_code(cur), .ret_code_in(ret), .stack_empty, .st, .in_valid, .out_ready,
    .next_code(next), .push, .pop, .ctrl, .in_ready, .out_valid, .y1
  );

  gcd_datapath #(.W(W)) u_dp (
    .clk, .rst_n, .ctrl, .in_a, .in_b, .st, .result(out_gcd)
  );

  assign state_code = cur;
endmodule
