// rhfsm_modular - reconfigurable HFSM with one reconfigurable circuit per
// module.
//
// The register holds {module code, state code within the module}. A module
// decoder turns the module code into one select line per module (z0 ..
// z(Q-1)); every module has its own RAM-based circuit (rcc_module) and only
// the selected one drives the outputs and the next code, the others giving
// zeros, which are OR-ed. Because the RAMs of a module are separate, one
// module can be reloaded (port `cfg_module`) while others run, and reloading
// a module takes fewer writes than reloading the whole machine.
//
// Hierarchical call and return work as in the single-circuit machine: a
// calling state's word pushes its return code and names the Begin state of
// the callee; in the End state of a called module with a non-empty stack,
// `pop` is raised and the {module, state} on top of the stack is evaluated,
// with the decoder then selecting the calling module's circuit, so the return
// and the next step of the caller take the End state's single cycle.
//
// Defaults: Q = 4 modules of at most 8 states (3-bit local codes), which
// holds the four-module example; L, K, N, G and the stack depth as in the
// single-circuit machine (this design's choices). Synchronous active-low
// reset to code 0 (Begin of z0) with an empty stack. `stack_full` shows that
// all DEPTH words are in use; `stack_overflow` is sticky after a lost call.
module rhfsm_modular
  import rcc_pkg::*;
#(
  parameter int unsigned Q     = 4,
  parameter int unsigned SSW   = 3,
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
  output logic [(Q > 1 ? $clog2(Q) : 1)+SSW-1:0] state_code,
  output logic [$clog2(DEPTH+1)-1:0]         stack_pointer,
  output logic                               stack_overflow,
  output logic                               stack_full,
  input  logic                               cfg_we,
  input  logic [(Q > 1 ? $clog2(Q) : 1)-1:0] cfg_module,
  input  cfg_target_e                        cfg_target,
  input  logic [(G > 1 ? $clog2(G) : 1)-1:0] cfg_block,
  input  logic [(K > 1 ? $clog2(K) : 1)-1:0] cfg_k,
  input  logic [SSW+K:0]                     cfg_addr,
  input  logic [((N+1 > 2*((Q > 1 ? $clog2(Q) : 1)+SSW)+2) ? N+1 : 2*((Q > 1 ? $clog2(Q) : 1)+SSW)+2)-1:0] cfg_data
);
  localparam int unsigned MW = (Q > 1) ? $clog2(Q) : 1;
  localparam int unsigned CW = MW + SSW;

  logic [CW-1:0] cur, next, ret, eval, push_code;
  logic          push, pop, stack_empty, any_valid;
  logic [Q-1:0]  out_sel, tr_sel;   // module decoder outputs
  logic [Q-1:0]  m_end, m_valid, m_push;
  logic [N-1:0]  m_y  [Q];
  logic [CW-1:0] m_next [Q];
  logic [CW-1:0] m_pc   [Q];

  hfsm_register #(.W(CW), .RESET_CODE('0)) u_register (
    .clk, .rst_n, .next_code(next), .code(cur)
  );

  hfsm_stack #(.W(CW), .DEPTH(DEPTH)) u_stack (
    .clk, .rst_n, .push, .pop, .push_data(push_code), .top(ret),
    .sp(stack_pointer), .empty(stack_empty), .full(stack_full),
    .overflow(stack_overflow)
  );

  // Module decoders: one for the register's module (outputs), one for the
  // module whose state is evaluated (transitions).
  assign pop  = (|m_end) && !stack_empty;
  assign eval = pop ? ret : cur;
  always_comb begin
    for (int q = 0; q < Q; q++) begin
      out_sel[q] = (cur[CW-1:SSW]  == MW'(q));
      tr_sel[q]  = (eval[CW-1:SSW] == MW'(q));
    end
  end

  for (genvar q = 0; q < Q; q++) begin : g_module
    rcc_module #(.SSW(SSW), .CW(CW), .L(L), .K(K), .N(N), .G(G)) u_cc (
      .clk, .out_sel(out_sel[q]), .cur_local(cur[SSW-1:0]),
      .tr_sel(tr_sel[q]), .eval_local(eval[SSW-1:0]), .ret(pop), .x,
      .y(m_y[q]), .is_end(m_end[q]), .valid(m_valid[q]), .push(m_push[q]),
      .next_code(m_next[q]), .push_code(m_pc[q]),
      .cfg_we(cfg_we && cfg_module == MW'(q)), .cfg_target, .cfg_block, .cfg_k,
      .cfg_addr, .cfg_data
    );
  end

  always_comb begin
    logic [CW-1:0] n, pc;
    y = '0; n = '0; pc = '0; any_valid = 1'b0; push = 1'b0;
    for (int q = 0; q < Q; q++) begin
      y         |= m_y[q];
      n         |= m_next[q];
      pc        |= m_pc[q];
      any_valid |= m_valid[q];
      push      |= m_push[q];
    end
    next      = any_valid ? n : cur;
    push_code = pc;
    push      = push && !pop;
  end

  assign state_code = cur;
endmodule
