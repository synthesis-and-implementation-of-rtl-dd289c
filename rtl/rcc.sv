// rcc - RAM-based, dynamically reconfigurable combinational circuit (CC) of
// an HFSM with implicit modules.
//
// The whole behaviour of the HFSM lives in RAMs, so the same hardware runs any
// set of flow charts that fits them:
//   * output RAM, addressed by the current state code: the micro-operations
//     y0..y(N-1) of the state and an End flag marking the End state of a
//     called module;
//   * return multiplexer: in the End state of a called module with a
//     non-empty stack, `pop` is raised and the code on top of the stack (the
//     calling state) replaces the current state as the address of the
//     transition RAMs, together with the `ret` address bit;
//   * G blocks, each a programmable multiplexer (rcc_pm) and a state
//     transition RAM (rcc_stram). A state's transitions are held in one of
//     the blocks; the blocks' outputs are OR-ed, a block that does not hold
//     the transition giving zeros. With no valid word, the state is kept.
//
// Interface: the configuration port writes one RAM word per clock edge;
// `cfg_target` picks the output RAM, a PM select RAM (block `cfg_block`,
// variable `cfg_k`) or an STRAM (block `cfg_block`). Everything else is
// combinational, so a transition, a call and a return each take one cycle
// of the register outside.
//
// The RAM structure and the return multiplexer follow the reconfigurable
// circuit of the source; the word formats, the End flag in the output RAM,
// the `ret` address bit and the OR-ing of the G blocks are this design's
// own. So is addressing the output RAM by the Register rather than by the
// multiplexer output: a return cycle then does not repeat the calling
// state's micro-operations, and the End flag cannot loop back onto `pop`.
// The defaults (5-bit codes, 5 conditions, 7 outputs, K = 2) hold the
// four-module example with 24 states; G = 2 is this design's own.
module rcc
  import rcc_pkg::*;
#(
  parameter int unsigned SW = 5,  // state code width
  parameter int unsigned L  = 5,  // logic conditions x
  parameter int unsigned K  = 2,  // variables p per block
  parameter int unsigned N  = 7,  // micro-operations y
  parameter int unsigned G  = 2   // PM + STRAM blocks
) (
  input  logic                               clk,
  input  logic [SW-1:0]                      cur_state,
  input  logic [SW-1:0]                      ret_state,
  input  logic                               stack_empty,
  input  logic [L-1:0]                       x,
  output logic [N-1:0]                       y,
  output logic [SW-1:0]                      next_state,
  output logic                               push,
  output logic                               pop,
  output logic [SW-1:0]                      push_state,
  // configuration port
  input  logic                               cfg_we,
  input  cfg_target_e                        cfg_target,
  input  logic [(G > 1 ? $clog2(G) : 1)-1:0] cfg_block,
  input  logic [(K > 1 ? $clog2(K) : 1)-1:0] cfg_k,
  input  logic [SW+K:0]                      cfg_addr,
  input  logic [((N+1 > 2*SW+2) ? N+1 : 2*SW+2)-1:0] cfg_data
);
  localparam int unsigned LW = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned GW = (G > 1) ? $clog2(G) : 1;

  // Output RAM
  logic [N:0] out_ram [2**SW];
  logic       is_end;

  always_ff @(posedge clk) begin
    if (cfg_we && cfg_target == CFG_OUT_RAM) out_ram[cfg_addr[SW-1:0]] <= cfg_data[N:0];
  end

  assign {is_end, y} = out_ram[cur_state];

  // Return / current state multiplexer
  logic [SW-1:0] eval_state;
  assign pop        = is_end && !stack_empty;
  assign eval_state = pop ? ret_state : cur_state;

  // G blocks of PM + STRAM
  logic [G-1:0]  b_valid, b_push;
  logic [SW-1:0] b_next   [G];
  logic [SW-1:0] b_rstate [G];

  for (genvar g = 0; g < G; g++) begin : g_block
    logic [K-1:0] p;
    logic         pm_we, st_we;
    assign pm_we = cfg_we && cfg_target == CFG_PM    && cfg_block == GW'(g);
    assign st_we = cfg_we && cfg_target == CFG_STRAM && cfg_block == GW'(g);

    rcc_pm #(.SW(SW), .L(L), .K(K)) u_pm (
      .clk, .cfg_we(pm_we), .cfg_k, .cfg_addr(cfg_addr[SW-1:0]),
      .cfg_sel(cfg_data[LW-1:0]), .state(eval_state), .x, .p
    );

    rcc_stram #(.SW(SW), .K(K)) u_stram (
      .clk, .cfg_we(st_we), .cfg_addr, .cfg_data(cfg_data[2*SW+1:0]),
      .ret(pop), .state(eval_state), .p,
      .valid(b_valid[g]), .push(b_push[g]), .next(b_next[g]), .rstate(b_rstate[g])
    );
  end

  always_comb begin
    logic [SW-1:0] n, r;
    logic          any, ps;
    n = '0; r = '0; any = 1'b0; ps = 1'b0;
    for (int g = 0; g < G; g++) begin
      if (b_valid[g]) begin
        n   |= b_next[g];
        r   |= b_rstate[g];
        ps  |= b_push[g];
        any  = 1'b1;
      end
    end
    next_state = any ? n : cur_state;
    push_state = r;
    push       = any && ps && !pop;
  end
endmodule
