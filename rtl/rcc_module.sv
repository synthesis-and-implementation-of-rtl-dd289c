// rcc_module - reconfigurable combinational circuit of one module, for an
// HFSM whose register holds {module code, state code within the module}.
//
// Each module has its own RAMs: an output RAM and G blocks of programmable
// multiplexer + state transition RAM, all addressed by the state code within
// the module (SSW bits). The words hold full {module, state} codes (CW bits),
// so a transition can name a state of another module (a call).
//   * `out_sel` is this module's line of the module decoder for the register:
//     when low, y and `is_end` are zero (outputs of passive modules are
//     zeros);
//   * `tr_sel` is this module's decoder line for the module whose state is
//     being evaluated (the register's, or on a return the calling module's
//     from the top of the stack); when low, the transition outputs are zero.
// The outputs of all modules are OR-ed by the parent. Since only the RAMs of
// this module are written by `cfg_we`, the module can be reloaded while
// another module is running.
//
// Reads are combinational, configuration writes synchronous (one word per
// rising edge; `cfg_target`, `cfg_block`, `cfg_k` as in the single-circuit
// version). The gating and OR-ing are this design's reading of "outputs of
// passive modules are set to zeros".
module rcc_module
  import rcc_pkg::*;
#(
  parameter int unsigned SSW = 3,  // state code width within a module
  parameter int unsigned CW  = 5,  // full {module, state} code width
  parameter int unsigned L   = 5,
  parameter int unsigned K   = 2,
  parameter int unsigned N   = 7,
  parameter int unsigned G   = 2
) (
  input  logic                               clk,
  input  logic                               out_sel,
  input  logic [SSW-1:0]                     cur_local,
  input  logic                               tr_sel,
  input  logic [SSW-1:0]                     eval_local,
  input  logic                               ret,
  input  logic [L-1:0]                       x,
  output logic [N-1:0]                       y,
  output logic                               is_end,
  output logic                               valid,
  output logic                               push,
  output logic [CW-1:0]                      next_code,
  output logic [CW-1:0]                      push_code,
  input  logic                               cfg_we,
  input  cfg_target_e                        cfg_target,
  input  logic [(G > 1 ? $clog2(G) : 1)-1:0] cfg_block,
  input  logic [(K > 1 ? $clog2(K) : 1)-1:0] cfg_k,
  input  logic [SSW+K:0]                     cfg_addr,
  input  logic [((N+1 > 2*CW+2) ? N+1 : 2*CW+2)-1:0] cfg_data
);
  localparam int unsigned LW = (L > 1) ? $clog2(L) : 1;
  localparam int unsigned GW = (G > 1) ? $clog2(G) : 1;

  logic [N:0] out_ram [2**SSW];
  logic       e_raw;
  logic [N-1:0] y_raw;

  always_ff @(posedge clk) begin
    if (cfg_we && cfg_target == CFG_OUT_RAM) out_ram[cfg_addr[SSW-1:0]] <= cfg_data[N:0];
  end

  assign {e_raw, y_raw} = out_ram[cur_local];
  assign y      = out_sel ? y_raw : '0;
  assign is_end = out_sel && e_raw;

  logic [G-1:0]  b_valid, b_push;
  logic [CW-1:0] b_next [G];
  logic [CW-1:0] b_rc   [G];

  for (genvar g = 0; g < G; g++) begin : g_block
    logic [K-1:0] p;
    logic         pm_we, st_we;
    assign pm_we = cfg_we && cfg_target == CFG_PM    && cfg_block == GW'(g);
    assign st_we = cfg_we && cfg_target == CFG_STRAM && cfg_block == GW'(g);

    rcc_pm #(.SW(SSW), .L(L), .K(K)) u_pm (
      .clk, .cfg_we(pm_we), .cfg_k, .cfg_addr(cfg_addr[SSW-1:0]),
      .cfg_sel(cfg_data[LW-1:0]), .state(eval_local), .x, .p
    );

    rcc_stram #(.SW(SSW), .K(K), .CW(CW)) u_stram (
      .clk, .cfg_we(st_we), .cfg_addr, .cfg_data(cfg_data[2*CW+1:0]),
      .ret, .state(eval_local), .p,
      .valid(b_valid[g]), .push(b_push[g]), .next(b_next[g]), .rstate(b_rc[g])
    );
  end

  always_comb begin
    valid = 1'b0; push = 1'b0; next_code = '0; push_code = '0;
    if (tr_sel) begin
      for (int g = 0; g < G; g++) begin
        if (b_valid[g]) begin
          valid      = 1'b1;
          push      |= b_push[g];
          next_code |= b_next[g];
          push_code |= b_rc[g];
        end
      end
    end
  end
endmodule
