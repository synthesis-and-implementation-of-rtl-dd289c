// hfsm_top - four HFSMs with implicit modules, side by side.
//
//   * gcd_*  : the GCD machine (main loop z0, input module z1, recursive GCD
//              module z2, output module z3, remainder module z4), with
//              {module, state} codes (GCD_SPLIT = 1) or one code per state
//              (GCD_SPLIT = 0) and a datapath;
//   * f7_*   : the hard-wired four-module example machine (24 states, input
//              conditions x1..x5 on f7_x[5:1], outputs y1..y7 on f7_y[7:1]);
//   * r_*    : the RAM-based reconfigurable machine with its configuration
//              port, which can be loaded with any set of flow charts that fits
//              its RAMs (for instance the four-module example, with x_i on
//              r_x[i-1] and y_i on r_y[i-1]);
//   * m_*    : the reconfigurable machine with one RAM-based circuit per
//              module and {module, state} codes, whose modules can be reloaded
//              one at a time (port m_cfg_module).
// The four share only the clock and the synchronous active-low reset; each
// has its own ports. The configuration ports of the reconfigurable machines
// are brought out because the controller that loads it is outside this design.
module hfsm_top
  import rcc_pkg::*;
#(
  parameter int unsigned GCD_W      = 16,
  parameter int unsigned GCD_DEPTH  = 32,
  parameter bit          GCD_SPLIT  = 1'b1,
  parameter bit          F7_SPLIT   = 1'b0,
  parameter int unsigned F7_DEPTH   = 16,
  parameter int unsigned R_SW       = 5,
  parameter int unsigned R_L        = 5,
  parameter int unsigned R_K        = 2,
  parameter int unsigned R_N        = 7,
  parameter int unsigned R_G        = 2,
  parameter int unsigned R_DEPTH    = 16,
  parameter int unsigned M_Q        = 4,
  parameter int unsigned M_SSW      = 3,
  parameter int unsigned M_L        = 5,
  parameter int unsigned M_K        = 2,
  parameter int unsigned M_N        = 7,
  parameter int unsigned M_G        = 2,
  parameter int unsigned M_DEPTH    = 16,
  localparam int unsigned GCD_CW    = GCD_SPLIT ? gcd_pkg::CODE_W : gcd_pkg::FLAT_W
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // GCD machine
  input  logic                                   gcd_in_valid,
  output logic                                   gcd_in_ready,
  input  logic [GCD_W-1:0]                       gcd_in_a,
  input  logic [GCD_W-1:0]                       gcd_in_b,
  output logic                                   gcd_out_valid,
  input  logic                                   gcd_out_ready,
  output logic [GCD_W-1:0]                       gcd_out,
  output logic                                   gcd_y1,
  output logic                                   gcd_stack_overflow,
  output logic                                   gcd_stack_full,
  output logic [$clog2(GCD_DEPTH+1)-1:0]         gcd_stack_pointer,
  output logic [GCD_CW-1:0]                      gcd_state_code,
  // four-module example machine
  input  logic [5:1]                             f7_x,
  output logic [7:1]                             f7_y,
  output logic [4:0]                             f7_state_code,
  output logic [$clog2(F7_DEPTH+1)-1:0]          f7_stack_pointer,
  output logic                                   f7_stack_overflow,
  output logic                                   f7_stack_full,
  // reconfigurable machine
  input  logic [R_L-1:0]                         r_x,
  output logic [R_N-1:0]                         r_y,
  output logic [R_SW-1:0]                        r_state_code,
  output logic [$clog2(R_DEPTH+1)-1:0]           r_stack_pointer,
  output logic                                   r_stack_overflow,
  output logic                                   r_stack_full,
  input  logic                                   r_cfg_we,
  input  cfg_target_e                            r_cfg_target,
  input  logic [(R_G > 1 ? $clog2(R_G) : 1)-1:0] r_cfg_block,
  input  logic [(R_K > 1 ? $clog2(R_K) : 1)-1:0] r_cfg_k,
  input  logic [R_SW+R_K:0]                      r_cfg_addr,
  input  logic [((R_N+1 > 2*R_SW+2) ? R_N+1 : 2*R_SW+2)-1:0] r_cfg_data,
  // reconfigurable machine with one circuit per module
  input  logic [M_L-1:0]                         m_x,
  output logic [M_N-1:0]                         m_y,
  output logic [(M_Q > 1 ? $clog2(M_Q) : 1)+M_SSW-1:0] m_state_code,
  output logic [$clog2(M_DEPTH+1)-1:0]           m_stack_pointer,
  output logic                                   m_stack_overflow,
  output logic                                   m_stack_full,
  input  logic                                   m_cfg_we,
  input  logic [(M_Q > 1 ? $clog2(M_Q) : 1)-1:0] m_cfg_module,
  input  cfg_target_e                            m_cfg_target,
  input  logic [(M_G > 1 ? $clog2(M_G) : 1)-1:0] m_cfg_block,
  input  logic [(M_K > 1 ? $clog2(M_K) : 1)-1:0] m_cfg_k,
  input  logic [M_SSW+M_K:0]                     m_cfg_addr,
  input  logic [((M_N+1 > 2*((M_Q > 1 ? $clog2(M_Q) : 1)+M_SSW)+2) ? M_N+1 : 2*((M_Q > 1 ? $clog2(M_Q) : 1)+M_SSW)+2)-1:0] m_cfg_data
);
  gcd_hfsm #(.W(GCD_W), .DEPTH(GCD_DEPTH), .SPLIT(GCD_SPLIT)) u_gcd (
    .clk, .rst_n,
    .in_valid(gcd_in_valid), .in_ready(gcd_in_ready),
    .in_a(gcd_in_a), .in_b(gcd_in_b),
    .out_valid(gcd_out_valid), .out_ready(gcd_out_ready), .out_gcd(gcd_out),
    .y1(gcd_y1), .stack_overflow(gcd_stack_overflow), .stack_full(gcd_stack_full),
    .stack_pointer(gcd_stack_pointer), .state_code(gcd_state_code)
  );

  fig7_hfsm #(.SPLIT(F7_SPLIT), .DEPTH(F7_DEPTH)) u_fig7 (
    .clk, .rst_n, .x(f7_x), .y(f7_y), .state_code(f7_state_code),
    .stack_pointer(f7_stack_pointer), .stack_overflow(f7_stack_overflow),
    .stack_full(f7_stack_full)
  );

  rhfsm #(.SW(R_SW), .L(R_L), .K(R_K), .N(R_N), .G(R_G), .DEPTH(R_DEPTH)) u_rhfsm (
    .clk, .rst_n, .x(r_x), .y(r_y), .state_code(r_state_code),
    .stack_pointer(r_stack_pointer), .stack_overflow(r_stack_overflow), .stack_full(r_stack_full),
    .cfg_we(r_cfg_we), .cfg_target(r_cfg_target), .cfg_block(r_cfg_block),
    .cfg_k(r_cfg_k), .cfg_addr(r_cfg_addr), .cfg_data(r_cfg_data)
  );

  rhfsm_modular #(.Q(M_Q), .SSW(M_SSW), .L(M_L), .K(M_K), .N(M_N), .G(M_G),
                  .DEPTH(M_DEPTH)) u_rhfsm_modular (
    .clk, .rst_n, .x(m_x), .y(m_y), .state_code(m_state_code),
    .stack_pointer(m_stack_pointer), .stack_overflow(m_stack_overflow), .stack_full(m_stack_full),
    .cfg_we(m_cfg_we), .cfg_module(m_cfg_module), .cfg_target(m_cfg_target),
    .cfg_block(m_cfg_block), .cfg_k(m_cfg_k), .cfg_addr(m_cfg_addr), .cfg_data(m_cfg_data)
  );
endmodule
