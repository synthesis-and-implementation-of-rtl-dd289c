// rcc_stram - state transition RAM (STRAM) of the RAM-based combinational
// circuit.
//
// The RAM is addressed by {ret, state code, p0 .. p(K-1)}, p0 being the most
// significant of the p bits. Each word holds the transition for that state
// and that combination of the variables:
//   valid  - this RAM block holds the transition (blocks are OR-ed),
//   push   - the transition is a hierarchical call,
//   next   - the next state code (the Begin state of the callee on a call),
//   rstate - the return code to push on a call.
// The `ret` address bit selects a second set of words, used in the cycle of
// a hierarchical return, when the state code is that of the calling state
// from the top of the stack: those words hold the transitions out of the
// calling state after the called module has finished.
//
// Reads are combinational; with `cfg_we` high, word `cfg_addr` takes
// `cfg_data` on the rising clock edge. The RAM is not reset. CW, the width of
// the stored codes, equals SW except when a module's RAM is addressed by the
// state code within the module but must name states of other modules. The `valid`,
// `push`, `rstate` fields and the `ret` address bit are this design's own
// additions to the {state, p} -> next state table.
module rcc_stram #(
  parameter int unsigned SW = 5,   // state code width (address)
  parameter int unsigned K  = 2,
  parameter int unsigned CW = SW   // width of the codes stored in a word
) (
  input  logic                 clk,
  input  logic                 cfg_we,
  input  logic [SW+K:0]        cfg_addr,
  input  logic [2*CW+1:0]      cfg_data,  // {valid, push, next, rstate}
  input  logic                 ret,
  input  logic [SW-1:0]        state,
  input  logic [K-1:0]         p,         // p[0] is p0
  output logic                 valid,
  output logic                 push,
  output logic [CW-1:0]        next,
  output logic [CW-1:0]        rstate
);
  localparam int unsigned AW = SW + K + 1;
  localparam int unsigned DW = 2 * CW + 2;

  logic [DW-1:0] ram [2**AW];
  logic [K-1:0]  p_msb_first;
  logic [AW-1:0] addr;

  always_comb begin
    for (int k = 0; k < K; k++) p_msb_first[K-1-k] = p[k];
  end

  assign addr = {ret, state, p_msb_first};

  always_ff @(posedge clk) begin
    if (cfg_we) ram[cfg_addr] <= cfg_data;
  end

  assign {valid, push, next, rstate} = ram[addr];
endmodule
