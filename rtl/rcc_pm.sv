// rcc_pm - programmable multiplexer (PM) of the RAM-based combinational
// circuit.
//
// A state usually tests only a few of the L logic conditions x0..x(L-1). The
// PM replaces them by K variables p0..p(K-1): for every variable pk there is
// a small RAM, addressed by the state code, that holds the index of the input
// to route to pk, and a multiplexer that does the routing. The state
// transition RAM that follows is then addressed by the state code and the K
// variables instead of all L inputs.
//
// Timing: reads are combinational (state -> p); writes are synchronous:
// with `cfg_we` high, word `cfg_addr` of the RAM of variable `cfg_k` takes
// `cfg_sel` on the rising clock edge. The RAMs are not reset; they must be
// written before use. Asynchronous-read RAMs are this design's choice for the
// RAM blocks, so that a transition still takes one clock cycle.
module rcc_pm #(
  parameter int unsigned SW = 5,  // state code width
  parameter int unsigned L  = 5,  // number of logic conditions
  parameter int unsigned K  = 2   // number of variables p
) (
  input  logic                              clk,
  input  logic                              cfg_we,
  input  logic [(K > 1 ? $clog2(K) : 1)-1:0] cfg_k,
  input  logic [SW-1:0]                     cfg_addr,
  input  logic [(L > 1 ? $clog2(L) : 1)-1:0] cfg_sel,
  input  logic [SW-1:0]                     state,
  input  logic [L-1:0]                      x,
  output logic [K-1:0]                      p
);
  localparam int unsigned LW = (L > 1) ? $clog2(L) : 1;

  logic [LW-1:0] sel_ram [K][2**SW];

  always_ff @(posedge clk) begin
    if (cfg_we) sel_ram[cfg_k][cfg_addr] <= cfg_sel;
  end

  always_comb begin
    for (int k = 0; k < K; k++) begin
      logic [LW-1:0] s;
      s = sel_ram[k][state];
      p[k] = (int'(s) < L) ? x[s] : 1'b0;
    end
  end
endmodule
