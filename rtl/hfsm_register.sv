// hfsm_register - the state Register of an HFSM.
//
// Holds the code of the current state. In the model with implicit modules
// every state has a code of its own and the register holds just that code; in
// the split model the code is the pair {module code, state code within the
// module}, packed here into one W-bit word by the caller. On every rising
// clock edge the register takes the next code chosen by the combinational
// circuit, which is an ordinary transition, the first state of a called
// module, or the transition out of the calling state on a return.
//
// `rst_n` is an active-low synchronous reset to RESET_CODE, the code of the
// Begin state of the main module z0 (state a0). The reset style is this
// design's own choice.
module hfsm_register #(
  parameter int unsigned    W          = 6,
  parameter logic [W-1:0]   RESET_CODE = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] next_code,
  output logic [W-1:0] code
);
  always_ff @(posedge clk) begin
    if (!rst_n) code <= RESET_CODE;
    else        code <= next_code;
  end
endmodule
