// hfsm_stack - return stack of a hierarchical finite state machine (HFSM).
//
// A hierarchical call pushes the code of the calling state (and, in the
// split-code model, the calling module) so that the hierarchical return can
// resume the calling module from that state. Because only calling states are
// kept, the words are short and the stack stays small; a single stack serves
// all modules, including recursive ones.
//
// The stack is an array of DEPTH registers addressed by a stack pointer `sp`.
// `top` is always the word at sp-1, the most recent return code, and is read
// combinationally so that the return and the transition out of the calling
// state happen in the same clock cycle.
//
// Interface: `push` writes `push_data` at sp and increments sp; `pop`
// decrements sp. Both act on the rising clock edge. A push and a pop in the
// same cycle are not used by the HFSM and are flagged by an assertion. A push
// onto a full stack is dropped and sets the sticky `overflow` flag; a pop of
// an empty stack is ignored. `rst_n` is an active-low synchronous reset that
// empties the stack. The word width and the depth are this design's own
// choices: the source gives neither.
module hfsm_stack #(
  parameter int unsigned W     = 6,
  parameter int unsigned DEPTH = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic                       pop,
  input  logic [W-1:0]               push_data,
  output logic [W-1:0]               top,
  output logic [$clog2(DEPTH+1)-1:0] sp,
  output logic                       empty,
  output logic                       full,
  output logic                       overflow
);
  localparam int unsigned PW = $clog2(DEPTH+1);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0] mem [DEPTH];

  assign empty = (sp == '0);
  assign full  = (sp == PW'(DEPTH));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sp       <= '0;
      overflow <= 1'b0;
    end else if (push) begin
      if (full) overflow <= 1'b1;
      else begin
        mem[AW'(sp)] <= push_data;
        sp           <= sp + 1'b1;
      end
    end else if (pop && !empty) begin
      sp <= sp - 1'b1;
    end
  end

  // The word below the stack pointer; reads word 0 when the stack is empty.
  always_comb begin
    if (empty) top = mem[0];
    else       top = mem[AW'(sp - 1'b1)];
  end

  always_ff @(posedge clk) begin
    if (rst_n) assert (!(push && pop)) else $error("hfsm_stack: push and pop in one cycle");
  end
endmodule
