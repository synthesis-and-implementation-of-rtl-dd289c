// gcd_datapath - registers and arithmetic used by the GCD HFSM.
//
// Data_A and Data_B are the arguments of module z2 (set from the input pair
// by z1 and rewritten before each recursive call of z2), A and B are the
// working copies, R is the result of z4 (A % B) and `result` the GCD. Each
// register changes only when the control bundle from the combinational
// circuit asks for it; all act on the rising clock edge and are cleared by the
// active-low synchronous reset. The status bundle gives the conditions the
// circuit tests. The width W is this design's own choice.
module gcd_datapath
  import gcd_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  dp_ctrl_t     ctrl,
  input  logic [W-1:0] in_a,
  input  logic [W-1:0] in_b,
  output dp_status_t   st,
  output logic [W-1:0] result
);
  logic [W-1:0] data_a, data_b, a, b, r;
  logic [W-1:0] diff;

  assign diff = a - b;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_a <= '0; data_b <= '0;
      a      <= '0; b      <= '0;
      r      <= '0; result <= '0;
    end else begin
      if (ctrl.ld_in)     begin data_a <= in_a; data_b <= in_b; end
      if (ctrl.ld_ab)     begin a <= data_a;    b <= data_b;    end
      if (ctrl.swap_args) begin data_a <= b;    data_b <= a;    end
      if (ctrl.rec_args)  begin data_a <= b;    data_b <= r;    end
      if (ctrl.sub)       begin a <= diff;      r <= diff;      end
      if (ctrl.ld_result) result <= a;
    end
  end

  assign st.data_b_gt_a = (data_b > data_a);
  assign st.data_b_zero = (data_b == '0);
  assign st.a_ge_b      = (a >= b);
  assign st.gcd_is_one  = (result == W'(1));
endmodule
