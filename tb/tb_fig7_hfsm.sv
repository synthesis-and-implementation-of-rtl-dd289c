// tb_fig7_hfsm - self-checking testbench of the four-module example HFSM.
//
// Two copies of the HFSM, one per state encoding, receive the same random
// conditions x1..x5. A reference model written as recursive tasks (one per
// module, a hierarchical call being a task call) walks the flow charts one
// clock cycle per state and checks, in every cycle, the outputs y1..y7 of
// both copies and their stack pointers against the model's call depth. The
// model spends exactly one cycle in the End state of a called module and then
// continues from the successor of the calling state, so the zero-delay return
// is checked cycle by cycle. The recursion of z1 is held below the stack
// depth by forcing x5 to 0 and x4 to 1 when the model is deep. Coverage counters make
// sure that every branch of the {x1,x2} selector, the recursive call, the
// conditional return of z1 and every module call happened.
module tb_fig7_hfsm;
  localparam int unsigned DEPTH = 16;
  localparam int ITER = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [5:1] x = '0;
  logic [7:1] y_flat, y_split;
  logic [4:0] code_flat, code_split;
  logic [$clog2(DEPTH+1)-1:0] sp_flat, sp_split;
  logic ovf_flat, ovf_split;
  int checks = 0, failures = 0, depth = 0, max_depth = 0;
  int cov_sel[4] = '{0, 0, 0, 0};
  int n_call[4] = '{0, 0, 0, 0};
  int n_rec = 0, n_loop_ret = 0;

  fig7_hfsm #(.SPLIT(1'b0), .DEPTH(DEPTH)) dut_flat (
    .clk, .rst_n, .x, .y(y_flat), .state_code(code_flat),
    .stack_pointer(sp_flat), .stack_overflow(ovf_flat), .stack_full(full_flat));
  fig7_hfsm #(.SPLIT(1'b1), .DEPTH(DEPTH)) dut_split (
    .clk, .rst_n, .x, .y(y_split), .state_code(code_split),
    .stack_pointer(sp_split), .stack_overflow(ovf_split), .stack_full(full_split));

  // The stack-full flag must agree with the stack pointer on every cycle.
  logic full_flat, full_split;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if ((full_flat !== (int'(sp_flat) == DEPTH)) ||
        (full_split !== (int'(sp_split) == DEPTH))) begin
      failures++;
      $display("FAIL stack_full disagrees with stack_pointer");
    end
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [7:1] ys(input int a, input int b = 0, input int c = 0);
    logic [7:1] v = '0;
    if (a != 0) v[a] = 1'b1;
    if (b != 0) v[b] = 1'b1;
    if (c != 0) v[c] = 1'b1;
    return v;
  endfunction

  // One state = one cycle: check outputs, return the inputs of this cycle,
  // advance the clock and draw new inputs.
  task automatic cycle(input logic [7:1] yexp, input string st, output logic [5:1] xs);
    check(y_flat == yexp, $sformatf("%s flat y=%b exp %b", st, y_flat, yexp));
    check(y_split == yexp, $sformatf("%s split y=%b exp %b", st, y_split, yexp));
    check(int'(sp_flat) == depth && int'(sp_split) == depth,
          $sformatf("%s sp %0d/%0d exp %0d", st, sp_flat, sp_split, depth));
    xs = x;
    @(posedge clk); #1;
    x = 5'($urandom);
    if (depth >= 8) begin x[5] = 1'b0; x[4] = 1'b1; end
  endtask

  task automatic call(input int m, output logic [5:1] xe);
    n_call[m]++;
    depth++;
    if (depth > max_depth) max_depth = depth;
    case (m)
      1: z1(xe);
      2: z2(xe);
      default: z3(xe);
    endcase
    depth--;
  endtask

  task automatic z3(output logic [5:1] xe);
    logic [5:1] xs;
    cycle('0, "z3.a0", xs);
    if (!xs[1]) cycle(ys(4, 5, 7), "z3.a1", xs);
    else begin
      cycle(ys(2), "z3.a2", xs);
      cycle(ys(1), "z3.a3", xs);
    end
    cycle('0, "z3.a4", xe);
  endtask

  task automatic z2(output logic [5:1] xe);
    logic [5:1] xs;
    cycle('0, "z2.a0", xs);
    if (xs[2] && xs[3]) begin
      cycle('0, "z2.a2", xs);
      call(3, xs);
    end else begin
      if (!xs[2]) cycle(ys(2, 7), "z2.a1", xs);
      cycle(ys(3, 5), "z2.a3", xs);
    end
    cycle('0, "z2.a4", xe);
  endtask

  task automatic z1(output logic [5:1] xe);
    logic [5:1] xs;
    bit done = 1'b0;
    cycle('0, "z1.a0", xs);
    if (xs[5]) begin
      // a1 .. a4 loop while the return from z2 sees x4 = 0
      while (!done) begin
        cycle(ys(5), "z1.a1", xs);
        cycle('0, "z1.a2", xs);
        n_rec++;
        call(1, xs);
        cycle(ys(6), "z1.a3", xs);
        cycle('0, "z1.a4", xs);
        call(2, xs);
        if (xs[4]) done = 1'b1; else n_loop_ret++;
      end
    end else begin
      cycle('0, "z1.a4", xs);
      call(2, xs);
      while (!xs[4]) begin
        n_loop_ret++;
        cycle(ys(5), "z1.a1", xs);
        cycle('0, "z1.a2", xs);
        n_rec++;
        call(1, xs);
        cycle(ys(6), "z1.a3", xs);
        cycle('0, "z1.a4", xs);
        call(2, xs);
      end
    end
    cycle('0, "z1.a5", xe);
  endtask

  task automatic z0_once();
    logic [5:1] xs;
    cycle('0, "z0.a0", xs);
    do begin
      cycle(ys(1, 4), "z0.a1", xs);
      cov_sel[{xs[1], xs[2]}]++;
    end while (xs[1] && xs[2]);
    unique case ({xs[1], xs[2]})
      2'b00: begin
        cycle(ys(2), "z0.a2", xs);
        cycle('0, "z0.a4", xs);
        depth++;
        z2(xs);
        n_call[2]++;
        depth--;
        cycle(ys(1, 2, 3), "z0.a5", xs);
      end
      2'b01, 2'b10: begin
        if (xs[2]) cycle(ys(2, 3), "z0.a6", xs);
        else       cycle(ys(3), "z0.a3", xs);
        cycle('0, "z0.a7", xs);
        call(1, xs);
      end
      default: ;
    endcase
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    x = 5'($urandom);
    for (int i = 0; i < ITER; i++) z0_once();
    check(!ovf_flat && !ovf_split, "no stack overflow");
    for (int k = 0; k < 4; k++) check(cov_sel[k] > 0, $sformatf("z0 selector branch %0d reached", k));
    for (int k = 1; k < 4; k++) check(n_call[k] > 0, $sformatf("call of z%0d reached", k));
    check(n_rec > 0, "recursive call of z1 reached");
    check(n_loop_ret > 0, "conditional return (x4 = 0) in z1 reached");
    check(max_depth >= 5, "recursion depth of at least 5 reached");
    $display("sel=%0d/%0d/%0d/%0d calls z1=%0d z2=%0d z3=%0d rec=%0d loopret=%0d maxdepth=%0d",
             cov_sel[0], cov_sel[1], cov_sel[2], cov_sel[3], n_call[1], n_call[2], n_call[3],
             n_rec, n_loop_ret, max_depth);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
