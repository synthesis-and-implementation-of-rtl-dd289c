// tb_rhfsm - self-checking testbench of the reconfigurable HFSM.
//
// Loads the four-module example into the RAMs (flat codes), runs it from
// reset next to the hard-wired version of the same example on the same random
// conditions and checks, every cycle, the outputs, the state code and the
// stack pointer. Then reconfigures the same circuit with the {module, state}
// encoding and repeats the comparison against the hard-wired split-code
// version. The recursion is held below the stack depth by forcing x5 = 0 and
// x4 = 1 when the stack is deep. Coverage counts calls, returns, the
// conditional return and the depth reached in each configuration.
module tb_rhfsm;
  import rcc_pkg::*;
  localparam int CYCLES = 40000;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, split = 1'b0, done;
  logic [5:1] x = '0;
  logic [4:0] r_x;
  logic [6:0] r_y;
  logic [7:1] y_flat, y_split;
  logic [4:0] code_r, code_flat, code_split;
  logic [4:0] sp_r, sp_flat, sp_split;
  logic ovf_r, ovf_flat, ovf_split;
  logic cfg_we;
  cfg_target_e cfg_target;
  logic [0:0] cfg_block, cfg_k;
  logic [7:0] cfg_addr;
  logic [11:0] cfg_data;
  int checks = 0, failures = 0;

  assign r_x = {x[5], x[4], x[3], x[2], x[1]};

  rhfsm dut (
    .clk, .rst_n, .x(r_x), .y(r_y), .state_code(code_r), .stack_pointer(sp_r),
    .stack_overflow(ovf_r), .stack_full(full_r), .cfg_we, .cfg_target, .cfg_block, .cfg_k, .cfg_addr, .cfg_data
  );
  fig7_hfsm #(.SPLIT(1'b0)) ref_flat (
    .clk, .rst_n, .x, .y(y_flat), .state_code(code_flat), .stack_pointer(sp_flat),
    .stack_overflow(ovf_flat), .stack_full(full_flat));
  fig7_hfsm #(.SPLIT(1'b1)) ref_split (
    .clk, .rst_n, .x, .y(y_split), .state_code(code_split), .stack_pointer(sp_split),
    .stack_overflow(ovf_split), .stack_full(full_split));
  fig7_cfg_loader u_loader (
    .clk, .start, .one_module(1'b0), .module_sel(2'd0), .variant(1'b0), .cfg_module(), .split, .done, .cfg_we, .cfg_target, .cfg_block, .cfg_k, .cfg_addr, .cfg_data
  );

  // The stack-full flag must agree with the stack pointer on every cycle.
  logic full_r, full_flat, full_split;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if ((full_r !== (int'(sp_r) == 16)) ||
        (full_flat !== (int'(sp_flat) == 16)) ||
        (full_split !== (int'(sp_split) == 16))) begin
      failures++;
      $display("FAIL stack_full disagrees with stack_pointer");
    end
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input bit sp_mode);
    int n_push = 0, n_pop = 0, max_sp = 0, n_loop = 0;
    logic [4:0] prev_sp = '0;
    rst_n = 1'b0; split = sp_mode;
    @(posedge clk); #1 start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    wait (done);
    @(posedge clk); #1 rst_n = 1'b1;
    for (int i = 0; i < CYCLES; i++) begin
      logic [7:1] ye;
      logic [4:0] ce, se;
      ye = sp_mode ? y_split : y_flat;
      ce = sp_mode ? code_split : code_flat;
      se = sp_mode ? sp_split : sp_flat;
      check({r_y, 1'b0} == {ye, 1'b0}, $sformatf("cycle %0d y %b exp %b", i, r_y, ye));
      check(code_r == ce, $sformatf("cycle %0d code %0d exp %0d", i, code_r, ce));
      check(sp_r == se, $sformatf("cycle %0d sp %0d exp %0d", i, sp_r, se));
      if (sp_r > prev_sp) n_push++;
      if (sp_r < prev_sp) n_pop++;
      if (int'(sp_r) > max_sp) max_sp = int'(sp_r);
      // z1/a4 returning to z1/a1 (x4 = 0): flat codes 12 -> 9
      if (!sp_mode && code_flat == 5'd9 && prev_sp > sp_r) n_loop++;
      prev_sp = sp_r;
      @(posedge clk); #1;
      x = 5'($urandom);
      if (sp_r >= 5'd8) begin x[5] = 1'b0; x[4] = 1'b1; end
    end
    check(!ovf_r, "no overflow");
    check(n_push > 100 && n_pop > 100, "calls and returns happened");
    check(max_sp >= 5, "recursion reached depth 5");
    if (!sp_mode) check(n_loop > 0, "conditional return to z1/a1 happened");
    $display("split=%0d pushes=%0d pops=%0d max_sp=%0d loop_returns=%0d", sp_mode, n_push, n_pop, max_sp, n_loop);
  endtask

  initial begin
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
