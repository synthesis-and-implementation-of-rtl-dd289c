// tb_rhfsm_modular - self-checking testbench of the reconfigurable HFSM with
// one circuit per module.
//
// Loads the four-module example (split codes) module by module and runs it in
// lock step with the hard-wired split-code version on the same random
// conditions, checking outputs, state codes and stack pointers every cycle.
// Then, while the machine keeps running, reloads only module z3 with a
// variant whose state a2 raises y3 instead of y2. During the reload the
// outputs of z3/a2 may be either; after it, they must be those of the
// variant while everything else still matches the hard-wired machine. The
// test counts the cycles run during the reload and the visits of the changed
// state after it.
module tb_rhfsm_modular;
  import rcc_pkg::*;
  localparam int CYCLES = 30000;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  logic one_module = 1'b0, variant = 1'b0;
  logic [5:1] x = '0;
  logic [6:0] r_y;
  logic [7:1] y_ref;
  logic [4:0] code_r, code_ref, sp_r, sp_ref;
  logic ovf_r, ovf_ref;
  logic cfg_we;
  logic [1:0] cfg_module;
  cfg_target_e cfg_target;
  logic [0:0] cfg_block, cfg_k;
  logic [7:0] cfg_addr;
  logic [11:0] cfg_data;
  int checks = 0, failures = 0;
  int n_during = 0, n_variant = 0, n_z3 = 0, n_push = 0, n_pop = 0;

  rhfsm_modular dut (
    .clk, .rst_n, .x, .y(r_y), .state_code(code_r), .stack_pointer(sp_r),
    .stack_overflow(ovf_r), .stack_full(full_r), .cfg_we, .cfg_module, .cfg_target, .cfg_block, .cfg_k,
    .cfg_addr(cfg_addr[5:0]), .cfg_data
  );
  fig7_hfsm #(.SPLIT(1'b1)) ref_split (
    .clk, .rst_n, .x, .y(y_ref), .state_code(code_ref), .stack_pointer(sp_ref),
    .stack_overflow(ovf_ref), .stack_full(full_ref));
  fig7_cfg_loader #(.MODULAR(1'b1)) u_loader (
    .clk, .start, .split(1'b1), .one_module, .module_sel(2'd3), .variant, .done,
    .cfg_we, .cfg_module, .cfg_target, .cfg_block, .cfg_k, .cfg_addr, .cfg_data
  );

  // The stack-full flag must agree with the stack pointer on every cycle.
  logic full_r, full_ref;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if ((full_r !== (int'(sp_r) == 16)) ||
        (full_ref !== (int'(sp_ref) == 16))) begin
      failures++;
      $display("FAIL stack_full disagrees with stack_pointer");
    end
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(input int phase);
    logic [7:1] ye;
    logic [4:0] prev_sp;
    ye = y_ref;
    if (phase == 2 && code_ref == 5'd26) begin ye[2] = 1'b0; ye[3] = 1'b1; n_variant++; end
    if (!(phase == 1 && code_ref == 5'd26))
      check({r_y, 1'b0} == {ye, 1'b0}, $sformatf("phase %0d y %b exp %b code %0d", phase, r_y, ye, code_ref));
    check(code_r == code_ref, $sformatf("phase %0d code %0d exp %0d", phase, code_r, code_ref));
    check(sp_r == sp_ref, "stack pointer");
    if (code_ref[4:3] == 2'd3) n_z3++;
    if (phase == 1) n_during++;
    prev_sp = sp_r;
    @(posedge clk); #1;
    if (sp_r > prev_sp) n_push++;
    if (sp_r < prev_sp) n_pop++;
    x = 5'($urandom);
    if (sp_r >= 5'd8) begin x[5] = 1'b0; x[4] = 1'b1; end
  endtask

  initial begin
    @(posedge clk); #1 start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    wait (done);
    @(posedge clk); #1 rst_n = 1'b1;
    for (int i = 0; i < CYCLES; i++) step(0);
    // Reload z3 only, with the variant, while the machine runs.
    one_module = 1'b1; variant = 1'b1; start = 1'b1;
    step(1);
    start = 1'b0;
    while (done) step(1);
    while (!done) step(1);
    for (int i = 0; i < CYCLES; i++) step(2);
    check(!ovf_r, "no overflow");
    check(n_push > 100 && n_pop > 100, "calls and returns happened");
    check(n_z3 > 0, "module z3 ran");
    check(n_during > 50, "machine ran during the reload of z3");
    check(n_variant > 0, "reloaded z3/a2 was visited");
    $display("during=%0d variant=%0d z3=%0d push=%0d pop=%0d", n_during, n_variant, n_z3, n_push, n_pop);
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
