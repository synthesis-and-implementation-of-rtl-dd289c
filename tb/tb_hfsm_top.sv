// tb_hfsm_top - end-to-end testbench of the three HFSMs at their default
// sizes (no parameter overrides).
//
// Three streams run at once after reset:
//   * GCD machine: a set of pairs, corner cases and random ones; each GCD
//     other than 1 must come out with the right value C(z2) + 3 cycles after
//     the pair is accepted; coprime pairs must give no output.
//   * Both reconfigurable machines: loaded with the four-module example
//     (the per-module one with {module, state} codes), then run in lock step
//     with the hard-wired four-module machine on the same random conditions;
//     outputs, state codes (after translation between the encodings) and
//     stack pointers must agree every cycle.
// Mechanisms counted (each must happen at least once): GCD output through z3,
// coprime pair, swapping recursive call of z2, recursion depth >= 10 in the
// GCD machine, every branch of the z0 selector, calls and returns, recursive
// call of z1, and the conditional return out of z1/a4 of the example.
module tb_hfsm_top;
  import rcc_pkg::*;
  localparam int NPAIRS = 150;
  localparam int F7_CYCLES = 30000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic gcd_in_valid = 1'b0, gcd_in_ready, gcd_out_valid, gcd_out_ready = 1'b0;
  logic [15:0] gcd_in_a = '0, gcd_in_b = '0, gcd_out;
  logic gcd_y1, gcd_ovf;
  logic [5:0] gcd_sp, gcd_code;
  logic [5:1] f7_x = '0;
  logic [7:1] f7_y;
  logic [4:0] f7_code, f7_sp;
  logic f7_ovf;
  logic [4:0] r_x, r_code, r_sp;
  logic [6:0] r_y;
  logic r_ovf;
  logic [6:0] m_y;
  logic [4:0] m_code, m_sp;
  logic m_ovf, m_done, m_cfg_we;
  logic [1:0] m_cfg_module;
  cfg_target_e m_cfg_target;
  logic [0:0] m_cfg_block, m_cfg_k;
  logic [7:0] m_cfg_addr;
  logic [11:0] m_cfg_data;
  logic start = 1'b0, done;
  logic cfg_we;
  cfg_target_e cfg_target;
  logic [0:0] cfg_block, cfg_k;
  logic [7:0] cfg_addr;
  logic [11:0] cfg_data;
  int checks = 0, failures = 0, cycle = 0;
  int m_out = 0, m_coprime = 0, m_swap = 0, m_gcd_depth = 0;
  int m_sel[4] = '{0, 0, 0, 0};
  int m_call = 0, m_ret = 0, m_rec = 0, m_cond_ret = 0;
  bit f7_running = 1'b0;

  assign r_x = f7_x;

  hfsm_top dut (
    .clk, .rst_n,
    .gcd_in_valid, .gcd_in_ready, .gcd_in_a, .gcd_in_b,
    .gcd_out_valid, .gcd_out_ready, .gcd_out, .gcd_y1,
    .gcd_stack_overflow(gcd_ovf), .gcd_stack_full(gcd_full), .gcd_stack_pointer(gcd_sp), .gcd_state_code(gcd_code),
    .f7_x, .f7_y, .f7_state_code(f7_code), .f7_stack_pointer(f7_sp), .f7_stack_overflow(f7_ovf), .f7_stack_full(f7_full),
    .r_x, .r_y, .r_state_code(r_code), .r_stack_pointer(r_sp), .r_stack_overflow(r_ovf), .r_stack_full(r_full),
    .r_cfg_we(cfg_we), .r_cfg_target(cfg_target), .r_cfg_block(cfg_block),
    .r_cfg_k(cfg_k), .r_cfg_addr(cfg_addr), .r_cfg_data(cfg_data),
    .m_x(f7_x), .m_y, .m_state_code(m_code), .m_stack_pointer(m_sp), .m_stack_overflow(m_ovf), .m_stack_full(m_full),
    .m_cfg_we, .m_cfg_module, .m_cfg_target, .m_cfg_block, .m_cfg_k,
    .m_cfg_addr(m_cfg_addr[5:0]), .m_cfg_data
  );

  fig7_cfg_loader #(.MODULAR(1'b1)) u_mloader (
    .clk, .start, .split(1'b1), .one_module(1'b0), .module_sel(2'd0), .variant(1'b0),
    .done(m_done), .cfg_we(m_cfg_we), .cfg_module(m_cfg_module), .cfg_target(m_cfg_target),
    .cfg_block(m_cfg_block), .cfg_k(m_cfg_k), .cfg_addr(m_cfg_addr), .cfg_data(m_cfg_data)
  );

  // {module, state} code of a flat state number of the example.
  function automatic logic [4:0] split_code(logic [4:0] s);
    if (s < 8)       return s;
    else if (s < 14) return 5'd8 + (s - 5'd8);
    else if (s < 19) return 5'd16 + (s - 5'd14);
    else             return 5'd24 + (s - 5'd19);
  endfunction

  fig7_cfg_loader u_loader (
    .clk, .start, .one_module(1'b0), .module_sel(2'd0), .variant(1'b0), .cfg_module(), .split(1'b0), .done, .cfg_we, .cfg_target, .cfg_block, .cfg_k, .cfg_addr, .cfg_data
  );

  // The stack-full flag must agree with the stack pointer on every cycle.
  logic gcd_full, f7_full, r_full, m_full;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if ((gcd_full !== (int'(gcd_sp) == 32)) ||
        (f7_full !== (int'(f7_sp) == 16)) ||
        (r_full !== (int'(r_sp) == 16)) ||
        (m_full !== (int'(m_sp) == 16))) begin
      failures++;
      $display("FAIL stack_full disagrees with stack_pointer");
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (int'(gcd_sp) > m_gcd_depth) m_gcd_depth <= int'(gcd_sp);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int unsigned ref_gcd(int unsigned a, int unsigned b);
    return (b == 0) ? a : ref_gcd(b, a % b);
  endfunction

  function automatic int z2_cycles(int unsigned a, int unsigned b);
    if (b > a)       return 3 + z2_cycles(b, a);
    else if (b == 0) return 3;
    else             return 4 + 2 * int'(a / b) + 2 + z2_cycles(b, a % b);
  endfunction

  task automatic gcd_pair(input logic [15:0] a, input logic [15:0] b);
    int unsigned g;
    int t_acc, t;
    g = ref_gcd(32'(a), 32'(b));
    if (b > a) m_swap++;
    gcd_in_a = a; gcd_in_b = b; gcd_in_valid = 1'b1;
    do @(posedge clk); while (!gcd_in_ready);
    #1 t_acc = cycle;
    gcd_in_valid = 1'b0;
    if (g == 1) begin
      m_coprime++;
      t = 0;
      while (!gcd_in_ready && t < 400000) begin
        @(posedge clk); #1; t++;
        check(!gcd_out_valid, "no output for a coprime pair");
      end
    end else begin
      t = 0;
      while (!gcd_out_valid && t < 400000) begin @(posedge clk); #1; t++; end
      check(gcd_out == 16'(g), $sformatf("gcd(%0d,%0d) got %0d exp %0d", a, b, gcd_out, g));
      check(cycle - t_acc == z2_cycles(32'(a), 32'(b)) + 3, $sformatf("latency gcd(%0d,%0d)", a, b));
      gcd_out_ready = 1'b1; @(posedge clk); #1; gcd_out_ready = 1'b0;
      m_out++;
    end
  endtask

  task automatic gcd_stream();
    gcd_pair(16'd46368, 16'd28657);
    gcd_pair(16'd24, 16'd36);
    gcd_pair(16'd17, 16'd5);
    gcd_pair(16'd0, 16'd7);
    for (int i = 0; i < NPAIRS; i++) begin
      logic [15:0] k;
      k = 16'($urandom_range(1, 40));
      gcd_pair(16'($urandom_range(0, 1500)) * k, 16'($urandom_range(0, 1500)) * k);
    end
  endtask

  task automatic f7_stream();
    logic [4:0] prev_sp = '0, prev_code = '0;
    for (int i = 0; i < F7_CYCLES; i++) begin
      check({r_y, 1'b0} == {f7_y, 1'b0}, $sformatf("cycle %0d reconfigurable y", i));
      check(r_code == f7_code, $sformatf("cycle %0d reconfigurable state", i));
      check(r_sp == f7_sp, $sformatf("cycle %0d reconfigurable stack", i));
      check({m_y, 1'b0} == {f7_y, 1'b0}, $sformatf("cycle %0d per-module y", i));
      check(m_code == split_code(f7_code), $sformatf("cycle %0d per-module state", i));
      check(m_sp == f7_sp, $sformatf("cycle %0d per-module stack", i));
      if (f7_code == 5'd1) m_sel[{f7_x[1], f7_x[2]}]++;
      if (f7_sp > prev_sp) m_call++;
      if (f7_sp < prev_sp) m_ret++;
      if (f7_code == 5'd8 && prev_code == 5'd10) m_rec++;
      if (f7_code == 5'd9 && f7_sp < prev_sp) m_cond_ret++;
      prev_sp = f7_sp; prev_code = f7_code;
      @(posedge clk); #1;
      f7_x = 5'($urandom);
      if (f7_sp >= 5'd8) begin f7_x[5] = 1'b0; f7_x[4] = 1'b1; end
    end
  endtask

  initial begin
    @(posedge clk); #1 start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    wait (done && m_done);
    @(posedge clk); #1 rst_n = 1'b1;
    fork
      gcd_stream();
      f7_stream();
    join
    check(!gcd_ovf && !f7_ovf && !r_ovf && !m_ovf, "no stack overflow");
    check(m_out > 0, "mechanism: GCD output through z3");
    check(m_coprime > 0, "mechanism: coprime pair skipped");
    check(m_swap > 0, "mechanism: swapping recursive call of z2");
    check(m_gcd_depth >= 10, "mechanism: deep GCD recursion");
    for (int k = 0; k < 4; k++) check(m_sel[k] > 0, $sformatf("mechanism: z0 selector branch %0d", k));
    check(m_call > 0 && m_ret > 0, "mechanism: calls and returns");
    check(m_rec > 0, "mechanism: recursive call of z1");
    check(m_cond_ret > 0, "mechanism: conditional return in z1");
    $display("gcd: out=%0d coprime=%0d swap=%0d depth=%0d; f7: sel=%0d/%0d/%0d/%0d call=%0d ret=%0d rec=%0d condret=%0d",
             m_out, m_coprime, m_swap, m_gcd_depth, m_sel[0], m_sel[1], m_sel[2], m_sel[3],
             m_call, m_ret, m_rec, m_cond_ret);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
