// tb_gcd_hfsm - self-checking testbench of the GCD HFSM.
//
// Feeds pairs (fixed corner cases, then random ones) through the valid/ready
// input, and checks that a pair with GCD 1 produces no output, that any other
// pair produces exactly its GCD, that y1 is raised once per output, and that
// the output appears C(z2) + 3 cycles after the pair is accepted. The
// reference GCD and the cycle count C(z2) are computed here by recursive
// functions that follow the module flow charts, independently of the RTL.
// It also checks that the stack is empty after each pair, and random
// out_ready back-pressure exercises the z3 handshake. A second copy with
// the flat encoding (one code per state) runs on the same inputs and must
// match the first copy on every cycle, its state code included after
// translation.
module tb_gcd_hfsm;
  localparam int unsigned W = 16;
  localparam int NPAIRS = 400;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, y1, ovf;
  logic [W-1:0] in_a = '0, in_b = '0, out_gcd;
  logic [5:0] sp;
  logic [5:0] code;
  int checks = 0, failures = 0;
  int cycle = 0;
  int n_outputs = 0, n_coprime = 0, n_swaps = 0, n_y1 = 0, max_sp = 0;

  gcd_hfsm #(.W(W), .DEPTH(32)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_a, .in_b, .out_valid, .out_ready,
    .out_gcd, .y1, .stack_overflow(ovf), .stack_full(full), .stack_pointer(sp), .state_code(code)
  );

  logic in_ready_f, out_valid_f, y1_f, ovf_f;
  logic [W-1:0] out_gcd_f;
  logic [5:0] sp_f;
  logic [gcd_pkg::FLAT_W-1:0] code_f;
  int n_flat_cmp = 0;

  gcd_hfsm #(.W(W), .DEPTH(32), .SPLIT(1'b0)) dut_flat (
    .clk, .rst_n, .in_valid, .in_ready(in_ready_f), .in_a, .in_b,
    .out_valid(out_valid_f), .out_ready, .out_gcd(out_gcd_f), .y1(y1_f),
    .stack_overflow(ovf_f), .stack_full(full_f), .stack_pointer(sp_f), .state_code(code_f)
  );

  // Lock-step comparison of the two encodings, sampled before each edge.
  always @(negedge clk) if (rst_n) begin
    checks++;
    n_flat_cmp++;
    if (in_ready_f !== in_ready || out_valid_f !== out_valid || y1_f !== y1 ||
        ovf_f !== ovf || sp_f !== sp ||
        (out_valid && out_gcd_f !== out_gcd) ||
        code_f !== gcd_pkg::to_flat(gcd_pkg::code_t'(code))) begin
      failures++;
      $display("FAIL flat encoding differs at cycle %0d: code %h flat %0d",
               cycle, code, code_f);
    end
  end

  // The stack-full flag must agree with the stack pointer on every cycle.
  logic full, full_f;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if ((full !== (int'(sp) == 32)) ||
        (full_f !== (int'(sp_f) == 32))) begin
      failures++;
      $display("FAIL stack_full disagrees with stack_pointer");
    end
  end

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (y1) n_y1 <= n_y1 + 1;
    if (int'(sp) > max_sp) max_sp <= int'(sp);
  end

  function automatic int unsigned ref_gcd(int unsigned a, int unsigned b);
    return (b == 0) ? a : ref_gcd(b, a % b);
  endfunction

  // Cycles spent in z4 for A >= B, B > 0: two per subtraction, then a0 and End.
  function automatic int z4_cycles(int unsigned a, int unsigned b);
    return 2 * int'(a / b) + 2;
  endfunction

  // Cycles spent in z2 (and the modules it calls), End state included.
  function automatic int z2_cycles(int unsigned a, int unsigned b);
    if (b > a)       return 1 + 1 + z2_cycles(b, a) + 1;
    else if (b == 0) return 1 + 1 + 1;
    else             return 1 + 1 + z4_cycles(a, b) + 1 + z2_cycles(b, a % b) + 1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_pair(input logic [W-1:0] a, input logic [W-1:0] b);
    int unsigned g;
    int t_acc, expect_lat, t;
    g = ref_gcd(32'(a), 32'(b));
    expect_lat = z2_cycles(32'(a), 32'(b)) + 3;
    if (b > a) n_swaps++;
    in_a = a; in_b = b; in_valid = 1'b1;
    do @(posedge clk); while (!in_ready);
    #1 t_acc = cycle;
    in_valid = 1'b0; in_a = W'($urandom); in_b = W'($urandom);
    if (g == 1) begin
      n_coprime++;
      // Expect the HFSM back in z1 waiting for a pair, with no output.
      t = 0;
      while (!in_ready && t < 400000) begin
        @(posedge clk); #1;
        check(!out_valid, "no output for coprime pair");
        t++;
      end
      check(in_ready, $sformatf("returned to z1 after coprime pair %0d %0d", a, b));
      check(sp == 6'd1, "only z0's frame on the stack while in z1");
    end else begin
      t = 0;
      while (!out_valid && t < 400000) begin @(posedge clk); #1; t++; end
      check(out_valid, "output appears");
      check(cycle - t_acc == expect_lat,
            $sformatf("latency a=%0d b=%0d got %0d expected %0d", a, b, cycle - t_acc, expect_lat));
      check(out_gcd == W'(g), $sformatf("gcd(%0d,%0d)=%0d got %0d", a, b, g, out_gcd));
      // Random back-pressure on the output handshake.
      while ($urandom_range(0, 2) == 0) begin
        out_ready = 1'b0; @(posedge clk); #1;
        check(out_valid && out_gcd == W'(g), "output held under back-pressure");
      end
      out_ready = 1'b1; @(posedge clk); #1; out_ready = 1'b0;
      n_outputs++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run_pair(16'd12, 16'd18);
    run_pair(16'd18, 16'd12);
    run_pair(16'd7, 16'd13);
    run_pair(16'd0, 16'd0);
    run_pair(16'd0, 16'd9);
    run_pair(16'd9, 16'd0);
    run_pair(16'd46368, 16'd28657);  // Fibonacci pair: deepest recursion
    run_pair(16'd65535, 16'd65535);
    run_pair(16'd65535, 16'd1);
    for (int i = 0; i < NPAIRS; i++) begin
      logic [W-1:0] a, b, k;
      k = W'($urandom_range(1, 50));
      a = W'($urandom_range(0, 1300)) * k;
      b = W'($urandom_range(0, 1300)) * k;
      if (i % 4 == 0) begin a = W'($urandom); b = W'($urandom); end
      run_pair(a, b);
    end
    check(!ovf, "no stack overflow");
    check(n_y1 == n_outputs, "y1 raised once per GCD output");
    check(n_outputs > 0, "mechanism: GCD output via z3 seen");
    check(n_coprime > 0, "mechanism: coprime pair back to z1 seen");
    check(n_swaps > 0, "mechanism: swapping recursive call seen");
    check(n_flat_cmp > 1000, "flat encoding compared in lock step");
    check(max_sp >= 10, "mechanism: deep recursion seen");
    $display("outputs=%0d coprime=%0d swaps=%0d max_sp=%0d flat_cmp=%0d", n_outputs, n_coprime, n_swaps, max_sp, n_flat_cmp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
