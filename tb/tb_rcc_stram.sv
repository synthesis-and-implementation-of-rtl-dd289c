// tb_rcc_stram - self-checking testbench of the state transition RAM.
//
// Loads the example table for state 010 with p0p1 = 00, 01, 10, 11 giving the
// next states 111, 111, 110, 011 and checks it, including that p0 is the more
// significant address bit; then writes random words at random addresses,
// keeps a copy here, and checks reads through the {ret, state, p} address.
module tb_rcc_stram;
  localparam int unsigned SW = 3, K = 2;
  localparam int unsigned AW = SW + K + 1, DW = 2 * SW + 2;
  logic clk = 1'b0, cfg_we = 1'b0, ret = 1'b0;
  logic [AW-1:0] cfg_addr = '0;
  logic [DW-1:0] cfg_data = '0;
  logic [SW-1:0] state = '0, next, rstate;
  logic [K-1:0] p = '0;
  logic valid, push;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  rcc_stram #(.SW(SW), .K(K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write_word(input int a, input logic [DW-1:0] d);
    cfg_we = 1'b1; cfg_addr = AW'(a); cfg_data = d;
    @(posedge clk); #1;
    cfg_we = 1'b0;
    model[a] = d;
  endtask

  initial begin
    logic [SW-1:0] exp_next [4];
    exp_next = '{3'b111, 3'b111, 3'b110, 3'b011};
    for (int a = 0; a < 2**AW; a++) write_word(a, '0);
    for (int v = 0; v < 4; v++) write_word({1'b0, 3'b010, 2'(v)}, {1'b1, 1'b0, exp_next[v], 3'b000});
    state = 3'b010; ret = 1'b0;
    for (int v = 0; v < 4; v++) begin
      p[0] = v[1]; p[1] = v[0];  // address bits p0 p1
      #1 check(valid && !push && next == exp_next[v], $sformatf("example p0p1=%0d next=%b", v, next));
    end
    ret = 1'b1; #1 check(!valid, "return half of the example is empty");
    for (int a = 0; a < 2**AW; a++) write_word(a, DW'($urandom));
    for (int i = 0; i < 2000; i++) begin
      logic [AW-1:0] a;
      ret = 1'($urandom); state = SW'($urandom); p = K'($urandom); #1;
      a = {ret, state, p[0], p[1]};
      check({valid, push, next, rstate} == model[a], $sformatf("random read addr %0d", a));
      if (i % 13 == 0) write_word($urandom_range(0, 2**AW-1), DW'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
