// tb_rcc_pm - self-checking testbench of the programmable multiplexer.
//
// First loads the example of a state a_m = 010 that routes x1 to p0 and x3 to
// p1 (K = 2, L = 4) and checks all 16 input combinations. Then fills the
// select RAMs with random indices, keeps a copy here, and checks p against
// x[select] for random states and inputs.
module tb_rcc_pm;
  localparam int unsigned SW = 3, L = 4, K = 2;
  logic clk = 1'b0, cfg_we = 1'b0;
  logic [0:0] cfg_k = '0;
  logic [SW-1:0] cfg_addr = '0, state = '0;
  logic [1:0] cfg_sel = '0;
  logic [L-1:0] x = '0;
  logic [K-1:0] p;
  int sel_model [K][2**SW];
  int checks = 0, failures = 0;

  rcc_pm #(.SW(SW), .L(L), .K(K)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write_sel(input int k, input int a, input int s);
    cfg_we = 1'b1; cfg_k = 1'(k); cfg_addr = SW'(a); cfg_sel = 2'(s);
    @(posedge clk); #1;
    cfg_we = 1'b0;
    sel_model[k][a] = s;
  endtask

  initial begin
    for (int k = 0; k < K; k++)
      for (int a = 0; a < 2**SW; a++) write_sel(k, a, 0);
    write_sel(0, 3'b010, 1);  // p0 = x1
    write_sel(1, 3'b010, 3);  // p1 = x3
    state = 3'b010;
    for (int v = 0; v < 16; v++) begin
      x = 4'(v); #1;
      check(p[0] == x[1] && p[1] == x[3], $sformatf("example x=%b p=%b", x, p));
    end
    for (int k = 0; k < K; k++)
      for (int a = 0; a < 2**SW; a++) write_sel(k, a, $urandom_range(0, L-1));
    for (int i = 0; i < 2000; i++) begin
      state = SW'($urandom); x = L'($urandom); #1;
      for (int k = 0; k < K; k++)
        check(p[k] == x[sel_model[k][state]], $sformatf("random k=%0d state=%0d", k, state));
      if (i % 97 == 0) write_sel($urandom_range(0, K-1), $urandom_range(0, 2**SW-1), $urandom_range(0, L-1));
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
