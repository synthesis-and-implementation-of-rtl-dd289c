// tb_hfsm_register - self-checking testbench of the HFSM state register.
//
// Checks the synchronous reset to the Begin code of the main module and that
// the register takes the next code on every rising edge and holds it between
// edges.
module tb_hfsm_register;
  localparam int unsigned W = 6;
  localparam logic [W-1:0] RC = 6'h15;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] next_code = '0, code, expect_code;
  int checks = 0, failures = 0;

  hfsm_register #(.W(W), .RESET_CODE(RC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    next_code = 6'h3f;
    @(posedge clk); #1;
    check(code == RC, "reset code");
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      next_code = W'($urandom);
      expect_code = next_code;
      if (i % 50 == 49) rst_n = 1'b0;
      @(posedge clk); #1;
      check(code == (rst_n ? expect_code : RC), "code after edge");
      rst_n = 1'b1;
      next_code = ~next_code;
      #3 check(code == (i % 50 == 49 ? RC : expect_code), "code held between edges");
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
