// tb_hfsm_stack - self-checking testbench of the HFSM return stack.
//
// Drives random pushes and pops against a queue kept in the testbench and
// checks the top word, the stack pointer, the empty/full flags, the dropping
// of a push onto a full stack (sticky overflow) and the ignoring of a pop on
// an empty stack.
module tb_hfsm_stack;
  localparam int unsigned W = 6, DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0, push = 1'b0, pop = 1'b0;
  logic [W-1:0] push_data = '0, top;
  logic [$clog2(DEPTH+1)-1:0] sp;
  logic empty, full, overflow;
  logic [W-1:0] model[$];
  bit model_ovf = 1'b0;
  int checks = 0, failures = 0, n_full = 0, n_ovf = 0, n_empty_pop = 0;

  hfsm_stack #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      int r;
      // Compare state before the edge.
      check(int'(sp) == model.size(), $sformatf("sp %0d vs %0d", sp, model.size()));
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      check(overflow == model_ovf, "overflow flag");
      if (model.size() > 0) check(top == model[$], "top word");
      // Phases bias the stack toward full or toward empty.
      r = $urandom_range(0, 99);
      push = ((i / 200) % 2 == 0) ? (r < 65) : (r < 35);
      pop  = !push && (r < 90);
      push_data = W'($urandom);
      @(posedge clk);
      if (push) begin
        if (model.size() == DEPTH) begin model_ovf = 1'b1; n_ovf++; end
        else model.push_back(push_data);
      end else if (pop) begin
        if (model.size() > 0) void'(model.pop_back());
        else n_empty_pop++;
      end
      if (model.size() == DEPTH) n_full++;
      #1;
    end
    check(n_full > 0 && n_ovf > 0 && n_empty_pop > 0, "full, overflow and empty-pop cases reached");
    $display("full=%0d ovf=%0d empty_pop=%0d", n_full, n_ovf, n_empty_pop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
