// tb_rcc - self-checking testbench of the RAM-based reconfigurable
// combinational circuit.
//
// Writes every RAM through the configuration port with random contents
// (valid bits sparse so that blocks are used one at a time, together and not
// at all), keeps a copy of all RAMs here, and for random current states,
// stack tops, stack-empty flags and inputs checks y, pop, push, next state
// and return code against the expected values computed from the copy: the
// End flag and y from the output RAM at the current state, the return
// multiplexer, each block's p variables, STRAM word, and the OR of the valid
// words. Then checks the example state 010 (p0 = x1, p1 = x3, next states
// 111/111/110/011) and that a return reads the `ret` half of the STRAM.
module tb_rcc;
  import rcc_pkg::*;
  localparam int unsigned SW = 3, L = 4, K = 2, N = 4, G = 2;
  localparam int unsigned AW = SW + K + 1, SDW = 2 * SW + 2;
  localparam int unsigned CDW = (N + 1 > SDW) ? N + 1 : SDW;

  logic clk = 1'b0;
  logic [SW-1:0] cur_state = '0, ret_state = '0, next_state, push_state;
  logic stack_empty = 1'b1;
  logic [L-1:0] x = '0;
  logic [N-1:0] y;
  logic push, pop;
  logic cfg_we = 1'b0;
  cfg_target_e cfg_target = CFG_OUT_RAM;
  logic [0:0] cfg_block = '0, cfg_k = '0;
  logic [AW-1:0] cfg_addr = '0;
  logic [CDW-1:0] cfg_data = '0;

  logic [N:0]     out_m [2**SW];
  int             pm_m  [G][K][2**SW];
  logic [SDW-1:0] st_m  [G][2**AW];
  int checks = 0, failures = 0;
  int n_pop = 0, n_push = 0, n_none = 0, n_both = 0;

  rcc #(.SW(SW), .L(L), .K(K), .N(N), .G(G)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input cfg_target_e t, input int b, input int k, input int a, input logic [CDW-1:0] d);
    cfg_we = 1'b1; cfg_target = t; cfg_block = 1'(b); cfg_k = 1'(k);
    cfg_addr = AW'(a); cfg_data = d;
    @(posedge clk); #1;
    cfg_we = 1'b0;
    case (t)
      CFG_OUT_RAM: out_m[a] = d[N:0];
      CFG_PM:      pm_m[b][k][a] = int'(d[1:0]);
      default:     st_m[b][a] = d[SDW-1:0];
    endcase
  endtask

  task automatic load_random();
    for (int a = 0; a < 2**SW; a++) wr(CFG_OUT_RAM, 0, 0, a, CDW'($urandom));
    for (int b = 0; b < G; b++) begin
      for (int k = 0; k < K; k++)
        for (int a = 0; a < 2**SW; a++) wr(CFG_PM, b, k, a, CDW'($urandom_range(0, L-1)));
      for (int a = 0; a < 2**AW; a++) begin
        logic [SDW-1:0] w;
        w = SDW'($urandom);
        w[SDW-1] = ($urandom_range(0, 2) == 0);  // valid
        wr(CFG_STRAM, b, 0, a, CDW'(w));
      end
    end
  endtask

  task automatic check_outputs();
    logic          e_end, e_pop, any, ps;
    logic [N-1:0]  e_y;
    logic [SW-1:0] ev, n, r;
    int nvalid;
    {e_end, e_y} = out_m[cur_state];
    e_pop = e_end && !stack_empty;
    ev = e_pop ? ret_state : cur_state;
    n = '0; r = '0; any = 1'b0; ps = 1'b0; nvalid = 0;
    for (int b = 0; b < G; b++) begin
      logic [K-1:0] pv;
      logic [SDW-1:0] w;
      for (int k = 0; k < K; k++) pv[K-1-k] = x[pm_m[b][k][ev]];  // p0 first
      w = st_m[b][{e_pop, ev, pv}];
      if (w[SDW-1]) begin
        any = 1'b1; nvalid++;
        ps |= w[SDW-2];
        n  |= w[2*SW-1:SW];
        r  |= w[SW-1:0];
      end
    end
    check(y == e_y, "y");
    check(pop == e_pop, "pop");
    check(next_state == (any ? n : cur_state), $sformatf("next %b exp %b", next_state, any ? n : cur_state));
    check(push == (any && ps && !e_pop), "push");
    check(push_state == r, "return code");
    if (e_pop) n_pop++;
    if (push) n_push++;
    if (nvalid == 0) n_none++;
    if (nvalid == G) n_both++;
  endtask

  initial begin
    load_random();
    for (int i = 0; i < 5000; i++) begin
      cur_state = SW'($urandom); ret_state = SW'($urandom);
      stack_empty = 1'($urandom); x = L'($urandom);
      #1 check_outputs();
      if (i % 50 == 0) wr(CFG_STRAM, $urandom_range(0, G-1), 0, $urandom_range(0, 2**AW-1), CDW'($urandom));
    end
    check(n_pop > 0 && n_push > 0 && n_none > 0 && n_both > 0, "pop, push, no block and all blocks seen");

    // Example: state 010 tests x1 (p0) and x3 (p1) in block 1; block 0 empty.
    for (int a = 0; a < 2**AW; a++) begin wr(CFG_STRAM, 0, 0, a, '0); wr(CFG_STRAM, 1, 0, a, '0); end
    for (int a = 0; a < 2**SW; a++) wr(CFG_OUT_RAM, 0, 0, a, '0);
    wr(CFG_PM, 1, 0, 3'b010, 1);
    wr(CFG_PM, 1, 1, 3'b010, 3);
    wr(CFG_STRAM, 1, 0, {1'b0, 3'b010, 2'b00}, CDW'({2'b10, 3'b111, 3'b000}));
    wr(CFG_STRAM, 1, 0, {1'b0, 3'b010, 2'b01}, CDW'({2'b10, 3'b111, 3'b000}));
    wr(CFG_STRAM, 1, 0, {1'b0, 3'b010, 2'b10}, CDW'({2'b10, 3'b110, 3'b000}));
    wr(CFG_STRAM, 1, 0, {1'b0, 3'b010, 2'b11}, CDW'({2'b10, 3'b011, 3'b000}));
    // Return row of state 010 and an End state 101.
    wr(CFG_STRAM, 1, 0, {1'b1, 3'b010, 2'b00}, CDW'({2'b10, 3'b001, 3'b000}));
    wr(CFG_OUT_RAM, 0, 0, 3'b101, CDW'({1'b1, 4'b1001}));
    cur_state = 3'b010; stack_empty = 1'b1;
    for (int v = 0; v < 16; v++) begin
      logic [SW-1:0] e;
      x = 4'(v);
      e = !x[1] ? 3'b111 : (x[3] ? 3'b011 : 3'b110);
      #1 check(next_state == e && !pop && !push, $sformatf("example x=%b next=%b", x, next_state));
    end
    cur_state = 3'b101; ret_state = 3'b010; stack_empty = 1'b0; x = 4'b0000;
    #1 check(pop && next_state == 3'b001 && y == 4'b1001, "return evaluates the calling state");
    stack_empty = 1'b1;
    #1 check(!pop && next_state == 3'b101, "End of the main module without return keeps the state");
    $display("pop=%0d push=%0d none=%0d both=%0d", n_pop, n_push, n_none, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
