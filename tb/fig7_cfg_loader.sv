// fig7_cfg_loader - testbench helper that loads the four-module example
// (z0..z3, 24 states, x1..x5, y1..y7) into the RAMs of a reconfigurable
// HFSM through its configuration port.
//
// MODULAR = 0 targets the single-circuit machine (RAMs addressed by the whole
// 5-bit code, flat or split encoding chosen by `split`). MODULAR = 1 targets
// the machine with one circuit per module (RAMs of module `cfg_module`
// addressed by the 3-bit state code within the module, words holding split
// codes); `one_module` then restricts loading to module `module_sel`.
// `variant` loads a modified z3 whose state a2 raises y3 instead of y2.
//
// On a `start` pulse it writes, one word per clock: the output RAM (y and End
// flag), both PM select RAMs of both blocks, and every STRAM word of both
// blocks. State s (flat number 0..23) is placed in block s % 2; all other
// words are written invalid. `done` rises when loading is over.
// Condition x_i is routed as input index i-1, micro-operation y_i as bit i-1.
// The table below is transcribed from the flow charts independently of the
// hard-wired circuit.
module fig7_cfg_loader
  import rcc_pkg::*;
#(
  parameter bit MODULAR = 1'b0
) (
  input  logic        clk,
  input  logic        start,
  input  logic        split,
  input  logic        one_module,
  input  logic [1:0]  module_sel,
  input  logic        variant,
  output logic        done,
  output logic        cfg_we,
  output logic [1:0]  cfg_module,
  output cfg_target_e cfg_target,
  output logic [0:0]  cfg_block,
  output logic [0:0]  cfg_k,
  output logic [7:0]  cfg_addr,
  output logic [11:0] cfg_data
);
  // Per state: tested conditions (1-based, 0 = none), successors indexed by
  // {p0,p1}, callee Begin state (-1 = none), successors after the return,
  // micro-operations (bit i = y_i) and End flag.
  int xa [24], xb [24], nx [24][4], callee [24], rn [24][4], yv [24];
  bit is_end [24];

  function automatic void row(int s, int a, int b, int n0, int n1, int n2, int n3,
                              int c, int r0, int r1, int r2, int r3, int yy, bit e);
    xa[s] = a; xb[s] = b;
    nx[s] = '{n0, n1, n2, n3};
    callee[s] = c;
    rn[s] = '{r0, r1, r2, r3};
    yv[s] = yy; is_end[s] = e;
  endfunction

  // Unconditional successor: all four entries equal.
  function automatic void seq(int s, int n, int yy);
    row(s, 0, 0, n, n, n, n, -1, 0, 0, 0, 0, yy, 1'b0);
  endfunction

  function automatic void callst(int s, int c, int r);
    row(s, 0, 0, 0, 0, 0, 0, c, r, r, r, r, 0, 1'b0);
  endfunction

  function automatic void build();
    // z0: states 0..7
    seq(0, 1, 0);
    row(1, 1, 2, 2, 6, 3, 1, -1, 0, 0, 0, 0, 'b0010010, 1'b0);  // {x1,x2}
    seq(2, 4, 'b0000100);
    seq(3, 7, 'b0001000);
    callst(4, 14, 5);
    seq(5, 0, 'b0001110);
    seq(6, 7, 'b0001100);
    callst(7, 8, 0);
    // z1: states 8..13
    row(8, 5, 5, 12, 12, 9, 9, -1, 0, 0, 0, 0, 0, 1'b0);         // x5
    seq(9, 10, 'b0100000);
    callst(10, 8, 11);
    seq(11, 12, 'b1000000);
    row(12, 4, 4, 0, 0, 0, 0, 14, 9, 9, 13, 13, 0, 1'b0);        // call z2, then x4
    row(13, 0, 0, 13, 13, 13, 13, -1, 0, 0, 0, 0, 0, 1'b1);      // End
    // z2: states 14..18
    row(14, 2, 3, 15, 15, 17, 16, -1, 0, 0, 0, 0, 0, 1'b0);      // x2, x3
    seq(15, 17, 'b10000100);
    callst(16, 19, 18);
    seq(17, 18, 'b0101000);
    row(18, 0, 0, 18, 18, 18, 18, -1, 0, 0, 0, 0, 0, 1'b1);
    // z3: states 19..23
    row(19, 1, 1, 20, 20, 21, 21, -1, 0, 0, 0, 0, 0, 1'b0);      // x1
    seq(20, 23, 'b10110000);
    seq(21, 22, 'b0000100);
    seq(22, 23, 'b0000010);
    row(23, 0, 0, 23, 23, 23, 23, -1, 0, 0, 0, 0, 0, 1'b1);
  endfunction

  function automatic int code_of(int s, bit sp);
    int base, m;
    if (!sp) return s;
    m = (s < 8) ? 0 : (s < 14) ? 1 : (s < 19) ? 2 : 3;
    base = (m == 0) ? 0 : (m == 1) ? 8 : (m == 2) ? 14 : 19;
    return m * 8 + (s - base);
  endfunction

  // Flat state number of a code, -1 for an unused code.
  function automatic int state_of(int c, bit sp);
    for (int s = 0; s < 24; s++) if (code_of(s, sp) == c) return s;
    return -1;
  endfunction

  task automatic wr(input cfg_target_e t, input int b, input int k, input int a, input logic [11:0] d);
    cfg_we = 1'b1; cfg_target = t; cfg_block = 1'(b); cfg_k = 1'(k);
    cfg_addr = 8'(a); cfg_data = d;
    @(posedge clk); #1;
  endtask

  initial begin
    done = 1'b0; cfg_we = 1'b0; cfg_target = CFG_OUT_RAM; cfg_module = '0;
    cfg_block = '0; cfg_k = '0; cfg_addr = '0; cfg_data = '0;
    build();
    forever begin
      do @(posedge clk); while (!start);
      #1 done = 1'b0;
      for (int c = 0; c < 32; c++) begin
        int s, la, sh, yy;
        bit sp;
        sp = MODULAR ? 1'b1 : split;
        if (MODULAR && one_module && (c >> 3) != int'(module_sel)) continue;
        cfg_module = 2'(c >> 3);
        la = MODULAR ? (c & 7) : c;     // RAM address of the state code
        sh = MODULAR ? 5 : 7;           // position of the ret address bit
        s = state_of(c, sp);
        yy = (s >= 0) ? yv[s] : 0;
        if (variant && s == 21) yy = 'b0001000;
        if (s < 0) wr(CFG_OUT_RAM, 0, 0, la, '0);
        else wr(CFG_OUT_RAM, 0, 0, la, 12'({is_end[s], 7'(yy >> 1)}));
        for (int b = 0; b < 2; b++) begin
          wr(CFG_PM, b, 0, la, (s >= 0 && xa[s] > 0) ? 12'(xa[s] - 1) : '0);
          wr(CFG_PM, b, 1, la, (s >= 0 && xb[s] > 0) ? 12'(xb[s] - 1) : '0);
        end
        for (int r = 0; r < 2; r++)
          for (int pv = 0; pv < 4; pv++)
            for (int b = 0; b < 2; b++) begin
              logic [11:0] w;
              int a;
              a = (r << sh) | (la << 2) | pv;
              w = '0;
              if (s >= 0 && (s % 2) == b) begin
                if (r == 0 && callee[s] >= 0)
                  w = {1'b1, 1'b1, 5'(code_of(callee[s], sp)), 5'(c)};
                else if (r == 0 && !is_end[s])
                  w = {1'b1, 1'b0, 5'(code_of(nx[s][pv], sp)), 5'(0)};
                else if (r == 1 && callee[s] >= 0)
                  w = {1'b1, 1'b0, 5'(code_of(rn[s][pv], sp)), 5'(0)};
              end
              wr(CFG_STRAM, b, 0, a, w);
            end
      end
      cfg_we = 1'b0;
      done = 1'b1;
    end
  end
endmodule
