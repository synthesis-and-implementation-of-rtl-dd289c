// fig7_pkg - states and codes of the four-module example HFSM (z0..z3).
//
// Every rectangular node of the four flow charts is a state with a name of
// its own (Zm_Ak is state ak of module zm), 24 in all: 8 in z0, 6 in z1, 5 in
// z2 and 5 in z3. Two encodings of the same states are provided:
//   * flat: one 5-bit code per state, numbered 0..23 in the order above, so
//     the module is implicit in the state code;
//   * split: {module code (2 bits), state code within the module (3 bits)},
//     so that states of different modules reuse the same local codes.
// Both are 5 bits wide. The numbering within each encoding is this design's
// own choice.
package fig7_pkg;

  typedef enum logic [4:0] {
    Z0_A0, Z0_A1, Z0_A2, Z0_A3, Z0_A4, Z0_A5, Z0_A6, Z0_A7,
    Z1_A0, Z1_A1, Z1_A2, Z1_A3, Z1_A4, Z1_A5,
    Z2_A0, Z2_A1, Z2_A2, Z2_A3, Z2_A4,
    Z3_A0, Z3_A1, Z3_A2, Z3_A3, Z3_A4
  } state_e;

  localparam int unsigned CODE_W  = 5;
  localparam int unsigned NSTATES = 24;

  // First state (Begin) of each module in the flat numbering.
  function automatic logic [4:0] module_base(logic [1:0] m);
    unique case (m)
      2'd0:    return 5'd0;
      2'd1:    return 5'd8;
      2'd2:    return 5'd14;
      default: return 5'd19;
    endcase
  endfunction

  function automatic logic [2:0] module_size(logic [1:0] m);
    unique case (m)
      2'd0:    return 3'd7;  // 8 states, largest local code
      2'd1:    return 3'd5;
      default: return 3'd4;
    endcase
  endfunction

  function automatic logic [1:0] module_of(state_e s);
    if (s <= Z0_A7)      return 2'd0;
    else if (s <= Z1_A5) return 2'd1;
    else if (s <= Z2_A4) return 2'd2;
    else                 return 2'd3;
  endfunction

  function automatic logic [CODE_W-1:0] encode(state_e s, bit split);
    logic [1:0] m;
    logic [2:0] local_idx;
    m = module_of(s);
    local_idx = 3'(5'(s) - module_base(m));
    return split ? {m, local_idx} : 5'(s);
  endfunction

  // Codes that name no state decode to the Begin state of z0.
  function automatic state_e decode(logic [CODE_W-1:0] c, bit split);
    if (split) begin
      if (c[2:0] > module_size(c[4:3])) return Z0_A0;
      return state_e'(module_base(c[4:3]) + 5'(c[2:0]));
    end
    if (c >= 5'(NSTATES)) return Z0_A0;
    return state_e'(c);
  endfunction

endpackage
