// gcd_pkg - codes and control bundle of the GCD HFSM (modules z0..z4).
//
// The register of this HFSM holds a pair {module code, state code}: states in
// different modules reuse the same labels a0..a5, and the module code tells
// them apart. Module z0 is the main loop, z1 takes in a pair of integers, z2
// computes the greatest common divisor recursively, z3 hands a GCD other than
// 1 to the consumer, and z4 computes A % B by repeated subtraction. A flat
// encoding, one 5-bit code per state with the modules implicit, is also
// provided. The binary values of the codes are this design's own choice.
package gcd_pkg;

  typedef enum logic [2:0] {
    Z0 = 3'd0, Z1 = 3'd1, Z2 = 3'd2, Z3 = 3'd3, Z4 = 3'd4
  } module_e;

  typedef enum logic [2:0] {
    A0 = 3'd0, A1 = 3'd1, A2 = 3'd2, A3 = 3'd3, A4 = 3'd4, A5 = 3'd5
  } state_e;

  typedef struct packed {
    module_e m;
    state_e  s;
  } code_t;

  localparam int unsigned CODE_W = $bits(code_t);
  localparam code_t RESET_CODE = code_t'(CODE_W'(0));  // z0/a0

  // Flat encoding: one code per state, numbered module by module
  // (z0: 0..3, z1: 4..5, z2: 6..11, z3: 12..13, z4: 14..16).
  localparam int unsigned FLAT_W = 5;

  function automatic logic [FLAT_W-1:0] flat_base(module_e m);
    unique case (m)
      Z0:      return 5'd0;
      Z1:      return 5'd4;
      Z2:      return 5'd6;
      Z3:      return 5'd12;
      default: return 5'd14;
    endcase
  endfunction

  function automatic logic [FLAT_W-1:0] to_flat(code_t c);
    return flat_base(c.m) + FLAT_W'(c.s);
  endfunction

  // Codes past the last state decode to z0/a0.
  function automatic code_t from_flat(logic [FLAT_W-1:0] f);
    code_t c;
    if (f < 5'd4)       begin c.m = Z0; c.s = state_e'(f[2:0]); end
    else if (f < 5'd6)  begin c.m = Z1; c.s = state_e'(3'(f - 5'd4)); end
    else if (f < 5'd12) begin c.m = Z2; c.s = state_e'(3'(f - 5'd6)); end
    else if (f < 5'd14) begin c.m = Z3; c.s = state_e'(3'(f - 5'd12)); end
    else if (f < 5'd17) begin c.m = Z4; c.s = state_e'(3'(f - 5'd14)); end
    else c = RESET_CODE;
    return c;
  endfunction

  function automatic code_t mk(module_e m, state_e s);
    code_t c;
    c.m = m;
    c.s = s;
    return c;
  endfunction

  // Datapath operations (micro-operations) requested by the current state.
  typedef struct packed {
    logic ld_in;      // z1 a0: Data_A <= in_a, Data_B <= in_b
    logic ld_ab;      // z2 a0: A <= Data_A, B <= Data_B
    logic swap_args;  // z2 a1: Data_A <= B, Data_B <= A
    logic rec_args;   // z2 a4: Data_A <= B, Data_B <= R
    logic sub;        // z4 a1: A <= A - B, R <= A - B
    logic ld_result;  // z2 a2: result <= A
  } dp_ctrl_t;

  // Conditions returned by the datapath.
  typedef struct packed {
    logic data_b_gt_a;  // Data_B > Data_A
    logic data_b_zero;  // Data_B = 0
    logic a_ge_b;       // A >= B
    logic gcd_is_one;   // x1: result = 1
  } dp_status_t;

endpackage
