// mod2n1_pkg: shared types for the modulo (2^n+1) arithmetic unit.
//
// A residue X in Z_m, m = 2^n+1, is carried as an n-bit field x plus a zero
// indicator I_x, with X = I_x * (x + 1).  I_x = 0 means X = 0, and x must then
// be all zeros (the canonical form every unit here produces).  The operation
// codes below select which of the unit's datapaths produces a result; the
// encoding is this design's own choice.
package mod2n1_pkg;

  // Operation select of mod2n1_alu.
  typedef enum logic [1:0] {
    OP_ADD_CLA = 2'd0,  // single-step add, modular carry-look-ahead
    OP_ADD_SEL = 2'd1,  // single-step add, two conditional sums and a select
    OP_ADD_SEQ = 2'd2,  // two-cycle add, one binary adder and a carry flip-flop
    OP_NEG     = 2'd3   // modular complement of operand A
  } op_e;

endpackage
