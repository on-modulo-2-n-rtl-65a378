// mod_csel_adder: single-step modulo (2^n+1) adder by conditional sums.
//
// Two n-bit binary adders run side by side on x and y: one with carry-in 0,
// whose overflow is Q, and one with the hot carry-in I_x I_y, whose overflow
// is C_n.  A row of n multiplexers takes the first sum when Q = 1 (x + y
// already reached 2^n, so the result is x + y - 2^n) and the second when
// Q = 0.  The zero indicator is I_s = (Q OR NOT C_n)(I_x OR I_y): it drops
// only when both operands are zero, or when x + y + 1 = 2^n with both
// non-zero, i.e. X + Y = m.
//
// Interface: x, ix, y, iy in; s, is_ out; q and cn as status.
// Timing: purely combinational.
//
// The document gives the arrangement (two adders, n multiplexers, choice by
// Q and C_n); the select polarity and the zero-indicator gate are taken from
// its addition case table, and N = 16 is this design's choice.
module mod_csel_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] x,
  input  logic         ix,
  input  logic [N-1:0] y,
  input  logic         iy,
  output logic [N-1:0] s,
  output logic         is_,
  output logic         q,
  output logic         cn
);

  logic [N-1:0] sum0, sum1;

  cla_binary_adder #(.N(N)) u_add_plain (
    .a(x), .b(y), .cin(1'b0), .sum(sum0), .cout(q)
  );

  cla_binary_adder #(.N(N)) u_add_hot (
    .a(x), .b(y), .cin(ix & iy), .sum(sum1), .cout(cn)
  );

  assign s   = q ? sum0 : sum1;
  assign is_ = (q | ~cn) & (ix | iy);

endmodule
