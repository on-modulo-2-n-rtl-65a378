// mod_cla_adder: single-step modulo (2^n+1) adder with modular carry-look-ahead.
//
// Operands and result use the zero-indicator form X = I_x (x + 1).  The sum
// needs the hot carry-in I_x I_y exactly when x + y alone does not overflow
// (Q = 0), i.e. C_0 = I_x I_y NOT Q.  Instead of adding twice, that carry-in is
// substituted into every look-ahead carry.  With 1-based G_i, P_i of x and y:
//
//   C_i = G_i | P_i G_{i-1} | ... | P_i ... P_2 G_1
//       | P_i ... P_1 I_x I_y B_i
//   B_i = NOT G_n NOT P_n | NOT G_n NOT G_{n-1} NOT P_{n-1} | ...
//       | NOT G_n ... NOT G_{i+2} NOT P_{i+2} | NOT G_n ... NOT G_{i+1}
//
// B_i is "bits i+1..n of x + y produce no carry out"; once P_1..P_i are all 1
// the lower bits cannot generate one, so B_i equals NOT Q there.  Sum bit i-1
// is P_i XOR C_{i-1}.  The result is zero (I_s = 0) when both operands are
// zero, or when both are non-zero and x + y = 2^n - 1 (all P_i = 1), the case
// X + Y = m.
//
// Interface: x, ix, y, iy in; s, is_ out (the sum), plus q (overflow of x + y
// with no carry-in) and cn (overflow with the hot carry applied) for status.
// Timing: purely combinational.
//
// The carry and zero-indicator equations follow the document; N = 16 and the
// status outputs are this design's choices.
module mod_cla_adder #(
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

  logic [N:1] g, p;
  logic [N:0] c;      // modular carries, c[0] = I_x I_y NOT Q
  logic [N:0] gc;     // plain binary carries with C_0 = 0 (gc[N] = Q)
  logic       hot;

  assign hot = ix & iy;

  always_comb begin
    for (int i = 1; i <= N; i++) begin
      g[i] = x[i-1] & y[i-1];
      p[i] = x[i-1] ^ y[i-1];
    end
  end

  always_comb begin
    logic acc, term, pp, gbar, br;
    for (int i = 0; i <= N; i++) begin
      // Generate-only look-ahead: G_i | P_i G_{i-1} | ... | P_i..P_2 G_1
      acc = 1'b0;
      for (int k = 1; k <= i; k++) begin
        term = g[k];
        for (int j = k + 1; j <= i; j++) term = term & p[j];
        acc = acc | term;
      end
      gc[i] = acc;
      // P_i ... P_1
      pp = 1'b1;
      for (int j = 1; j <= i; j++) pp = pp & p[j];
      // B_i: product terms NOT G_n .. NOT G_k NOT P_k for k = n .. i+2,
      // then NOT G_n .. NOT G_{i+1}
      br   = 1'b0;
      gbar = 1'b1;
      for (int k = N; k >= i + 1; k--) begin
        if (k >= i + 2) br = br | (gbar & ~g[k] & ~p[k]);
        gbar = gbar & ~g[k];
      end
      br = br | gbar;
      c[i] = acc | (pp & hot & br);
    end
  end

  always_comb begin
    for (int i = 1; i <= N; i++) s[i-1] = p[i] ^ c[i-1];
  end

  assign q   = gc[N];
  assign cn  = c[N];
  assign is_ = (ix | iy) & ~(hot & (&p));

endmodule
