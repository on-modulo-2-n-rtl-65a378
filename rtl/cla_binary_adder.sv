// cla_binary_adder: n-bit binary adder with full carry-look-ahead.
//
// Every carry is written out as a two-level sum of products of the bit
// generate and propagate terms, using the 1-based numbering of the adder
// equations: G_i = a_{i-1} b_{i-1}, P_i = a_{i-1} XOR b_{i-1},
//   C_i = G_i | P_i G_{i-1} | ... | P_i ... P_2 G_1 | P_i ... P_1 C_0,
// and sum bit i-1 is P_i XOR C_{i-1}.  No carry ripples from bit to bit: each
// C_i is computed from the G and P terms directly.
//
// Interface: a, b (N bits), cin (C_0); sum (N bits), cout (C_N, the overflow).
// Timing: purely combinational.
//
// The equations are the document's; the width N = 16 is this design's choice,
// the document leaves n open.
module cla_binary_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:1] g, p;   // generate / propagate, 1-based as in the equations
  logic [N:0] c;      // c[i] = carry into bit i (0-based), c[0] = cin

  always_comb begin
    for (int i = 1; i <= N; i++) begin
      g[i] = a[i-1] & b[i-1];
      p[i] = a[i-1] ^ b[i-1];
    end
  end

  always_comb begin
    logic acc, term;
    c[0] = cin;
    for (int i = 1; i <= N; i++) begin
      // P_i ... P_1 C_0
      term = cin;
      for (int j = 1; j <= i; j++) term = term & p[j];
      acc = term;
      // P_i ... P_{k+1} G_k for k = 1 .. i
      for (int k = 1; k <= i; k++) begin
        term = g[k];
        for (int j = k + 1; j <= i; j++) term = term & p[j];
        acc = acc | term;
      end
      c[i] = acc;
    end
  end

  always_comb begin
    for (int i = 1; i <= N; i++) sum[i-1] = p[i] ^ c[i-1];
  end

  assign cout = c[N];

endmodule
