// mod_complement: additive complement modulo (2^n+1).
//
// For X = I_x (x + 1) the complement Y = |m - X|_m, m = 2^n + 1, is
// Y = I_y (y + 1) with y = I_x (2^n - 1 - x) and I_y = I_x.  When I_x = 1
// that is the one's complement of x; when I_x = 0 (X = 0) the result is zero.
// Each output bit is therefore y_i = NOT (x_i OR NOT I_x), one two-input
// gate per bit sharing a single inverted I_x, and I_y is I_x wired through.
// That makes iy a plain copy of the ix input, which is intended.
//
// Interface: x (N bits), ix; y (N bits), iy.  Timing: purely combinational.
//
// The bit equations follow the document; N = 16 is this design's choice.
module mod_complement #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] x,
  input  logic         ix,
  output logic [N-1:0] y,
  output logic         iy
);

  logic ix_n;

  assign ix_n = ~ix;
  assign y    = ~(x | {N{ix_n}});
  assign iy   = ix;

endmodule
