// mod2n1_ref_pkg: reference arithmetic for the modulo (2^n+1) testbenches.
//
// Works on plain integers, independently of the gate-level equations in the
// design: a residue (x, I) is decoded to its value X = I (x + 1), the
// operation is done on integers modulo m = 2^n + 1, and the result is encoded
// back (value 0 -> x = 0, I = 0; value v > 0 -> x = v - 1, I = 1).  Also gives
// the two overflow flags of the addition, Q (x + y >= 2^n) and C_n
// (x + y + I_x I_y >= 2^n), and the case number 1..4 of the addition table.
package mod2n1_ref_pkg;

  function automatic longint unsigned decode(int n, longint unsigned x, bit i);
    return i ? x + 1 : 0;
  endfunction

  function automatic void encode(longint unsigned v, output longint unsigned x,
                                 output bit i);
    i = (v != 0);
    x = (v != 0) ? v - 1 : 0;
  endfunction

  function automatic void mod_add(int n, longint unsigned x, bit ix,
                                  longint unsigned y, bit iy,
                                  output longint unsigned s, output bit is_);
    longint unsigned m = (64'd1 << n) + 1;
    encode((decode(n, x, ix) + decode(n, y, iy)) % m, s, is_);
  endfunction

  function automatic void mod_neg(int n, longint unsigned x, bit ix,
                                  output longint unsigned y, output bit iy);
    longint unsigned m = (64'd1 << n) + 1;
    encode((m - decode(n, x, ix)) % m, y, iy);
  endfunction

  function automatic bit flag_q(int n, longint unsigned x, longint unsigned y);
    return (x + y) >= (64'd1 << n);
  endfunction

  function automatic bit flag_cn(int n, longint unsigned x, bit ix,
                                 longint unsigned y, bit iy);
    return (x + y + ((ix && iy) ? 64'd1 : 64'd0)) >= (64'd1 << n);
  endfunction

  // Case of the addition table: 1 both zero, 2 sum in [1, m-1],
  // 3 sum exactly m, 4 sum in [m+1, 2m-2].
  function automatic int add_case(int n, longint unsigned x, bit ix,
                                  longint unsigned y, bit iy);
    longint unsigned m = (64'd1 << n) + 1;
    longint unsigned v = decode(n, x, ix) + decode(n, y, iy);
    if (v == 0) return 1;
    if (v < m)  return 2;
    if (v == m) return 3;
    return 4;
  endfunction

  // Random canonical residue of n bits (zero about one time in eight).
  function automatic void rand_residue(int n, output longint unsigned x,
                                       output bit i);
    longint unsigned r = {$urandom(), $urandom()};
    i = ($urandom_range(7) != 0);
    x = i ? (r & ((64'd1 << n) - 1)) : 0;
  endfunction

endpackage
