// tb_mod_complement: self-checking test of the modulo (2^n+1) complementer.
//
// An 8-bit copy is checked over every canonical residue, the default 16-bit
// one on random residues and both ends of the range.  The expected value is
// m - X mod m worked out on integers.  Also checks that X + complement(X)
// is 0 mod m.
module tb_mod_complement;
  import mod2n1_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  x8, y8;
  logic        i8, iy8;
  logic [15:0] x16, y16;
  logic        i16, iy16;

  mod_complement #(.N(8)) u8  (.x(x8), .ix(i8), .y(y8), .iy(iy8));
  mod_complement          u16 (.x(x16), .ix(i16), .y(y16), .iy(iy16));

  task automatic check(int n, longint unsigned x, bit i);
    longint unsigned ey, gy, vsum;
    bit ei, gi;
    mod_neg(n, x, i, ey, ei);
    if (n == 8) begin x8 = 8'(x); i8 = i; #1; gy = y8; gi = iy8; end
    else begin x16 = 16'(x); i16 = i; #1; gy = y16; gi = iy16; end
    checks++;
    if (gy != ey || gi != ei) begin
      failures++;
      $display("FAIL n=%0d x=%0d I=%0b got (%0d,%0b) exp (%0d,%0b)", n, x, i, gy, gi, ey, ei);
    end
    vsum = (decode(n, x, i) + decode(n, gy, gi)) % ((64'd1 << n) + 1);
    checks++;
    if (vsum != 0) begin
      failures++;
      $display("FAIL n=%0d x=%0d: X + complement(X) = %0d mod m", n, x, vsum);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned x;
    bit i;
    check(8, 0, 0);
    for (int v = 0; v < 256; v++) check(8, v, 1);
    check(16, 0, 0);
    check(16, 0, 1);
    check(16, 16'hffff, 1);
    for (int t = 0; t < 2000; t++) begin
      rand_residue(16, x, i);
      check(16, x, i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
