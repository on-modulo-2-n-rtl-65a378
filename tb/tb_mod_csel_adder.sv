// tb_mod_csel_adder: self-checking test of the conditional-sum modular adder.
//
// A 6-bit copy is checked over every pair of canonical residues (65 x 65),
// the default 16-bit one on random pairs and on directed pairs for each of
// the four cases of the addition table (both zero; sum 1..m-1; sum exactly
// m; sum above m).  Sum, zero indicator and the Q and C_n flags are compared
// with integer arithmetic modulo m = 2^n + 1.  Every case must occur.
module tb_mod_csel_adder;
  import mod2n1_ref_pkg::*;

  int checks = 0, failures = 0;
  int case_seen [1:4];

  logic [5:0]  x6, y6, s6;
  logic        ix6, iy6, is6, q6, cn6;
  logic [15:0] x16, y16, s16;
  logic        ix16, iy16, is16, q16, cn16;

  mod_csel_adder #(.N(6)) u6 (.x(x6), .ix(ix6), .y(y6), .iy(iy6),
                          .s(s6), .is_(is6), .q(q6), .cn(cn6));
  mod_csel_adder          u16 (.x(x16), .ix(ix16), .y(y16), .iy(iy16),
                          .s(s16), .is_(is16), .q(q16), .cn(cn16));

  task automatic check(int n, longint unsigned x, bit ix, longint unsigned y, bit iy);
    longint unsigned es, gs;
    bit ei, gi, gq, gcn;
    mod_add(n, x, ix, y, iy, es, ei);
    if (n == 6) begin
      x6 = 6'(x); ix6 = ix; y6 = 6'(y); iy6 = iy; #1;
      gs = s6; gi = is6; gq = q6; gcn = cn6;
    end else begin
      x16 = 16'(x); ix16 = ix; y16 = 16'(y); iy16 = iy; #1;
      gs = s16; gi = is16; gq = q16; gcn = cn16;
    end
    case_seen[add_case(n, x, ix, y, iy)]++;
    checks++;
    if (gs != es || gi != ei) begin
      failures++;
      $display("FAIL n=%0d (%0d,%0b)+(%0d,%0b) got (%0d,%0b) exp (%0d,%0b)",
               n, x, ix, y, iy, gs, gi, es, ei);
    end
    checks++;
    if (gq != flag_q(n, x, y) || gcn != flag_cn(n, x, ix, y, iy)) begin
      failures++;
      $display("FAIL n=%0d (%0d,%0b)+(%0d,%0b) flags Q=%0b Cn=%0b", n, x, ix, y, iy, gq, gcn);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned x, y;
    bit ix, iy;
    for (int c = 1; c <= 4; c++) case_seen[c] = 0;
    // Exhaustive at n = 6: value v = -1 stands for zero.
    for (int a = -1; a < 64; a++)
      for (int b = -1; b < 64; b++)
        check(6, a < 0 ? 0 : a, a >= 0, b < 0 ? 0 : b, b >= 0);
    // Directed cases at n = 16.
    check(16, 0, 0, 0, 0);                 // case i
    check(16, 0, 0, 16'hffff, 1);          // case ii, one operand zero
    check(16, 16'h1234, 1, 16'h0fff, 1);   // case ii
    check(16, 16'hfffe, 1, 0, 1);          // case ii, sum m - 1
    check(16, 16'h8000, 1, 16'h7fff, 1);   // case iii, sum m
    check(16, 16'h0000, 1, 16'hffff, 1);   // case iii
    check(16, 16'hffff, 1, 16'h0001, 1);   // case iv
    check(16, 16'hffff, 1, 16'hffff, 1);   // case iv, largest sum
    for (int k = 0; k < 16; k++) begin
      check(16, 16'hffff ^ (16'(1) << k), 1, 16'(1) << k, 1);   // case iii
      check(16, 16'(1) << k, 1, 16'hffff, 1);                     // case iv
    end
    for (int t = 0; t < 20000; t++) begin
      rand_residue(16, x, ix);
      rand_residue(16, y, iy);
      check(16, x, ix, y, iy);
    end
    for (int c = 1; c <= 4; c++) begin
      checks++;
      if (case_seen[c] == 0) begin
        failures++;
        $display("FAIL addition case %0d never exercised", c);
      end
    end
    $display("cases seen: i=%0d ii=%0d iii=%0d iv=%0d",
             case_seen[1], case_seen[2], case_seen[3], case_seen[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
