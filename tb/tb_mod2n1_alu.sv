// tb_mod2n1_alu: end-to-end test of the modulo (2^n+1) arithmetic unit at
// its default width (n = 16, m = 65537).
//
// Drives a stream of operations through the start/valid handshake: directed
// operand pairs for each case of the addition table on each of the three
// adders, complements of zero, one and the largest residue, then random
// operations with random operands and random idle gaps, including a start in
// the same cycle as the previous result.  Each result, its Q and C_n flags
// and its latency (2 cycles, 3 for the two-cycle adder) are compared with
// integer arithmetic modulo m.  Also checks that a start while busy is
// ignored.  Counts how often each mechanism happened and fails if one never
// did: each operation, each addition case on each adder, the first-cycle
// overflow path and the hot-carry path of the two-cycle adder, complement of
// zero and of a non-zero value, back-to-back operation and ignored start.
module tb_mod2n1_alu;
  import mod2n1_pkg::*;
  import mod2n1_ref_pkg::*;

  localparam int N = 16;

  int checks = 0, failures = 0;
  int op_seen [4];
  int case_seen [3][1:4];
  int seq_q_path = 0, seq_hot_path = 0, neg_zero = 0, neg_nonzero = 0;
  int back_to_back = 0, ignored_start = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start, busy, valid, r_i, flag_q, flag_cn, a_i, b_i;
  op_e          op;
  logic [N-1:0] a_x, b_x, r_x;

  mod2n1_alu dut (
    .clk(clk), .rst_n(rst_n), .start(start), .op(op),
    .a_x(a_x), .a_i(a_i), .b_x(b_x), .b_i(b_i),
    .busy(busy), .valid(valid), .r_x(r_x), .r_i(r_i),
    .flag_q(flag_q), .flag_cn(flag_cn)
  );

  // Issue one operation; with `chain` set the start is given in the cycle
  // where the previous result is valid (the caller has waited for it).
  task automatic run(op_e o, longint unsigned ax, bit ai, longint unsigned bx, bit bi,
                     bit poke_busy);
    longint unsigned er;
    bit ei, eq, ecn;
    int lat, exp_lat;
    if (o == OP_NEG) begin
      mod_neg(N, ax, ai, er, ei);
      eq = 0; ecn = 0;
      if (ai) neg_nonzero++; else neg_zero++;
    end else begin
      mod_add(N, ax, ai, bx, bi, er, ei);
      eq = mod2n1_ref_pkg::flag_q(N, ax, bx);
      ecn = mod2n1_ref_pkg::flag_cn(N, ax, ai, bx, bi);
      case_seen[int'(o)][add_case(N, ax, ai, bx, bi)]++;
      if (o == OP_ADD_SEQ) begin
        if (eq) seq_q_path++;
        else if (ai && bi) seq_hot_path++;
      end
    end
    op_seen[int'(o)]++;
    exp_lat = (o == OP_ADD_SEQ) ? 3 : 2;
    if (valid) back_to_back++;
    start = 1; op = o; a_x = N'(ax); a_i = ai; b_x = N'(bx); b_i = bi;
    @(negedge clk);
    // Optionally present a conflicting start while busy: it must be ignored.
    if (poke_busy) begin
      start = 1; op = OP_NEG; a_x = ~N'(ax); a_i = 1; b_x = '0; b_i = 0;
      ignored_start++;
    end else start = 0;
    lat = 1;
    while (!valid && lat < 8) begin
      @(negedge clk);
      start = 0;
      a_x = N'($urandom()); b_x = N'($urandom());
      lat++;
    end
    start = 0;
    checks++;
    if (lat != exp_lat) begin
      failures++;
      $display("FAIL op %s latency %0d, expected %0d", o.name(), lat, exp_lat);
    end
    checks++;
    if (r_x != N'(er) || r_i != ei) begin
      failures++;
      $display("FAIL op %s A=(%0d,%0b) B=(%0d,%0b) got (%0d,%0b) exp (%0d,%0b)",
               o.name(), ax, ai, bx, bi, r_x, r_i, er, ei);
    end
    checks++;
    if (flag_q != eq || flag_cn != ecn) begin
      failures++;
      $display("FAIL op %s flags Q=%0b Cn=%0b exp %0b %0b", o.name(), flag_q, flag_cn, eq, ecn);
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned x, y;
    bit ix, iy;
    op_e o;
    foreach (op_seen[k]) op_seen[k] = 0;
    for (int k = 0; k < 3; k++) for (int c = 1; c <= 4; c++) case_seen[k][c] = 0;
    start = 0; op = OP_ADD_CLA; a_x = '0; a_i = 0; b_x = '0; b_i = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (busy || valid) begin failures++; $display("FAIL busy/valid after reset"); end
    for (int k = 0; k < 3; k++) begin
      o = op_e'(k);
      run(o, 0, 0, 0, 0, 0);                      // case i
      run(o, 0, 0, 16'h4321, 1, 0);               // case ii
      run(o, 16'h1234, 1, 16'h0fff, 1, 1);        // case ii, start while busy
      run(o, 16'h8000, 1, 16'h7fff, 1, 0);        // case iii (sum = m)
      run(o, 16'hffff, 1, 16'hffff, 1, 0);        // case iv
      @(negedge clk);
    end
    run(OP_NEG, 0, 0, 0, 0, 0);
    run(OP_NEG, 0, 1, 0, 0, 0);
    run(OP_NEG, 16'hffff, 1, 0, 0, 1);
    for (int t = 0; t < 20000; t++) begin
      o = op_e'($urandom_range(3));
      rand_residue(N, x, ix);
      rand_residue(N, y, iy);
      run(o, x, ix, y, iy, $urandom_range(9) == 0);
      // Usually start again in the valid cycle; sometimes idle a while.
      if ($urandom_range(3) == 0) repeat ($urandom_range(3) + 1) @(negedge clk);
    end
    foreach (op_seen[k]) begin
      checks++;
      if (op_seen[k] == 0) begin failures++; $display("FAIL op %0d never run", k); end
    end
    for (int k = 0; k < 3; k++)
      for (int c = 1; c <= 4; c++) begin
        checks++;
        if (case_seen[k][c] == 0) begin
          failures++;
          $display("FAIL adder %0d never saw case %0d", k, c);
        end
      end
    checks++;
    if (seq_q_path == 0 || seq_hot_path == 0 || neg_zero == 0 || neg_nonzero == 0 ||
        back_to_back == 0 || ignored_start == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("ops: cla=%0d sel=%0d seq=%0d neg=%0d", op_seen[0], op_seen[1], op_seen[2], op_seen[3]);
    $display("cases i..iv per adder: cla %0d/%0d/%0d/%0d sel %0d/%0d/%0d/%0d seq %0d/%0d/%0d/%0d",
             case_seen[0][1], case_seen[0][2], case_seen[0][3], case_seen[0][4],
             case_seen[1][1], case_seen[1][2], case_seen[1][3], case_seen[1][4],
             case_seen[2][1], case_seen[2][2], case_seen[2][3], case_seen[2][4]);
    $display("two-cycle Q path %0d, hot-carry path %0d; complement of zero %0d, non-zero %0d",
             seq_q_path, seq_hot_path, neg_zero, neg_nonzero);
    $display("back-to-back starts %0d, ignored starts while busy %0d", back_to_back, ignored_start);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
