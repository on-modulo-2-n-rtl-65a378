// tb_mod_add_2cycle: self-checking test of the two-cycle modular adder.
//
// A 5-bit copy is run over every pair of canonical residues and the default
// 16-bit one over directed pairs for each case of the addition table and
// random pairs.  Each addition is started with a one-cycle start pulse, the
// operands are held, and the test checks that valid rises exactly two cycles
// after start and stays high for one cycle, that busy covers the operation,
// and that the sum, zero indicator, the flip-flop's Q and C_n match integer
// arithmetic modulo m = 2^n + 1.  The path through the flip-flop (Q = 1,
// hot carry suppressed) and the hot-carry path (Q = 0, I_x I_y = 1) must both
// occur.
module tb_mod_add_2cycle;
  import mod2n1_ref_pkg::*;

  int checks = 0, failures = 0;
  int case_seen [1:4];
  int q_path = 0, hot_path = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        st5, st16;
  logic [4:0]  x5, y5, s5;
  logic        ix5, iy5, is5, v5, b5, q5, cn5;
  logic [15:0] x16, y16, s16;
  logic        ix16, iy16, is16, v16, b16, q16, cn16;

  mod_add_2cycle #(.N(5)) u5 (.clk(clk), .rst_n(rst_n), .start(st5),
    .x(x5), .ix(ix5), .y(y5), .iy(iy5),
    .s(s5), .is_(is5), .valid(v5), .busy(b5), .q(q5), .cn(cn5));
  mod_add_2cycle u16 (.clk(clk), .rst_n(rst_n), .start(st16),
    .x(x16), .ix(ix16), .y(y16), .iy(iy16),
    .s(s16), .is_(is16), .valid(v16), .busy(b16), .q(q16), .cn(cn16));

  task automatic run(int n, longint unsigned x, bit ix, longint unsigned y, bit iy);
    longint unsigned es, gs;
    bit ei, gi, gq, gcn, gv, gb;
    int lat;
    mod_add(n, x, ix, y, iy, es, ei);
    case_seen[add_case(n, x, ix, y, iy)]++;
    if (flag_q(n, x, y)) q_path++;
    else if (ix && iy) hot_path++;
    @(negedge clk);
    if (n == 5) begin x5 = 5'(x); ix5 = ix; y5 = 5'(y); iy5 = iy; st5 = 1; end
    else begin x16 = 16'(x); ix16 = ix; y16 = 16'(y); iy16 = iy; st16 = 1; end
    @(negedge clk);
    st5 = 0; st16 = 0;
    lat = 1;
    forever begin
      gv = (n == 5) ? v5 : v16;
      gb = (n == 5) ? b5 : b16;
      if (gv || lat > 4) break;
      checks++;
      if (!gb) begin failures++; $display("FAIL busy low during operation"); end
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != 2) begin
      failures++;
      $display("FAIL n=%0d latency %0d cycles, expected 2", n, lat);
    end
    if (n == 5) begin gs = s5; gi = is5; gq = q5; gcn = cn5; end
    else begin gs = s16; gi = is16; gq = q16; gcn = cn16; end
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
    @(negedge clk);
    checks++;
    if (((n == 5) ? v5 : v16) || ((n == 5) ? b5 : b16)) begin
      failures++;
      $display("FAIL valid or busy still high after the result cycle");
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned x, y;
    bit ix, iy;
    for (int c = 1; c <= 4; c++) case_seen[c] = 0;
    st5 = 0; st16 = 0;
    x5 = 0; y5 = 0; ix5 = 0; iy5 = 0; x16 = 0; y16 = 0; ix16 = 0; iy16 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = -1; a < 32; a++)
      for (int b = -1; b < 32; b++)
        run(5, a < 0 ? 0 : a, a >= 0, b < 0 ? 0 : b, b >= 0);
    run(16, 0, 0, 0, 0);
    run(16, 0, 0, 16'h00ff, 1);
    run(16, 16'h1234, 1, 16'h0fff, 1);
    run(16, 16'h8000, 1, 16'h7fff, 1);
    run(16, 16'hffff, 1, 16'h0001, 1);
    run(16, 16'hffff, 1, 16'hffff, 1);
    for (int t = 0; t < 3000; t++) begin
      rand_residue(16, x, ix);
      rand_residue(16, y, iy);
      run(16, x, ix, y, iy);
    end
    for (int c = 1; c <= 4; c++) begin
      checks++;
      if (case_seen[c] == 0) begin
        failures++;
        $display("FAIL addition case %0d never exercised", c);
      end
    end
    checks++;
    if (q_path == 0 || hot_path == 0) begin
      failures++;
      $display("FAIL Q path %0d times, hot-carry path %0d times", q_path, hot_path);
    end
    $display("cases i=%0d ii=%0d iii=%0d iv=%0d; Q path %0d, hot-carry path %0d",
             case_seen[1], case_seen[2], case_seen[3], case_seen[4], q_path, hot_path);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
