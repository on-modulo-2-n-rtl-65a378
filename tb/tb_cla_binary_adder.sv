// tb_cla_binary_adder: self-checking test of the look-ahead binary adder.
//
// A 4-bit copy is checked exhaustively (all a, b, cin) and the default
// 16-bit adder on random operands plus the carry-chain corner cases (all
// propagate, single generate at each position).  Sum and carry-out are
// compared with integer addition.
module tb_cla_binary_adder;

  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, s4;
  logic        c4, co4;
  logic [15:0] a16, b16, s16;
  logic        c16, co16;

  cla_binary_adder #(.N(4)) u4 (.a(a4), .b(b4), .cin(c4), .sum(s4), .cout(co4));
  cla_binary_adder          u16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));

  task automatic check16(logic [15:0] a, logic [15:0] b, logic c);
    logic [16:0] exp;
    a16 = a; b16 = b; c16 = c;
    #1;
    exp = 17'(a) + 17'(b) + 17'(c);
    checks++;
    if ({co16, s16} !== exp) begin
      failures++;
      $display("FAIL N=16 a=%h b=%h cin=%b got %b_%h exp %h", a, b, c, co16, s16, exp);
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
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++)
        for (int c = 0; c < 2; c++) begin
          a4 = 4'(a); b4 = 4'(b); c4 = c[0];
          #1;
          checks++;
          if ({co4, s4} !== 5'(a + b + c)) begin
            failures++;
            $display("FAIL N=4 a=%0d b=%0d cin=%0d got %b_%b", a, b, c, co4, s4);
          end
        end
    check16(16'hffff, 16'h0000, 1'b1);
    check16(16'hffff, 16'h0001, 1'b0);
    check16(16'haaaa, 16'h5555, 1'b1);
    for (int k = 0; k < 16; k++) begin
      logic [15:0] one = 16'(1) << k;
      check16(16'hffff ^ one, one, 1'b0);
      check16(one, one, 1'b0);
      check16(~one, 16'h0000 | one, 1'b1);
    end
    for (int t = 0; t < 5000; t++)
      check16(16'($urandom()), 16'($urandom()), 1'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
