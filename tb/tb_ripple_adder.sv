// tb_ripple_adder: checks the 16-bit ripple-carry adder (the width of the
// multiplier's final adder) against the + operator on corner cases and
// 2000 random operand pairs, with and without carry-in, and a 5-bit
// instance exhaustively.
module tb_ripple_adder;
  logic [15:0] a, b, s;
  logic        ci, co;
  logic [4:0]  a5, b5, s5;
  logic        ci5, co5;
  int checks = 0, failures = 0;

  ripple_adder #(.W(16)) dut   (.a(a), .b(b), .ci(ci), .s(s), .co(co));
  ripple_adder #(.W(5))  dut5  (.a(a5), .b(b5), .ci(ci5), .s(s5), .co(co5));

  task automatic check16(logic [15:0] x, logic [15:0] y, logic c);
    logic [16:0] exp;
    a = x; b = y; ci = c;
    #1;
    exp = 17'(x) + 17'(y) + 17'(c);
    checks++;
    if ({co, s} != exp) begin
      failures++;
      $display("FAIL %h + %h + %b -> %b %h (exp %h)", x, y, c, co, s, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'hffff, 16'h0000, 1'b1);
    check16(16'hffff, 16'hffff, 1'b1);
    check16(16'h8000, 16'h8000, 1'b0);
    check16(16'h7fff, 16'h0001, 1'b0);
    for (int k = 0; k < 2000; k++) begin
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    end
    for (int v = 0; v < 2048; v++) begin
      {ci5, a5, b5} = 11'(v);
      #1;
      checks++;
      if ({co5, s5} != 6'(a5) + 6'(b5) + 6'(ci5)) begin
        failures++;
        $display("FAIL w5 %h + %h + %b", a5, b5, ci5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
