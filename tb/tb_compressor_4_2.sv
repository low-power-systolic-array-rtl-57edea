// tb_compressor_4_2: exhaustive check of the 4:2 compressor.
// For all 32 input combinations it checks the column identity
// a + b + cix + c + d = s + 2 (co + cox), that s is the parity of all five
// inputs, and that the lateral carry cox is the majority of a, b and cix
// alone (it must not depend on the incoming lateral carry c).
module tb_compressor_4_2;
  logic a, b, cix, c, d, s, cox, co;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.a(a), .b(b), .cix(cix), .c(c), .d(d), .s(s), .cox(cox), .co(co));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int total, abx;
      {a, b, cix, c, d} = 5'(v);
      #1;
      total = int'(a) + int'(b) + int'(cix) + int'(c) + int'(d);
      abx   = int'(a) + int'(b) + int'(cix);
      checks++;
      if (int'(s) + 2 * (int'(co) + int'(cox)) != total) begin
        failures++;
        $display("FAIL sum a=%0b b=%0b cix=%0b c=%0b d=%0b -> s=%0b cox=%0b co=%0b",
                 a, b, cix, c, d, s, cox, co);
      end
      checks++;
      if (s != 1'(total)) begin
        failures++;
        $display("FAIL parity v=%0d", v);
      end
      checks++;
      if (cox != (abx >= 2)) begin
        failures++;
        $display("FAIL cox v=%0d", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
