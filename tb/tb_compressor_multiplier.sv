// tb_compressor_multiplier: checks the signed compressor multiplier.
// The default 8 x 8 instance (two compressor levels) is checked on all
// 65536 operand pairs, a 4 x 4 instance (one level) on all 256 pairs, and a
// 16 x 16 instance (three levels) on corner cases and random pairs.  The
// expected product is the signed * operator.
module tb_compressor_multiplier;
  logic signed [7:0]  a8, b8;
  logic signed [15:0] p8;
  logic signed [3:0]  a4, b4;
  logic signed [7:0]  p4;
  logic signed [15:0] a16, b16;
  logic signed [31:0] p16;
  int checks = 0, failures = 0;

  compressor_multiplier               dut8  (.a(a8),  .b(b8),  .p(p8));
  compressor_multiplier #(.N(4))      dut4  (.a(a4),  .b(b4),  .p(p4));
  compressor_multiplier #(.N(16))     dut16 (.a(a16), .b(b16), .p(p16));

  task automatic check16(logic signed [15:0] x, logic signed [15:0] y);
    a16 = x; b16 = y;
    #1;
    checks++;
    if (p16 != 32'(x) * 32'(y)) begin
      failures++;
      $display("FAIL 16b %0d * %0d -> %0d", x, y, p16);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -128; x < 128; x++) begin
      for (int y = -128; y < 128; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        checks++;
        if (int'(p8) != x * y) begin
          failures++;
          if (failures < 10) $display("FAIL 8b %0d * %0d -> %0d", x, y, p8);
        end
      end
    end
    for (int x = -8; x < 8; x++) begin
      for (int y = -8; y < 8; y++) begin
        a4 = 4'(x); b4 = 4'(y);
        #1;
        checks++;
        if (int'(p4) != x * y) begin
          failures++;
          $display("FAIL 4b %0d * %0d -> %0d", x, y, p4);
        end
      end
    end
    check16(16'sh8000, 16'sh8000);
    check16(16'sh7fff, 16'sh8000);
    check16(16'sh7fff, 16'sh7fff);
    check16(-16'sd1, -16'sd1);
    for (int k = 0; k < 3000; k++) begin
      check16(16'($urandom), 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
