// tb_systolic_cell: checks one processing element, sum_o = sum_i + a*x + b*y
// modulo 2**ACC_W, on extreme operands and random ones, including partial
// sums near the ends of the ACC_W range so that wrap-around is exercised.
module tb_systolic_cell;
  localparam int DW = 8;
  localparam int AW = 21;
  logic signed [DW-1:0] x, y, a, b;
  logic signed [AW-1:0] sum_i, sum_o;
  int checks = 0, failures = 0;

  systolic_cell #(.DATA_W(DW), .ACC_W(AW)) dut (
    .x(x), .y(y), .a(a), .b(b), .sum_i(sum_i), .sum_o(sum_o)
  );

  task automatic check(logic signed [DW-1:0] xv, logic signed [DW-1:0] yv,
                       logic signed [DW-1:0] av, logic signed [DW-1:0] bv,
                       logic signed [AW-1:0] sv);
    longint exp;
    x = xv; y = yv; a = av; b = bv; sum_i = sv;
    #1;
    exp = longint'(sv) + longint'(xv) * longint'(av) + longint'(yv) * longint'(bv);
    checks++;
    if (sum_o != AW'(exp)) begin
      failures++;
      $display("FAIL x=%0d a=%0d y=%0d b=%0d s=%0d -> %0d", xv, av, yv, bv, sv, sum_o);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(-8'sd128, -8'sd128, -8'sd128, -8'sd128, '0);
    check(8'sd127, -8'sd128, -8'sd128, 8'sd127, '0);
    check(8'sd5, 8'sd0, 8'sd0, 8'sd7, 21'sd1000);
    check(8'sd0, 8'sd3, 8'sd9, 8'sd0, -21'sd1000);
    check(-8'sd1, -8'sd1, 8'sd1, 8'sd1, 21'h0fffff);
    for (int k = 0; k < 3000; k++) begin
      check(8'($urandom), 8'($urandom), 8'($urandom), 8'($urandom), AW'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
