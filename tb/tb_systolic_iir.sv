// tb_systolic_iir: checks the systolic recursive filter cycle by cycle
// against a difference-equation model that keeps its own sample history:
//     y(n) = wrap8( (sum_i a_i x(n-i) + sum_i b_{i+1} y(n-1-i)) >>> 5 )
// Two arrays are tested, one with an odd (13) and one with an even (6)
// number of cells, since the last cell of a pair is placed differently.
// Phase 1 uses random coefficients and samples with en randomly low (the
// array must hold).  Phase 2 loads the low-pass coefficients (x(n) -
// 2x(n-6) + x(n-12) with feedback 2y(n-1) - y(n-2)) into the 13-cell array
// and applies an impulse: the output must follow the model in every
// cycle, which also checks that y(n) appears in the cycle right after the
// edge that accepts x(n).
module tb_systolic_iir;
  import filter_pkg::*;

  localparam int C1 = 13;
  localparam int C2 = 6;
  localparam int FR = 5;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  sample_t x;
  coef_t a1 [C1], b1 [C1], a2 [C2], b2 [C2];
  sample_t y1, y2;
  int checks = 0, failures = 0;

  // Model history: xh[k] = x(n-k), yh[k] = y(n-k).
  int xh1 [C1], yh1 [C1+1], xh2 [C2], yh2 [C2+1];
  int holds = 0;

  systolic_iir #(.DATA_W(8), .FRAC(FR), .CELLS(C1)) dut1 (
    .clk(clk), .rst_n(rst_n), .en(en), .x_i(x), .coef_a_i(a1), .coef_b_i(b1), .y_o(y1));
  systolic_iir #(.DATA_W(8), .FRAC(FR), .CELLS(C2)) dut2 (
    .clk(clk), .rst_n(rst_n), .en(en), .x_i(x), .coef_a_i(a2), .coef_b_i(b2), .y_o(y2));

  always #5 clk = ~clk;

  function automatic int wrap8(longint v);
    return int'(sample_t'(v));
  endfunction

  task automatic clear_model();
    foreach (xh1[k]) xh1[k] = 0;
    foreach (yh1[k]) yh1[k] = 0;
    foreach (xh2[k]) xh2[k] = 0;
    foreach (yh2[k]) yh2[k] = 0;
  endtask

  // Advance both models by one accepted sample.
  task automatic step_model(int xv);
    longint acc;
    for (int k = C1 - 1; k > 0; k--) xh1[k] = xh1[k-1];
    xh1[0] = xv;
    for (int k = C1; k > 0; k--) yh1[k] = yh1[k-1];
    acc = 0;
    for (int i = 0; i < C1; i++) acc += longint'(a1[i]) * xh1[i] + longint'(b1[i]) * yh1[i+1];
    yh1[0] = wrap8(acc >>> FR);

    for (int k = C2 - 1; k > 0; k--) xh2[k] = xh2[k-1];
    xh2[0] = xv;
    for (int k = C2; k > 0; k--) yh2[k] = yh2[k-1];
    acc = 0;
    for (int i = 0; i < C2; i++) acc += longint'(a2[i]) * xh2[i] + longint'(b2[i]) * yh2[i+1];
    yh2[0] = wrap8(acc >>> FR);
  endtask

  task automatic compare(string tag);
    checks++;
    if (int'(y1) != yh1[0]) begin
      failures++;
      if (failures < 10) $display("FAIL %s 13-cell y=%0d exp=%0d at %0t", tag, y1, yh1[0], $time);
    end
    checks++;
    if (int'(y2) != yh2[0]) begin
      failures++;
      if (failures < 10) $display("FAIL %s 6-cell y=%0d exp=%0d at %0t", tag, y2, yh2[0], $time);
    end
  endtask

  // One clock cycle: drive at the falling edge, model at the rising edge,
  // compare just after it.
  task automatic cycle(logic e, sample_t xv, string tag);
    @(negedge clk);
    en = e;
    x  = xv;
    @(posedge clk);
    if (e) step_model(int'(xv));
    else   holds++;
    #1;
    compare(tag);
  endtask

  task automatic do_reset();
    en = 1'b0;
    x  = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    clear_model();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Phase 1: random coefficients and samples, en high about 3/4 of cycles.
    foreach (a1[i]) begin a1[i] = coef_t'($urandom); b1[i] = coef_t'($urandom); end
    foreach (a2[i]) begin a2[i] = coef_t'($urandom); b2[i] = coef_t'($urandom); end
    do_reset();
    compare("reset");
    for (int n = 0; n < 600; n++) begin
      cycle(($urandom % 4) != 0, sample_t'($urandom), "random");
    end

    // Phase 2: low-pass coefficients, impulse response.
    foreach (a1[i]) begin a1[i] = lp_a(i); b1[i] = lp_b(i + 1); end
    foreach (a2[i]) begin a2[i] = lp_a(i); b2[i] = lp_b(i + 1); end
    do_reset();
    cycle(1'b1, 8'sd1, "impulse");
    // The a_0 tap must show the impulse in the first cycle after acceptance.
    checks++;
    if (y1 != 8'sd1) begin
      failures++;
      $display("FAIL latency: y=%0d in the cycle after the impulse", y1);
    end
    for (int n = 0; n < 40; n++) cycle(1'b1, 8'sd0, "impulse");
    // Impulse response of (1 - z^-6)^2 / (1 - z^-1)^2 ends after 11 taps.
    checks++;
    if (y1 != 8'sd0) begin
      failures++;
      $display("FAIL impulse response does not settle to 0: %0d", y1);
    end
    for (int n = 0; n < 300; n++) begin
      cycle(($urandom % 3) != 0, sample_t'(int'($urandom % 7) - 3), "lowpass");
    end

    checks++;
    if (holds == 0) begin
      failures++;
      $display("FAIL no cycle with en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
