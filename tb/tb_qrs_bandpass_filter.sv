// tb_qrs_bandpass_filter: end-to-end test of the band-pass filter at its
// default size (13-cell low-pass array followed by a 33-cell high-pass
// array), loaded with the coefficients of the two difference equations.
//
// The reference is a pair of difference-equation models with their own
// sample histories.  The high-pass model takes, at each accepted sample,
// the low-pass output of the previous sample, as the cascade does.  Both
// outputs are compared in every clock cycle, so the one-cycle output
// latency and the holding with en low are checked as well.
//
// Stimulus: an impulse (its low-pass response must be the 11-tap triangle
// 1 2 3 4 5 6 5 4 3 2 1), then a synthetic ECG-like trace (a narrow spike
// every 40 samples on a slow baseline wander, plus noise), then samples
// large enough to overflow the 8-bit outputs.  The testbench counts how
// often each mechanism of the array occurs and fails if one never does:
// cycles with en low, accepted samples with non-zero feedback, high-pass
// results whose fractional bits are dropped, and outputs wrapped to 8 bits.
module tb_qrs_bandpass_filter;
  import filter_pkg::*;

  localparam int FR = COEF_FRAC;

  logic clk = 1'b0;
  logic rst_n;
  logic en;
  sample_t x;
  coef_t lp_a_c [LP_CELLS], lp_b_c [LP_CELLS], hp_a_c [HP_CELLS], hp_b_c [HP_CELLS];
  sample_t lp_y, y;
  int checks = 0, failures = 0;

  // Model state: *_x[k] = input k samples ago, *_y[k] = output k samples ago.
  int lp_x [LP_CELLS], lp_yh [LP_CELLS+1], hp_x [HP_CELLS], hp_yh [HP_CELLS+1];

  // Mechanism counters.
  int n_hold = 0, n_feedback = 0, n_trunc = 0, n_wrap = 0, n_samples = 0;

  qrs_bandpass_filter dut (
    .clk(clk), .rst_n(rst_n), .en(en), .x_i(x),
    .lp_a_i(lp_a_c), .lp_b_i(lp_b_c), .hp_a_i(hp_a_c), .hp_b_i(hp_b_c),
    .lp_y_o(lp_y), .y_o(y)
  );

  always #5 clk = ~clk;

  // One section of the model: shift in xv, return the new output.
  function automatic int section(int xv, ref int xs [], ref int ys [],
                                 input coef_t a [], input coef_t b [], input bit count_trunc);
    longint acc = 0, fb = 0, q;
    int cells = xs.size();
    for (int k = cells - 1; k > 0; k--) xs[k] = xs[k-1];
    xs[0] = xv;
    for (int k = cells; k > 0; k--) ys[k] = ys[k-1];
    for (int i = 0; i < cells; i++) begin
      acc += longint'(a[i]) * xs[i];
      fb  += longint'(b[i]) * ys[i+1];
    end
    acc += fb;
    q = acc >>> FR;
    if (fb != 0) n_feedback++;
    if (count_trunc && (acc % (1 << FR)) != 0) n_trunc++;
    if (q > 127 || q < -128) n_wrap++;
    ys[0] = int'(sample_t'(q));
    return ys[0];
  endfunction

  // Dynamic copies used by the model function.
  int lxd [], lyd [], hxd [], hyd [];
  coef_t lad [], lbd [], had [], hbd [];

  task automatic step_model(int xv);
    int lp_prev;
    lp_prev = lyd[0];                 // low-pass output before this step
    void'(section(xv, lxd, lyd, lad, lbd, 1'b0));
    void'(section(lp_prev, hxd, hyd, had, hbd, 1'b1));
    n_samples++;
  endtask

  task automatic compare(string tag);
    checks++;
    if (int'(lp_y) != lyd[0]) begin
      failures++;
      if (failures < 10) $display("FAIL %s lp_y=%0d exp=%0d at %0t", tag, lp_y, lyd[0], $time);
    end
    checks++;
    if (int'(y) != hyd[0]) begin
      failures++;
      if (failures < 10) $display("FAIL %s y=%0d exp=%0d at %0t", tag, y, hyd[0], $time);
    end
  endtask

  task automatic cycle(logic e, sample_t xv, string tag);
    @(negedge clk);
    en = e;
    x  = xv;
    @(posedge clk);
    if (e) step_model(int'(xv));
    else   n_hold++;
    #1;
    compare(tag);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int lp_impulse [11] = '{1, 2, 3, 4, 5, 6, 5, 4, 3, 2, 1};

  initial begin
    int t;
    for (int i = 0; i < LP_CELLS; i++) begin lp_a_c[i] = lp_a(i); lp_b_c[i] = lp_b(i + 1); end
    for (int i = 0; i < HP_CELLS; i++) begin hp_a_c[i] = hp_a(i); hp_b_c[i] = hp_b(i + 1); end
    lxd = new[LP_CELLS]; lyd = new[LP_CELLS + 1];
    hxd = new[HP_CELLS]; hyd = new[HP_CELLS + 1];
    lad = new[LP_CELLS]; lbd = new[LP_CELLS];
    had = new[HP_CELLS]; hbd = new[HP_CELLS];
    foreach (lad[i]) begin lad[i] = lp_a_c[i]; lbd[i] = lp_b_c[i]; end
    foreach (had[i]) begin had[i] = hp_a_c[i]; hbd[i] = hp_b_c[i]; end
    foreach (lxd[i]) lxd[i] = 0;
    foreach (lyd[i]) lyd[i] = 0;
    foreach (hxd[i]) hxd[i] = 0;
    foreach (hyd[i]) hyd[i] = 0;

    en = 1'b0;
    x  = '0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    compare("reset");

    // Impulse: low-pass output must be the triangle, one sample per step,
    // each appearing in the cycle right after the accepting edge.
    for (int n = 0; n < 20; n++) begin
      cycle(1'b1, (n == 0) ? 8'sd1 : 8'sd0, "impulse");
      checks++;
      if (int'(lp_y) != ((n < 11) ? lp_impulse[n] : 0)) begin
        failures++;
        $display("FAIL low-pass impulse response step %0d: %0d", n, lp_y);
      end
    end
    // Let the high-pass section's 33-sample memory drain.
    for (int n = 0; n < 60; n++) cycle(1'b1, 8'sd0, "drain");

    // Synthetic ECG-like trace, one sample accepted every other cycle
    // with occasional longer gaps.
    t = 0;
    for (int n = 0; n < 1200; n++) begin
      int v;
      int ph = t % 40;
      v = (ph == 0) ? 3 : (ph == 1) ? -2 : 0;          // QRS-like spike
      v += ((t / 100) % 2 == 0) ? 0 : -1;              // baseline wander
      if ($urandom % 8 == 0) v += 1;                   // noise
      if ($urandom % 3 == 0) begin
        cycle(1'b0, sample_t'($urandom), "ecg-idle");  // x ignored with en low
      end else begin
        cycle(1'b1, sample_t'(v), "ecg");
        t++;
      end
    end

    // Large samples: outputs wrap to 8 bits.
    for (int n = 0; n < 200; n++) cycle(1'b1, sample_t'($urandom), "large");

    $display("samples=%0d hold=%0d feedback=%0d truncated=%0d wrapped=%0d",
             n_samples, n_hold, n_feedback, n_trunc, n_wrap);
    checks++; if (n_hold == 0)     begin failures++; $display("FAIL en never low"); end
    checks++; if (n_feedback == 0) begin failures++; $display("FAIL feedback never used"); end
    checks++; if (n_trunc == 0)    begin failures++; $display("FAIL no truncation"); end
    checks++; if (n_wrap == 0)     begin failures++; $display("FAIL no wrap-around"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
