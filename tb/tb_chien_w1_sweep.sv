// tb_chien_w1_sweep -- first-step width sweep.
//
// Five copies of the two-step Chien search (N=2000, T=16, P=8) differ only
// in the number of bits W1 tested in the first step: 2, 3, 4, 6 and 8. They
// receive the same error-locator polynomials, built from random error
// positions (up to T per word). For every copy the testbench checks that
// each output group flags exactly the chosen positions, and it counts how
// often the second (LSB) step was active. For positions that are not roots a
// random sum passes the first step with probability 2^-W1, so the counted
// rate must lie within a factor of two of that; it must also fall as W1
// grows. The printed table gives, per W1, the fraction of partial-FFM
// output bits in use: W1/14 for step 1 plus (14-W1)/14 times the step-2
// activity.
module tb_chien_w1_sweep;
  import ref_gf_pkg::*;

  localparam int N = 2000;
  localparam int T = 16;
  localparam int P = 8;
  localparam int G = (N + P - 1) / P;
  localparam int GW = $clog2(G);
  localparam int NW = 6;                 // words
  localparam int NC = 5;                 // copies
  localparam int W1S [NC] = '{2, 3, 4, 6, 8};

  int checks = 0, failures = 0;
  logic clk, rst_n, start;
  logic [T:0][13:0] lambda;
  logic [NC-1:0] busy, out_valid, out_last;
  logic [P-1:0] out_loc [NC];
  logic [GW-1:0] out_group [NC];
  logic [P-2:0] act [NC];

  for (genvar c = 0; c < NC; c++) begin : g_dut
    two_step_chien_search #(.N(N), .T(T), .P(P), .W1(W1S[c])) dut (
      .clk, .rst_n, .start, .lambda, .busy(busy[c]), .out_valid(out_valid[c]),
      .out_loc(out_loc[c]), .out_group(out_group[c]), .out_last(out_last[c]),
      .step2_active(act[c])
    );
  end

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    #((NW + 1) * (G + 10) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit   expb [G * P];
  int   n_act [NC];
  int   n_root_rows = 0;    // roots in rows 1..P-1 (always activate step 2)
  int   n_rows = 0;         // row-positions in rows 1..P-1 (whole groups)

  // count step-2 activity of every copy
  always @(negedge clk) begin
    for (int c = 0; c < NC; c++) n_act[c] += $countones(act[c]);
  end

  initial begin
    poly_t lam, nw;
    int deg, x, v;
    elem_t r;
    real rate, lo, hi, prev_rate;
    foreach (n_act[c]) n_act[c] = 0;
    start = 1'b0;
    lambda = '0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < NW; w++) begin
      foreach (expb[i]) expb[i] = 1'b0;
      foreach (lam[i]) lam[i] = '0;
      lam[0] = 14'($urandom_range(1, 16383));
      deg = 0;
      v = $urandom_range(1, T);
      while (deg < v) begin
        x = $urandom_range(0, N - 1);
        if (!expb[x]) begin
          expb[x] = 1'b1;
          if (x % P != P - 1) n_root_rows++;
          r = rpow(N - 1 - x);
          foreach (nw[i]) nw[i] = '0;
          for (int i = 0; i <= deg; i++) begin
            nw[i]     ^= lam[i];
            nw[i + 1] ^= rmul(lam[i], r);
          end
          deg++;
          lam = nw;
        end
      end
      for (int j = 0; j <= T; j++) lambda[j] = lam[j];
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      n_rows += G * (P - 1);
      // outputs: G groups starting two edges after the start edge
      @(negedge clk);
      for (int g = 0; g < G; g++) begin
        @(negedge clk);
        for (int c = 0; c < NC; c++) begin
          logic [P-1:0] e;
          for (int k = 0; k < P; k++) e[k] = expb[g * P + k];
          checks++;
          if (out_valid[c] !== 1'b1 || out_group[c] !== GW'(g) || out_loc[c] !== e ||
              out_last[c] !== (g == G - 1)) begin
            failures++;
            $display("FAIL W1=%0d word %0d group %0d: valid=%b loc=%b exp %b", W1S[c], w,
                     g, out_valid[c], out_loc[c], e);
          end
        end
      end
      @(negedge clk);
      checks++;
      if (out_valid !== '0) begin failures++; $display("FAIL extra output"); end
    end
    repeat (2) @(negedge clk);
    checks++;
    if (busy !== '0) begin failures++; $display("FAIL busy after the last word"); end
    $display("  W1   step-2 activations   non-root rate   2^-W1     FFM output bits in use");
    prev_rate = 1.0;
    for (int c = 0; c < NC; c++) begin
      rate = real'(n_act[c] - n_root_rows) / real'(n_rows - n_root_rows);
      lo = 0.5 / real'(1 << W1S[c]);
      hi = 2.0 / real'(1 << W1S[c]);
      $display("  %2d   %8d             %8.5f        %8.5f  %6.3f", W1S[c], n_act[c], rate,
               1.0 / real'(1 << W1S[c]),
               real'(W1S[c]) / 14.0 + real'(14 - W1S[c]) / 14.0 * real'(n_act[c]) / real'(n_rows));
      checks++;
      if (rate < lo || rate > hi || rate >= prev_rate) begin
        failures++;
        $display("FAIL W1=%0d step-2 rate %f outside [%f, %f] or not decreasing", W1S[c],
                 rate, lo, hi);
      end
      prev_rate = rate;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
