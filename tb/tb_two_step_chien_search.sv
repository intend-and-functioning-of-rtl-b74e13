// tb_two_step_chien_search -- end-to-end test of the two-step parallel Chien search,
// at a reduced size (N=1003, T=8, P=8, W1=4) so that the last group is partial.
//
// Each test word is a set of error positions (indices in arrival order).
// The testbench builds the error-locator polynomial
//   Lambda(x) = s * prod (1 + alpha^l x),  l = N-1-idx,
// with a random nonzero scale s, loads it, and checks for every output group
// the error-location bits, the group index, the last-group flag and the
// exact cycle (two edges after the accepting start edge, one group per
// cycle). The reference also evaluates Lambda at every scanned exponent, by
// stepping lambda_j*alpha^(j*i) itself, and checks in the cycle before each
// output group which rows had their second (LSB) step active.
// Mechanisms counted, each of which must occur: roots in every row, step-2
// activations without a root, skipped second steps, back-to-back starts,
// starts ignored during a scan and a last group only partly inside the code.
module tb_two_step_chien_search;
  import ref_gf_pkg::*;

  localparam int N  = 1003;
  localparam int T  = 8;
  localparam int P  = 8;
  localparam int W1 = 4;
  localparam int G  = (N + P - 1) / P;
  localparam int START = 16384 - N - 1;
  localparam int GW = (G > 1) ? $clog2(G) : 1;

  int checks = 0, failures = 0;
  logic clk, rst_n, start;
  logic [T:0][13:0] lambda;
  logic busy, out_valid, out_last;
  logic [P-1:0] out_loc;
  logic [GW-1:0] out_group;
  logic [P-2:0] step2_active;

  two_step_chien_search #(.N(N), .T(T), .P(P), .W1(W1)) dut (
    .clk, .rst_n, .start, .lambda, .busy, .out_valid, .out_loc, .out_group,
    .out_last, .step2_active
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int edge_no = 0;
  always @(posedge clk) edge_no <= edge_no + 1;  // read after #1 or at negedge

  // mechanism counters
  int row_roots [P];
  int n_false_alarm = 0, n_skipped = 0, n_b2b = 0, n_ignored = 0;
  int n_partial = 0, n_words = 0, n_act = 0, n_pos = 0;

  class word_c;
    int acc;          // edge number at which start was accepted
    bit root [];      // expected out_loc bits, by index
    bit act  [];      // expected step-2 activity, by index
  endclass

  word_c q [$];

  initial begin
    #(30 * (G + 2) * 10 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- output checker ----------------
  always @(negedge clk) begin
    if (rst_n) begin
      foreach (q[w]) begin
        int g;
        // step-2 activity of group g is visible at edge acc+1+g
        g = edge_no - q[w].acc - 1;
        if (g >= 0 && g < G) begin
          for (int k = 1; k < P; k++) begin
            checks++;
            if (step2_active[k-1] !== q[w].act[g*P + k - 1]) begin
              failures++;
              $display("FAIL step2 word@%0d group %0d row %0d: %b", q[w].acc, g, k,
                       step2_active[k-1]);
            end
          end
        end
      end
      if (q.size() > 0 && edge_no >= q[0].acc + 2) begin
        word_c wd;
        logic [P-1:0] e;
        int g;
        wd = q[0];
        g = edge_no - wd.acc - 2;
        for (int k = 0; k < P; k++) e[k] = (g * P + k < N) ? wd.root[g * P + k] : 1'b0;
        checks++;
        if (out_valid !== 1'b1 || out_group !== GW'(g) || out_last !== (g == G - 1) ||
            out_loc !== e || busy !== 1'b1) begin
          failures++;
          $display("FAIL out word@%0d group %0d: valid=%b grp=%0d last=%b loc=%b exp %b",
                   wd.acc, g, out_valid, out_group, out_last, out_loc, e);
        end
        for (int k = 0; k < P; k++) if (e[k]) row_roots[k]++;
        if (g == G - 1) begin
          if (G * P > N) n_partial++;
          void'(q.pop_front());
        end
      end else begin
        checks++;
        if (out_valid !== 1'b0) begin
          failures++;
          $display("FAIL unexpected out_valid at edge %0d", edge_no);
        end
      end
    end
  end

  // ---------------- stimulus ----------------
  poly_t lam;
  int deg;

  task automatic build(input int idxs [$], input elem_t scale, output word_c wd);
    poly_t nw;
    elem_t r;
    elem_t terms [0:MAXDEG];
    elem_t s;
    foreach (lam[i]) lam[i] = '0;
    lam[0] = scale;
    deg = 0;
    foreach (idxs[n]) begin
      r = rpow(N - 1 - idxs[n]);
      foreach (nw[i]) nw[i] = '0;
      for (int i = 0; i <= deg; i++) begin
        nw[i]     ^= lam[i];
        nw[i + 1] ^= rmul(lam[i], r);
      end
      deg++;
      lam = nw;
    end
    wd = new;
    wd.root = new [G * P];
    wd.act  = new [G * P];
    foreach (wd.root[i]) wd.root[i] = 1'b0;
    foreach (idxs[n]) wd.root[idxs[n]] = 1'b1;
    // reference evaluation at alpha^(START+1+idx), stepping the terms
    for (int j = 0; j <= deg; j++) terms[j] = rmul(lam[j], rpow(j * (START + 1)));
    for (int idx = 0; idx < G * P; idx++) begin
      s = '0;
      for (int j = 0; j <= deg; j++) s ^= terms[j];
      if (idx < N && (s == '0) != wd.root[idx]) begin
        failures++;
        $display("FAIL reference polynomial at idx %0d", idx);
      end
      wd.act[idx] = (s[13 -: W1] == '0) && (idx % P != P - 1);
      if (idx % P != P - 1) begin
        n_pos++;
        if (wd.act[idx]) begin
          n_act++;
          if (idx >= N || !wd.root[idx]) n_false_alarm++;
        end else n_skipped++;
      end
      for (int j = 0; j <= deg; j++) terms[j] = rmul(terms[j], rpow(j));
    end
    for (int j = 0; j <= T; j++) lambda[j] = lam[j];
  endtask

  int last_acc = -1000000;

  // Present a word; 'b2b' keeps start high from the cycle after the previous
  // acceptance so the word is taken the first cycle the scan allows.
  task automatic send(input int idxs [$], input bit b2b, input bit poke);
    word_c wd;
    elem_t sc;
    sc = 14'($urandom_range(1, 16383));
    if (n_words % 3 == 0) sc = 14'd1;
    build(idxs, sc, wd);
    // without b2b, wait until the previous scan has ended
    if (!b2b) while (edge_no < last_acc + G + 1) @(negedge clk);
    start = 1'b1;
    forever begin
      @(posedge clk);
      #1;
      if (edge_no >= last_acc + G + 1) break;
    end
    if (b2b && edge_no == last_acc + G + 1) n_b2b++;
    wd.acc = edge_no;
    last_acc = edge_no;
    q.push_back(wd);
    n_words++;
    @(negedge clk);
    start = 1'b0;
    if (poke) begin
      // a start with different coefficients in mid-scan must be ignored
      repeat (G / 2) @(negedge clk);
      foreach (lambda[j]) lambda[j] = 14'($urandom);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      n_ignored++;
    end
  endtask

  function automatic void rand_set(int v, ref int idxs [$]);
    int x;
    bit used [];
    used = new [N];
    idxs.delete();
    while (idxs.size() < v) begin
      x = $urandom_range(0, N - 1);
      if (!used[x]) begin used[x] = 1'b1; idxs.push_back(x); end
    end
  endfunction

  initial begin
    int idxs [$];
    start = 1'b0;
    lambda = '0;
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    checks++;
    if (busy !== 1'b0 || out_valid !== 1'b0) begin
      failures++;
      $display("FAIL not idle after reset");
    end
    @(negedge clk);
    // no errors, then a single error at each end of the word
    idxs.delete(); send(idxs, 0, 0);
    idxs = '{0}; send(idxs, 0, 0);
    idxs = '{N - 1}; send(idxs, 0, 0);
    // one error in every row, back to back
    idxs = '{0, 9, 18, 27, 36, 45, 54, 63}; send(idxs, 1, 0);
    // random words with up to T errors; some back to back, some poked
    for (int n = 0; n < 12; n++) begin
      rand_set($urandom_range(1, T), idxs);
      send(idxs, n % 2 == 1, n % 4 == 1);
    end
    // a full-strength word with errors in the last (partial) group
    idxs = '{N - 1, N - 2, N - 3, 1, 2, 3, 500, 777}; send(idxs, 1, 0);

    // drain
    while (q.size() > 0) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (busy !== 1'b0) begin failures++; $display("FAIL busy after drain"); end
    $display("words %0d, positions in split rows %0d, step-2 activations %0d (false alarms %0d, %0d skipped)",
             n_words, n_pos, n_act, n_false_alarm, n_skipped);
    $display("back-to-back starts %0d, ignored starts %0d, partial last groups %0d",
             n_b2b, n_ignored, n_partial);
    for (int k = 0; k < P; k++) begin
      checks++;
      if (row_roots[k] == 0) begin failures++; $display("FAIL no root in row %0d", k + 1); end
    end
    checks++;
    if (n_false_alarm == 0 || n_skipped == 0 || n_b2b == 0 || n_ignored == 0 || n_partial == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
