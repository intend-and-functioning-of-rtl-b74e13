// tb_cs_coef_regs -- checks the coefficient registers: loading
// lambda_j*alpha^(j*START), renewal by alpha^(j*P) every advancing cycle,
// holding when idle, load priority over advance, and the full-width root
// test of the p-th row against a locator polynomial with known roots.
module tb_cs_coef_regs;
  import ref_gf_pkg::*;

  localparam int T = 6;
  localparam int P = 5;
  localparam int START = 16000;   // exponents wrap past 2^14-1 during the run
  localparam int CYC = 60;

  int checks = 0, failures = 0;
  int roots_seen = 0;
  logic clk, rst_n = 0, load = 0, adv = 0;
  logic [T:0][13:0] lambda;
  logic [T:1][13:0] regs;
  logic [13:0] l0;
  logic rowp_zero;

  cs_coef_regs #(.T(T), .P(P), .START(START)) dut (
    .clk, .rst_n, .load, .adv, .lambda, .regs, .l0, .rowp_zero
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  poly_t lam;
  int deg;

  // Lambda with roots alpha^(START+(c+1)*P) for the chosen cycles c, times a
  // nonzero scale so lambda_0 is not 1.
  task automatic build(input int cs [], input elem_t scale);
    poly_t nw;
    elem_t r;
    foreach (lam[i]) lam[i] = '0;
    lam[0] = scale;
    deg = 0;
    foreach (cs[n]) begin
      r = rinv(rpow(int'(START + (cs[n] + 1) * P))); // 1 + x/root
      foreach (nw[i]) nw[i] = '0;
      for (int i = 0; i <= deg; i++) begin
        nw[i]     ^= lam[i];
        nw[i + 1] ^= rmul(lam[i], r);
      end
      deg++;
      lam = nw;
    end
    for (int j = 0; j <= T; j++) lambda[j] = lam[j];
  endtask

  task automatic run(input int cs []);
    bit is_root;
    // load together with adv: load must win
    @(negedge clk); load = 1; adv = 1;
    @(negedge clk); load = 0; adv = 0;
    for (int c = 0; c < CYC; c++) begin
      for (int j = 1; j <= T; j++) begin
        checks++;
        if (regs[j] !== rmul(lam[j], rpow(int'(j * (START + c * P))))) begin
          failures++;
          $display("FAIL reg %0d cycle %0d: %h", j, c, regs[j]);
        end
      end
      is_root = 0;
      foreach (cs[n]) if (cs[n] == c) is_root = 1;
      checks++;
      if (rowp_zero !== is_root ||
          rowp_zero !== (peval(lam, T, int'(START + (c + 1) * P)) == 0)) begin
        failures++;
        $display("FAIL rowp_zero cycle %0d: %b exp %b", c, rowp_zero, is_root);
      end
      if (rowp_zero) roots_seen++;
      // every third cycle hold, the others advance
      adv = (c % 3 != 1);
      @(negedge clk);
      if (!adv) begin
        // registers must not have moved: retest the same cycle
        checks++;
        if (regs[1] !== rmul(lam[1], rpow(int'(START + c * P)))) begin
          failures++;
          $display("FAIL hold at cycle %0d", c);
        end
        adv = 1;
        @(negedge clk);
      end
      adv = 0;
    end
  endtask

  initial begin
    lambda = '0;
    #12 rst_n = 1;
    checks++;
    if (regs !== '0 || l0 !== '0) begin failures++; $display("FAIL reset"); end
    build('{0, 7, 8, 33, 59}, 14'h0001);
    run('{0, 7, 8, 33, 59});
    build('{2, 3, 4, 20, 21, 58}, 14'h1a2b);
    checks++;
    if (l0 !== 14'h0001) begin failures++; $display("FAIL l0 before reload"); end
    run('{2, 3, 4, 20, 21, 58});
    checks++;
    if (l0 !== 14'h1a2b) begin failures++; $display("FAIL l0 after reload"); end
    checks++;
    if (roots_seen != 11) begin failures++; $display("FAIL roots seen %0d", roots_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
