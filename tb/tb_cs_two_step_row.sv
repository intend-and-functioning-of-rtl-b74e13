// tb_cs_two_step_row -- checks one two-step row against a reference sum.
//
// Every cycle a new set of register values is applied. Two rows are tested
// side by side: one whose step-2 operands are the previous cycle's values
// (delay registers, S2_BACK = 0) and one whose step-2 operands are those
// values advanced by SB positions (renewed registers, S2_BACK = SB). Vectors are of four kinds:
// random (step 1 almost always fails), exact roots, sums whose MSBs are zero
// but LSBs are not (step 2 active, no root), and sums with nonzero MSBs but
// zero LSBs (must be rejected by step 1). One cycle later root and
// step2_active must match the reference; en=0 must suppress both.
module tb_cs_two_step_row;
  import ref_gf_pkg::*;

  localparam int T  = 8;
  localparam int K  = 3;
  localparam int W1 = 4;
  localparam int NV = 3000;
  localparam int SB = 5;

  int checks = 0, failures = 0;
  int n_root = 0, n_false = 0, n_skip = 0;
  logic clk, rst_n = 0, en = 0;
  logic [T:1][13:0] regs, regs_d, regs_a;
  logic [13:0] l0;
  logic root, step2_active, root_b, step2_active_b;

  cs_two_step_row #(.T(T), .K(K), .W1(W1)) dut (
    .clk, .rst_n, .en, .regs, .regs_s2(regs_d), .l0, .root, .step2_active
  );

  cs_two_step_row #(.T(T), .K(K), .W1(W1), .S2_BACK(SB)) dut_b (
    .clk, .rst_n, .en, .regs, .regs_s2(regs_a), .l0, .root(root_b),
    .step2_active(step2_active_b)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  // the delay registers of the full design, and the registers renewed by SB
  // positions (regs[j]*alpha^(j*SB)) for the second row
  always @(posedge clk) begin
    regs_d <= regs;
    for (int j = 1; j <= T; j++) regs_a[j] <= rmul(regs[j], rpow(j * SB));
  end

  initial begin
    #((NV + 20) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic elem_t rowsum(logic [T:1][13:0] r, elem_t c0);
    elem_t s = c0;
    for (int j = 1; j <= T; j++) s ^= rmul(r[j], rpow(int'(j) * K));
    return s;
  endfunction

  initial begin
    logic [T:1][13:0] v;
    elem_t target, s, l0_next;
    int kind;
    bit exp_root, exp_act;
    regs = '0; l0 = 14'h0001; l0_next = 14'h0001; en = 0;
    exp_root = 0; exp_act = 0;
    #12 rst_n = 1;
    for (int n = 0; n < NV; n++) begin
      // new vector just after the edge that captured the previous one, so
      // that regs and regs_d differ while the previous vector's step 2 runs
      @(posedge clk);
      #1;
      if (n % 500 == 0) l0_next = 14'($urandom_range(1, 16383));
      for (int j = 1; j <= T; j++) v[j] = 14'($urandom);
      kind = $urandom_range(0, 3);
      if (kind != 0) begin
        case (kind)
          1: target = '0;                                   // root
          2: target = 14'($urandom_range(1, 1023));         // LSBs only
          default: target = {4'($urandom_range(1, 15)), 10'd0}; // MSBs only
        endcase
        v[1] = '0;
        s = rowsum(v, l0_next) ^ target;
        v[1] = rmul(s, rinv(rpow(K)));
      end
      regs = v;
      #1;
      // outcome of the vector applied in the previous cycle
      if (n > 0) begin
        checks++;
        if (root !== exp_root || step2_active !== exp_act) begin
          failures++;
          $display("FAIL vec %0d root=%b/%b act=%b/%b", n, root, exp_root,
                   step2_active, exp_act);
        end
        checks++;
        if (root_b !== exp_root || step2_active_b !== exp_act) begin
          failures++;
          $display("FAIL renewed-operand row, vec %0d root=%b/%b act=%b/%b", n,
                   root_b, exp_root, step2_active_b, exp_act);
        end
      end
      l0 = l0_next;
      en = ($urandom_range(0, 9) != 0);
      s = rowsum(v, l0);
      exp_act  = en && (s[13:10] == 0);
      exp_root = en && (s == 0);
      if (exp_root) n_root++;
      else if (exp_act) n_false++;
      else n_skip++;
    end
    $display("roots %0d, step-2 false alarms %0d, step 2 skipped %0d",
             n_root, n_false, n_skip);
    checks++;
    if (n_root == 0 || n_false == 0 || n_skip == 0) begin
      failures++;
      $display("FAIL a case never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
