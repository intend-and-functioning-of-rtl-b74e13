// cs_two_step_row -- one row k (1 <= k < p) of the two-step parallel Chien
// search.
//
// The row tests whether lambda_0 + sum_j regs[j]*alpha^(j*k) is zero. The
// test is split in two steps along the bits of the sum:
//   step 1 (this cycle): partial FFMs produce only the W1 most significant
//     bits of every product; their XOR with lambda_0's MSBs is tested for
//     zero and the outcome is stored in a pipeline register (s1_zero_q);
//   step 2 (next cycle): partial FFMs produce the remaining M-W1 least
//     significant bits from regs_s2, register values supplied by the caller
//     for the next cycle. With S2_BACK = 0 these are the previous cycle's
//     values saved in delay registers, multiplied by alpha^(j*k) as in step
//     1. With S2_BACK = P they are the already renewed registers, which are
//     P positions ahead, so the constants become alpha^(j*(k-P)).
//     The FFM inputs are ANDed with s1_zero_q, so when step 1 already ruled
//     the position out, the step-2 network sees constant zeros and does not
//     switch. root = s1_zero_q and the LSB sum is zero.
// A non-root position passes step 1 with probability about 2^-W1, so the
// LSB multipliers are idle almost all the time; that is the power saving.
//
// Interface/timing: regs and en are sampled on the rising edge; in the
// following cycle regs_s2 must hold those values advanced by S2_BACK
// positions, and root and step2_active are valid (combinational from
// s1_zero_q and regs_s2). en=0 clears the stored step-1 result.
// Asynchronous active-low reset.
// The split into MSB and LSB steps, the pipeline register between them and
// activation of step 2 only after a zero step 1 follow the described
// architecture; W1, the operand-isolation style and the S2_BACK = P variant
// (step 2 from the renewed registers) are this design's choice.
module cs_two_step_row #(
  parameter int unsigned T  = 40,
  parameter int unsigned K  = 1,
  parameter int unsigned W1 = 4,
  parameter int unsigned S2_BACK = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  gf_pkg::gf_t [T:1] regs,
  input  gf_pkg::gf_t [T:1] regs_s2,
  input  gf_pkg::gf_t       l0,
  output logic              root,
  output logic              step2_active
);
  import gf_pkg::*;

  localparam int unsigned W2 = M - W1;
  // step-2 constant exponent per coefficient index: K - S2_BACK, modulo 2^M-1
  localparam int unsigned K2 = K + Q1 - (S2_BACK % Q1);

  logic [W1-1:0] msb [T:1];
  logic [W2-1:0] lsb [T:1];
  gf_t  [T:1]    gated;
  logic          s1_zero;
  logic          s1_zero_q;

  for (genvar j = 1; j <= int'(T); j++) begin : g_term
    gf_const_mult #(.EXP(j * K), .LO(W2), .HI(M-1)) u_msb (
      .a(regs[j]), .y(msb[j])
    );
    assign gated[j] = regs_s2[j] & {M{s1_zero_q}};
    gf_const_mult #(.EXP(j * K2), .LO(0), .HI(W2-1)) u_lsb (
      .a(gated[j]), .y(lsb[j])
    );
  end

  // Step 1: MSB partial sum.
  always_comb begin
    logic [W1-1:0] s;
    s = l0[M-1:W2];
    for (int j = 1; j <= int'(T); j++) s = s ^ msb[j];
    s1_zero = (s == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_zero_q <= 1'b0;
    else        s1_zero_q <= en & s1_zero;
  end

  // Step 2: LSB partial sum, only meaningful when step 1 found zero.
  always_comb begin
    logic [W2-1:0] s;
    s = l0[W2-1:0] & {W2{s1_zero_q}};
    for (int j = 1; j <= int'(T); j++) s = s ^ lsb[j];
    root = s1_zero_q & (s == '0);
  end

  assign step2_active = s1_zero_q;

  if (W1 < 1 || W1 >= M) begin : g_bad_w1
    $error("cs_two_step_row: W1=%0d must lie in 1..%0d", W1, M - 1);
  end

endmodule
