// cs_coef_regs -- coefficient registers of the p-parallel Chien search,
// renewed through the full FFMs of the p-th row.
//
// Register j (j = 1..T) holds lambda_j * alpha^(j*b), where b is the exponent
// just before the p positions tested in the current cycle. Row k of the
// search needs lambda_j * alpha^(j*(b+k)) = regs[j] * alpha^(j*k). For k = p
// that product is exactly the register's next value, so the p-th row's FFMs
// are always evaluated in full: they renew the registers every cycle and the
// same products give the p-th row's root test (lambda_0 plus their sum equal
// to zero), computed here at full width in a single step.
//
// Timing: on a clock edge with load=1 the registers take
// lambda_j * alpha^(j*START) (a constant FFM per coefficient) and lambda_0 is
// held; on an edge with adv=1 (and load=0) they take regs[j]*alpha^(j*P).
// rowp_zero is combinational and refers to position b+P of the current cycle.
// Reset clears the registers asynchronously (active-low).
//
// The renewal by the p-th row follows the described architecture; the load
// constant alpha^(j*START), which starts the scan at the first received bit
// of a shortened code, is this design's choice.
module cs_coef_regs #(
  parameter int unsigned     T     = 40,
  parameter int unsigned     P     = 8,
  parameter int unsigned START = 7631
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                adv,
  input  gf_pkg::gf_t [T:0]   lambda,
  output gf_pkg::gf_t [T:1]   regs,
  output gf_pkg::gf_t         l0,
  output logic                rowp_zero
);
  import gf_pkg::*;

  gf_t [T:1] nxt;      // p-th row FFM outputs: regs[j]*alpha^(j*P)
  gf_t [T:1] init;     // lambda_j*alpha^(j*START)

  for (genvar j = 1; j <= int'(T); j++) begin : g_term
    gf_const_mult #(.EXP(j * P), .LO(0), .HI(M-1)) u_rowp (
      .a(regs[j]), .y(nxt[j])
    );
    gf_const_mult #(.EXP(j * START), .LO(0), .HI(M-1)) u_init (
      .a(lambda[j]), .y(init[j])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '0;
      l0   <= '0;
    end else if (load) begin
      regs <= init;
      l0   <= lambda[0];
    end else if (adv) begin
      regs <= nxt;
    end
  end

  always_comb begin
    gf_t s;
    s = l0;
    for (int j = 1; j <= int'(T); j++) s = s ^ nxt[j];
    rowp_zero = (s == '0);
  end

endmodule
