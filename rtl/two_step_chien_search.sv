// two_step_chien_search -- low-power p-parallel Chien search for binary BCH
// codes, using a two-step root test.
//
// The Chien search finds the error positions of a received BCH word by
// evaluating the error-locator polynomial Lambda(x) = lambda_0 + lambda_1 x +
// ... + lambda_T x^T at alpha^i for every code position; a zero marks an
// error. This unit tests P positions per clock cycle:
//   * cs_coef_regs holds lambda_j*alpha^(j*b) and renews it every cycle with
//     the full FFMs of the p-th row, which also test position b+P at full
//     width;
//   * rows k = 1..P-1 (cs_two_step_row) test position b+k in two pipelined
//     steps: the MSBs of the sum first, the LSBs one cycle later and only if
//     the MSBs were all zero;
//   * the delay registers regs_d keep the previous cycle's register values,
//     which the second step needs because the coefficient registers have
//     already moved on (STEP2_FROM_RENEWED = 0, the default); with
//     STEP2_FROM_RENEWED = 1 the second step instead reads the renewed
//     registers and multiplies by alpha^(j*(k-P)), so no delay registers
//     are needed;
//   * a small controller counts the ceil(N/P) cycles of a scan and lines the
//     p-th row's result up with the two-step rows.
//
// Code positions: the received word r_{N-1} ... r_0 is numbered by arrival,
// idx = 0 for r_{N-1} up to idx = N-1 for r_0. Output bit out_loc[k-1] of the
// cycle whose out_group is g reports idx = g*P + k - 1 (bits beyond N-1 are
// 0).
// An error at polynomial degree l = N-1-idx is a root alpha^(-l) =
// alpha^(2^m-1-l); the scan therefore starts at exponent START = 2^m - N - 1.
//
// Interface and timing: start (sampled when no scan is running) loads
// lambda; the scan then runs for G = ceil(N/P) cycles. The result of scan
// cycle g appears on out_loc with out_valid two clock edges after the
// start edge plus g, one group per cycle; out_last marks the final group.
// A new start is accepted in the cycle after the last scan cycle, so
// polynomials can follow each other every G+1 cycles. step2_active[k-1]
// (k = 1..P-1)
// shows, in the cycle of the second step, that row k's LSB multipliers are
// active (for power accounting). Asynchronous active-low reset.
//
// The p-parallel structure, the full p-th row, the MSB/LSB split and the
// simple pipelining with extra registers follow the described architecture.
// Code length, T, P, W1, the position numbering, the handshake, the
// controller and the STEP2_FROM_RENEWED variant are this design's choices.
module two_step_chien_search #(
  parameter int unsigned N  = 8752,
  parameter int unsigned T  = 40,
  parameter int unsigned P  = 8,
  parameter int unsigned W1 = 4,
  // 0: step 2 reads delay registers holding the previous cycle's values;
  // 1: step 2 reads the renewed coefficient registers (no delay registers)
  parameter bit          STEP2_FROM_RENEWED = 1'b0,
  // derived, not meant to be overridden: scan cycles and group-index width
  localparam int unsigned G  = (N + P - 1) / P,
  localparam int unsigned GW = (G > 1) ? $clog2(G) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  gf_pkg::gf_t [T:0]    lambda,
  output logic                 busy,
  output logic                 out_valid,
  output logic [P-1:0]         out_loc,
  output logic [GW-1:0]        out_group,
  output logic                 out_last,
  output logic [P-2:0]         step2_active
);
  import gf_pkg::*;

  localparam int unsigned START = (1 << M) - N - 1;

  // ---------------- controller ----------------
  logic          scanning;     // regs hold group grp this cycle
  logic [GW-1:0] grp;
  logic          load;
  logic          grp_last;

  assign load     = start && !scanning;
  assign grp_last = (grp == GW'(G - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scanning <= 1'b0;
      grp      <= '0;
    end else if (load) begin
      scanning <= 1'b1;
      grp      <= '0;
    end else if (scanning) begin
      scanning <= !grp_last;
      grp      <= grp + 1'b1;
    end
  end

  // ---------------- datapath ----------------
  gf_t [T:1] regs;
  gf_t       l0;
  logic      rowp_zero;

  cs_coef_regs #(.T(T), .P(P), .START(START)) u_regs (
    .clk, .rst_n, .load, .adv(scanning), .lambda,
    .regs, .l0, .rowp_zero
  );

  gf_t [T:1] regs_s2;          // step-2 operands

  if (STEP2_FROM_RENEWED) begin : g_s2_renewed
    // The registers have advanced by P positions when step 2 runs; the rows
    // compensate with their constants.
    assign regs_s2 = regs;
  end else begin : g_s2_delay
    // Extra registers of the simple pipelining: inputs of the step-2 FFMs.
    gf_t [T:1] regs_d;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        regs_d <= '0;
      else if (scanning) regs_d <= regs;
    end
    assign regs_s2 = regs_d;
  end

  logic [P-1:0] root2;         // stage-2 root flags, bit k-1 = row k

  for (genvar k = 1; k < int'(P); k++) begin : g_row
    cs_two_step_row #(.T(T), .K(k), .W1(W1),
                      .S2_BACK(STEP2_FROM_RENEWED ? P : 0)) u_row (
      .clk, .rst_n, .en(scanning), .regs, .regs_s2, .l0,
      .root(root2[k-1]), .step2_active(step2_active[k-1])
    );
  end

  // Stage 2 bookkeeping: the p-th row's full-width result, delayed to line up
  // with the second step of the other rows.
  logic          v2, last2;
  logic [GW-1:0] grp2;
  logic          rowp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2     <= 1'b0;
      last2  <= 1'b0;
      grp2   <= '0;
      rowp_q <= 1'b0;
    end else begin
      v2     <= scanning;
      last2  <= scanning && grp_last;
      grp2   <= grp;
      rowp_q <= scanning && rowp_zero;
    end
  end
  assign root2[P-1] = rowp_q;

  // Output register, masking positions beyond the code length.
  logic [P-1:0] in_code;
  always_comb begin
    for (int k = 0; k < int'(P); k++)
      in_code[k] = (32'(grp2) * P + 32'(k)) < N;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_loc   <= '0;
      out_group <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= v2;
      out_loc   <= v2 ? (root2 & in_code) : '0;
      out_group <= grp2;
      out_last  <= last2;
    end
  end

  assign busy = scanning | v2 | out_valid;

  // The group counter stays inside the scan, and a scan's results leave
  // exactly two edges after its cycles.
  a_grp_range: assert property (@(posedge clk) disable iff (!rst_n)
    scanning |-> grp <= GW'(G - 1));
  a_out_follows_scan: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> $past(scanning, 2));

  if (N > Q1 || N < 1 || P < 2) begin : g_bad_cfg
    $error("two_step_chien_search: need 1 <= N <= %0d and P >= 2", Q1);
  end

endmodule
