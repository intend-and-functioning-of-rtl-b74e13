// gf_const_mult -- finite-field multiplier (FFM) by a constant alpha^EXP,
// producing only the product bits HI..LO.
//
// Multiplying by a fixed field element is linear over GF(2): product bit r is
// the XOR of those input bits a[c] whose column alpha^EXP * alpha^c has bit r
// set. The columns are computed at elaboration, so the circuit is an AND/XOR
// network with no clock. Selecting a slice of the output rows gives the
// "partial FFMs" of the two-step Chien search: the MSB slice is the first
// step, the LSB slice the second; the full range gives an ordinary FFM.
//
// Interface: a (m bits) in, y (HI-LO+1 bits) out, purely combinational.
// Building the partial FFM as a row subset of the constant matrix is this
// design's reading of how the product is split between the two steps.
module gf_const_mult #(
  parameter int unsigned EXP = 1,
  parameter int unsigned     LO  = 0,
  parameter int unsigned     HI  = gf_pkg::M - 1
) (
  input  gf_pkg::gf_t    a,
  output logic [HI-LO:0] y
);
  import gf_pkg::*;

  localparam gf_t K = alpha_pow(EXP);

  logic [HI-LO:0] term [M];

  for (genvar c = 0; c < int'(M); c++) begin : g_col
    localparam gf_t COL = gf_mul(K, gf_t'(1) << c);
    assign term[c] = a[c] ? COL[HI:LO] : '0;
  end

  always_comb begin
    y = '0;
    for (int c = 0; c < int'(M); c++) y = y ^ term[c];
  end

  if (HI >= M || LO > HI) begin : g_bad_range
    $error("gf_const_mult: bit range %0d..%0d outside the field width", HI, LO);
  end

endmodule
