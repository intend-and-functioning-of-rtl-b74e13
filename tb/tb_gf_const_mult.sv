// tb_gf_const_mult -- checks constant finite-field multipliers, full and
// partial (bit-slice) versions, against reference GF(2^14) arithmetic on
// random and corner-case operands. Also covers exponent reduction modulo
// 2^14-1 in the design's package.
module tb_gf_const_mult;
  import ref_gf_pkg::*;

  int checks = 0, failures = 0;
  logic [13:0] a;
  logic [13:0] y_full1, y_id;
  logic [3:0]  y_msb;
  logic [9:0]  y_lsb;
  logic [6:0]  y_mid;

  gf_const_mult #(.EXP(1),           .LO(0),  .HI(13)) u_full1 (.a(a), .y(y_full1));
  gf_const_mult #(.EXP(0),           .LO(0),  .HI(13)) u_id    (.a(a), .y(y_id));
  gf_const_mult #(.EXP(1000),        .LO(10), .HI(13)) u_msb   (.a(a), .y(y_msb));
  gf_const_mult #(.EXP(16383 + 517), .LO(0),  .HI(9))  u_lsb   (.a(a), .y(y_lsb));
  gf_const_mult #(.EXP(12345),       .LO(3),  .HI(9))  u_mid   (.a(a), .y(y_mid));

  task automatic check(string what, logic [13:0] got, logic [13:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%h got=%h exp=%h", what, a, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [13:0] e;
    for (int n = 0; n < 2000; n++) begin
      if (n < 14)        a = 14'(1) << n;
      else if (n == 14)  a = '1;
      else if (n == 15)  a = '0;
      else               a = 14'($urandom);
      #1;
      check("x*alpha", y_full1, rmul(a, rpow(1)));
      check("x*1", y_id, a);
      e = rmul(a, rpow(1000));
      check("msb(x*alpha^1000)", 14'(y_msb), 14'(e[13:10]));
      e = rmul(a, rpow(517));
      check("lsb(x*alpha^(16383+517))", 14'(y_lsb), 14'(e[9:0]));
      e = rmul(a, rpow(12345));
      check("bits 9..3 of x*alpha^12345", 14'(y_mid), 14'(e[9:3]));
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
