// tb_cs_ffm: checks the constant multiplier, full and partial, against the
// reference field arithmetic.
//
// Five instances cover a small, a large and a negative exponent as full
// multipliers, and the MSB and LSB slices used by the two search steps.
// Each is fed the basis vectors, zero and random inputs; every output is
// compared with the slice of x * alpha^e computed by tb_gf_pkg.
module tb_cs_ffm;
  import tb_gf_pkg::*;

  localparam int E0 = 1;
  localparam int E1 = 8 * 37;
  localparam int E2 = -5 * 29;
  localparam int E3 = 3 * 40;
  localparam int E4 = (5 - 8) * 17;

  int checks = 0;
  int failures = 0;

  logic [13:0] x;
  logic [13:0] y0, y1, y2;
  logic [2:0]  y3;
  logic [10:0] y4;

  cs_ffm #(.EXP(E0))                  u0 (.x(x), .y(y0));
  cs_ffm #(.EXP(E1))                  u1 (.x(x), .y(y1));
  cs_ffm #(.EXP(E2))                  u2 (.x(x), .y(y2));
  cs_ffm #(.EXP(E3), .HI(13), .LO(11)) u3 (.x(x), .y(y3));
  cs_ffm #(.EXP(E4), .HI(10), .LO(0))  u4 (.x(x), .y(y4));

  task automatic check(string what, logic [13:0] got, logic [13:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s x=%h got=%h exp=%h", what, x, got, exp);
    end
  endtask

  task automatic apply(logic [13:0] v);
    gf_t p;
    x = v;
    #1;
    check("e0", y0, gf_mul(v, gf_pow(E0)));
    check("e1", y1, gf_mul(v, gf_pow(E1)));
    check("e2", y2, gf_mul(v, gf_pow(E2)));
    p = gf_mul(v, gf_pow(E3));
    check("msb", 14'(y3), 14'(p[13:11]));
    p = gf_mul(v, gf_pow(E4));
    check("lsb", 14'(y4), 14'(p[10:0]));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gf_init();
    apply('0);
    for (int k = 0; k < 14; k++) apply(14'(1) << k);
    for (int k = 0; k < 2000; k++) apply(14'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
