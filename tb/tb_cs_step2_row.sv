// tb_cs_step2_row: checks the second step of one search row.
//
// Row I = 5 with P = 8, T = 40 and L = 3. The registers are random, the
// last one solved for so sum_j r_j * alpha^((I-P)*j) hits a chosen target:
// random, random with low bits 0...01, or exactly 1. err must be set
// exactly when flag is set and the target's M-L low bits are 0...01; with
// flag clear the row must report nothing whatever the registers hold.
module tb_cs_step2_row;
  import tb_gf_pkg::*;

  localparam int T = 40;
  localparam int I = 5;
  localparam int P = 8;
  localparam int L = 3;

  int checks = 0;
  int failures = 0;
  int n_err = 0;

  logic        flag = 0;
  logic [13:0] r [T];
  logic        err;

  cs_step2_row #(.T(T), .I(I), .P(P), .L(L)) dut (.flag(flag), .r(r), .err(err));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gf_t target, part;
    logic expect_err;
    gf_init();
    for (int t = 0; t < 3000; t++) begin
      case ($urandom % 3)
        0: target = 14'($urandom);
        1: target = {3'($urandom), 11'd1};
        default: target = 14'(1);
      endcase
      part = '0;
      for (int j = 0; j < T - 1; j++) begin
        r[j] = 14'($urandom);
        part ^= gf_mul(r[j], gf_pow((I - P) * (j + 1)));
      end
      r[T-1] = gf_mul(target ^ part, gf_pow(-(I - P) * T));
      flag = ($urandom % 4) != 0;
      expect_err = flag && (target[10:0] == 11'd1);
      #1;
      checks++;
      if (err) n_err++;
      if (err !== expect_err) begin
        failures++;
        $display("FAIL t=%0d target=%h flag=%b err=%b", t, target, flag, err);
      end
      #1;
    end
    if (n_err == 0) begin
      failures++;
      $display("FAIL err never set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
