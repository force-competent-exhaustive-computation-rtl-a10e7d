// tb_cs_step1_row: checks the first step of one search row.
//
// Row I = 3 with T = 40 columns and L = 3 MSBs. Register values are random,
// except that the last one is solved for so the full sum
// sum_j r_j * alpha^(I*j) hits a chosen target: random, random with zero
// MSBs, or exactly 1. After each clock the stored flag must be set exactly
// when en was high and the target's L MSBs are zero.
module tb_cs_step1_row;
  import tb_gf_pkg::*;

  localparam int T = 40;
  localparam int I = 3;
  localparam int L = 3;

  int checks = 0;
  int failures = 0;
  int n_set = 0;

  logic        clk = 0;
  logic        rst_n = 0;
  logic        en = 0;
  logic [13:0] r [T];
  logic        flag;

  cs_step1_row #(.T(T), .I(I), .L(L)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .r(r), .flag(flag)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gf_t target, part;
    logic expect_flag;
    for (int j = 0; j < T; j++) r[j] = '0;
    gf_init();
    #12 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      case ($urandom % 3)
        0: target = 14'($urandom);
        1: target = {3'b000, 11'($urandom)};
        default: target = 14'(1);
      endcase
      @(negedge clk);
      part = '0;
      for (int j = 0; j < T - 1; j++) begin
        r[j] = 14'($urandom);
        part ^= gf_mul(r[j], gf_pow(I * (j + 1)));
      end
      r[T-1] = gf_mul(target ^ part, gf_pow(-I * T));
      en = ($urandom % 5) != 0;
      expect_flag = en && (target[13:11] == 3'b000);
      @(negedge clk);
      checks++;
      if (flag) n_set++;
      if (flag !== expect_flag) begin
        failures++;
        $display("FAIL t=%0d target=%h en=%b flag=%b", t, target, en, flag);
      end
    end
    if (n_set == 0) begin
      failures++;
      $display("FAIL flag never set");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
