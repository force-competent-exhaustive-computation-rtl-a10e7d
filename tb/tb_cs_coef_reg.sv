// tb_cs_coef_reg: checks load, hold and stepping of a coefficient register.
//
// Register column J = 7 with P = 8 is loaded with random lambda values and
// stepped a random number of times, with idle cycles in between; after each
// clock its value must equal lambda * alpha^(P*J*k) for k steps taken, and
// prod must always be r * alpha^(P*J).
module tb_cs_coef_reg;
  import tb_gf_pkg::*;

  localparam int P = 8;
  localparam int J = 7;

  int checks = 0;
  int failures = 0;

  logic        clk = 0;
  logic        rst_n = 0;
  logic        load = 0;
  logic        step = 0;
  logic [13:0] lambda = '0;
  logic [13:0] r, prod;

  cs_coef_reg #(.P(P), .J(J)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .step(step),
    .lambda(lambda), .r(r), .prod(prod)
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic [13:0] got, logic [13:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    gf_t lam;
    int  k;
    gf_init();
    #12 rst_n = 1;
    for (int t = 0; t < 50; t++) begin
      lam = 14'($urandom);
      @(negedge clk);
      lambda = lam; load = 1; step = ($urandom % 2) == 1;  // load wins over step
      @(negedge clk);
      load = 0; step = 0; lambda = 14'($urandom);
      k = 0;
      check("load", r, lam);
      for (int c = 0; c < 60; c++) begin
        step = ($urandom % 4) != 0;
        @(negedge clk);
        if (step) k++;
        check("r", r, gf_mul(lam, gf_pow(P * J * k)));
        check("prod", prod, gf_mul(r, gf_pow(P * J)));
      end
      step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
