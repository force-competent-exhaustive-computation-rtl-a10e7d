// tb_two_step_cs: end-to-end test of the two-step Chien search at its
// default size (GF(2^14), L = 3, P = 8, T = 40, N = 16383).
//
// Each search is given an error-locator polynomial, either built from
// chosen roots as the product of (1 + alpha^-e x), or with random
// coefficients. The testbench evaluates the polynomial itself at every
// alpha^i, i = 1..N, with its own field arithmetic, and compares the result
// with the flag the design reports for that position. It also checks the
// latency (first block 2 cycles after start, done NB+1 cycles after start)
// and counts how often each mechanism of the design occurred:
//   - second steps switched on, and among them first-step false alarms
//   - roots found by the split rows and by the full-width last row
//   - the position past N in the last block being masked
//   - a search started in the cycle the previous one finishes
// For random polynomials the share of cycles in which a second step is on
// must be close to 1/2^L.
module tb_two_step_cs;
  import tb_gf_pkg::*;

  localparam int M  = 14;
  localparam int L  = 3;
  localparam int P  = 8;
  localparam int T  = 40;
  localparam int N  = 16383;
  localparam int NB = (N + P - 1) / P;

  int checks = 0;
  int failures = 0;

  logic              clk = 0;
  logic              rst_n = 0;
  logic              start = 0;
  logic [M-1:0]      lambda [T];
  logic              busy, err_valid, done;
  logic [10:0]       err_blk;
  logic [P-1:0]      err;
  logic [P-2:0]      step2_on;

  two_step_cs dut (
    .clk(clk), .rst_n(rst_n), .start(start), .lambda(lambda), .busy(busy),
    .err_valid(err_valid), .err_blk(err_blk), .err(err), .done(done),
    .step2_on(step2_on)
  );

  always #5 clk = ~clk;

  // Mechanism counters.
  int n_step2 = 0;
  int n_false_alarm = 0;
  int n_root_split = 0;
  int n_root_last = 0;
  int n_masked = 0;
  int n_back_to_back = 0;

  gf_t coef [T+1];
  bit  obs  [N+1];
  bit  exp_root [N+1];
  int  s2_cycles;
  int  s2_count;

  function automatic void clear_coef();
    coef[0] = gf_t'(1);
    for (int j = 1; j <= T; j++) coef[j] = '0;
  endfunction

  function automatic void add_root(int e);
    gf_t x;
    x = gf_pow(-e);
    for (int j = T; j >= 1; j--) coef[j] ^= gf_mul(x, coef[j-1]);
  endfunction

  function automatic gf_t eval_at(int i);
    gf_t a, acc;
    a = gf_pow(i);
    acc = '0;
    for (int j = T; j >= 0; j--) acc = gf_mul(acc, a) ^ coef[j];
    return acc;
  endfunction

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  // Runs one search on coef[]; if chain is set the start is raised in the
  // cycle where the previous search reports done (the caller has stopped
  // there). Returns with the clock at the negative edge where done is seen.
  task automatic search(string name, bit chain, int want_roots);
    int cyc, first_valid, roots;
    for (int j = 0; j < T; j++) lambda[j] = coef[j+1];
    for (int i = 0; i <= N; i++) begin
      obs[i] = 0;
      exp_root[i] = (i >= 1) && (eval_at(i) == '0);
    end
    if (chain) begin
      checks++;
      if (!done) fail("chained start not in done cycle");
      n_back_to_back++;
    end else begin
      @(negedge clk);
    end
    start = 1;
    cyc = 0;
    first_valid = -1;
    s2_cycles = 0;
    s2_count = 0;
    forever begin
      @(negedge clk);
      start = 0;
      for (int j = 0; j < T; j++) lambda[j] = 14'($urandom);  // held only at start
      cyc++;
      if (dut.step) begin
        s2_cycles++;
      end
      s2_count += $countones(step2_on);
      n_step2 += $countones(step2_on);
      if (err_valid) begin
        if (first_valid < 0) first_valid = cyc;
        for (int i = 0; i < P; i++) begin
          int pos;
          pos = int'(err_blk) * P + i + 1;
          if (pos <= N) obs[pos] = err[i];
          else if (dut.err_raw[i]) n_masked++;
          if (pos > N && err[i]) fail("flag beyond N");
          if (err[i] && i == P - 1) n_root_last++;
          if (err[i] && i < P - 1) n_root_split++;
        end
      end
      for (int i = 0; i < P - 1; i++)
        if (step2_on[i] && !dut.err_raw[i]) n_false_alarm++;
      if (done) break;
      if (cyc > NB + 10) break;
    end
    checks++;
    if (first_valid != 2) fail($sformatf("%s: first block after %0d cycles", name, first_valid));
    checks++;
    if (cyc != NB + 1) fail($sformatf("%s: done after %0d cycles", name, cyc));
    roots = 0;
    for (int i = 1; i <= N; i++) begin
      checks++;
      if (obs[i] != exp_root[i])
        fail($sformatf("%s: position %0d got %0d expected %0d", name, i, obs[i], exp_root[i]));
      if (exp_root[i]) roots++;
    end
    if (want_roots >= 0) begin
      checks++;
      if (roots != want_roots) fail($sformatf("%s: %0d roots, built with %0d", name, roots, want_roots));
    end
    $display("search %s: %0d roots, second step on in %0d of %0d row-cycles",
             name, roots, s2_count, (P - 1) * s2_cycles);
  endtask

  initial begin
    repeat (20 * (NB + 20)) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos [$];
    int e;
    real share;
    for (int j = 0; j < T; j++) lambda[j] = '0;
    gf_init();
    repeat (2) @(negedge clk);
    rst_n = 1;

    // No errors: lambda(x) = 1 has no roots.
    clear_coef();
    search("none", 0, 0);

    // One error at position 1; alpha^(N+1) = alpha^1 falls in the last
    // block and must be masked.
    clear_coef();
    add_root(1);
    search("single", 0, 1);

    // A few errors, some of them in the last row of a block.
    clear_coef();
    add_root(8);
    add_root(4096);
    add_root(777);
    add_root(16383);
    add_root(12345);
    search("five", 0, 5);

    // T errors, started back to back.
    clear_coef();
    pos = {};
    while (pos.size() < T) begin
      e = 1 + ($urandom % N);
      if (!(e inside {pos})) pos.push_back(e);
    end
    foreach (pos[k]) add_root(pos[k]);
    search("full_t", 1, T);

    // Random polynomials: roots wherever they fall, and the share of
    // second-step activity must be near 1/2^L.
    for (int k = 0; k < 2; k++) begin
      clear_coef();
      for (int j = 1; j <= T; j++) coef[j] = 14'($urandom);
      search($sformatf("random%0d", k), k == 1, -1);
      share = real'(s2_count) / real'((P - 1) * s2_cycles);
      checks++;
      if (share < 0.10 || share > 0.15)
        fail($sformatf("second-step share %f, expected about %f", share, 1.0 / (1 << L)));
    end

    $display("mechanisms: step2=%0d false_alarm=%0d root_split=%0d root_last=%0d masked=%0d back_to_back=%0d",
             n_step2, n_false_alarm, n_root_split, n_root_last, n_masked, n_back_to_back);
    checks += 6;
    if (n_step2 == 0)        fail("second step never switched on");
    if (n_false_alarm == 0)  fail("no first-step false alarm");
    if (n_root_split == 0)   fail("no root found by a split row");
    if (n_root_last == 0)    fail("no root found by the last row");
    if (n_masked == 0)       fail("no position beyond N masked");
    if (n_back_to_back == 0) fail("no back-to-back search");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
