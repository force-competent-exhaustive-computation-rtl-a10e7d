// tb_cs_power_model: measures how often the second step runs and turns it
// into the multiplier-activity estimate used to choose L.
//
// Power model: the constant multipliers dominate and each costs in
// proportion to its output width times how often it switches. A one-step
// P-parallel search switches P*T*M multiplier bits per cycle. This design
// switches T*M for the last row plus, for each of the other P-1 rows,
// T*L for the first step every cycle and T*(M-L) for the second step in the
// share a of cycles in which that row's flag is set:
//   relative activity = (M + (P-1)*(L + (M-L)*a)) / (P*M).
// With random data a is about 2^-L. Four searches at the default size
// (M = 14, P = 8, T = 40) are run side by side with L = 2, 3, 4 and 5 on
// the same random polynomials. The testbench checks that all four report
// the same roots, that each measured share is near 2^-L, that L = 3 gives
// the lowest activity of the four and that its saving is close to 60%.
module tb_cs_power_model;

  localparam int M  = 14;
  localparam int P  = 8;
  localparam int T  = 40;
  localparam int NV = 4;
  localparam int LV [NV] = '{2, 3, 4, 5};

  int checks = 0;
  int failures = 0;

  logic         clk = 0;
  logic         rst_n = 0;
  logic         start = 0;
  logic [M-1:0] lambda [T];
  logic         busy [NV];
  logic         valid [NV];
  logic         done [NV];
  logic [10:0]  blk [NV];
  logic [P-1:0] err [NV];
  logic [P-2:0] s2 [NV];

  for (genvar v = 0; v < NV; v++) begin : g_dut
    two_step_cs #(.L(LV[v])) dut (
      .clk(clk), .rst_n(rst_n), .start(start), .lambda(lambda),
      .busy(busy[v]), .err_valid(valid[v]), .err_blk(blk[v]), .err(err[v]),
      .done(done[v]), .step2_on(s2[v])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (10 * 2100) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint on [NV];
    longint row_cycles;
    int     roots;
    real    share, act [NV], best;
    int     best_v;
    for (int v = 0; v < NV; v++) on[v] = 0;
    row_cycles = 0;
    roots = 0;
    for (int j = 0; j < T; j++) lambda[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      @(negedge clk);
      for (int j = 0; j < T; j++) lambda[j] = 14'($urandom);
      start = 1;
      forever begin
        @(negedge clk);
        start = 0;
        for (int v = 0; v < NV; v++) on[v] += $countones(s2[v]);
        if (valid[0]) begin
          row_cycles += P - 1;
          roots += $countones(err[0]);
          for (int v = 1; v < NV; v++) begin
            checks++;
            if (valid[v] !== 1'b1 || blk[v] !== blk[0] || err[v] !== err[0]) begin
              failures++;
              $display("FAIL L=%0d differs from L=%0d at block %0d", LV[v], LV[0], blk[0]);
            end
          end
        end
        if (done[0]) break;
      end
    end
    best = 2.0;
    best_v = -1;
    for (int v = 0; v < NV; v++) begin
      share = real'(on[v]) / real'(row_cycles);
      act[v] = (real'(M) + real'(P - 1) * (real'(LV[v]) + real'(M - LV[v]) * share))
               / real'(P * M);
      $display("L=%0d: second step on in %f of row-cycles (2^-L = %f), relative multiplier activity %f, saving %f",
               LV[v], share, 1.0 / real'(1 << LV[v]), act[v], 1.0 - act[v]);
      checks++;
      if (share < 0.7 / real'(1 << LV[v]) || share > 1.3 / real'(1 << LV[v])) begin
        failures++;
        $display("FAIL L=%0d share %f far from 2^-L", LV[v], share);
      end
      if (act[v] < best) begin
        best = act[v];
        best_v = v;
      end
    end
    checks++;
    if (LV[best_v] != 3) begin
      failures++;
      $display("FAIL lowest activity at L=%0d, expected L=3", LV[best_v]);
    end
    checks++;
    if (1.0 - act[1] < 0.55 || 1.0 - act[1] > 0.65) begin
      failures++;
      $display("FAIL saving at L=3 is %f, expected about 0.60", 1.0 - act[1]);
    end
    $display("roots seen: %0d", roots);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
