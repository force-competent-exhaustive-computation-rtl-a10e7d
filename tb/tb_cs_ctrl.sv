// tb_cs_ctrl: checks the sequencing of the search controller.
//
// With N = 45 and P = 8 a search is NB = 6 blocks. After a start pulse the
// testbench expects one load cycle, then six step cycles, each block index
// coming out on out_blk one cycle after its step, done with the last one,
// and no load or step otherwise. Starts while busy must be ignored, and a
// start in the cycle of done must begin the next search at once.
module tb_cs_ctrl;

  localparam int N  = 45;
  localparam int P  = 8;
  localparam int NB = 6;

  int checks = 0;
  int failures = 0;

  logic       clk = 0;
  logic       rst_n = 0;
  logic       start = 0;
  logic       load, step, busy, out_valid, done;
  logic [2:0] out_blk;

  cs_ctrl #(.N(N), .P(P)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .load(load), .step(step),
    .busy(busy), .out_valid(out_valid), .out_blk(out_blk), .done(done)
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t got=%b exp=%b", what, $time, got, exp);
    end
  endtask

  // One search started from idle, outputs sampled between clock edges.
  // With noisy_start, start is also raised at random while the search runs
  // and must be ignored.
  task automatic run_search(bit noisy_start);
    @(negedge clk);
    start = 1;
    #1;
    check("load", load, 1'b1);
    check("step0", step, 1'b0);
    @(negedge clk);
    start = 0;
    for (int c = 0; c <= NB; c++) begin
      start = noisy_start && (c < NB - 1) && ($urandom % 2 == 1);
      #1;
      check("load_run", load, 1'b0);
      check("step_run", step, c < NB);
      check("busy", busy, 1'b1);
      check("valid", out_valid, c > 0);
      if (c > 0) begin
        checks++;
        if (out_blk !== 3'(c - 1)) begin
          failures++;
          $display("FAIL blk got=%0d exp=%0d", out_blk, c - 1);
        end
      end
      check("done", done, c == NB);
      @(negedge clk);
    end
    start = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    check("idle_busy", busy, 1'b0);
    run_search(1'b0);
    #1;
    check("idle_after", busy, 1'b0);
    check("idle_step", step, 1'b0);
    repeat (3) @(negedge clk);
    run_search(1'b1);
    // Back to back: start in the cycle where done is high.
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    repeat (NB) @(negedge clk);
    #1;
    check("bb_done", done, 1'b1);
    start = 1;
    #1;
    check("bb_load", load, 1'b1);
    @(negedge clk);
    start = 0;
    #1;
    check("bb_step", step, 1'b1);
    check("bb_valid_off", out_valid, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
