// two_step_cs: low-power p-parallel Chien search using a two-step test.
//
// The search finds the roots of the error-locator polynomial
//   lambda(x) = 1 + lambda_1 x + ... + lambda_T x^T   over GF(2^M)
// by evaluating it at alpha^1, alpha^2, ..., alpha^N, P points per cycle.
// Coefficient register j holds lambda_j * alpha^(w*P*j) in block w; row I
// (1..P) adds the terms lambda_j * alpha^((w*P+I)*j) and a root is found
// where that sum equals 1.
//
// Row P uses the full multipliers by alpha^(P*j) that also update the
// registers, so it tests all M bits at once; its flag is registered to line
// up with the other rows. Rows 1..P-1 are split in two steps:
//   step 1 (cs_step1_row): only the L MSBs of the sum are built, every cycle;
//          they must be zero. The result is stored in a flip-flop.
//   step 2 (cs_step2_row): in the next cycle, and only for rows whose flag
//          is set, the remaining M-L bits are built from the already updated
//          registers, with multipliers by alpha^((I-P)*j), and compared with
//          0...01.
// The second step is needed in about one cycle of 2^L, which is where the
// power saving comes from, and the flip-flop between the steps keeps the
// critical path as short as a one-step search.
//
// Interface: pulse start for one cycle with lambda[j-1] = lambda_j held in
// that cycle. NB = ceil(N/P) cycles later the results start to come out:
// while err_valid is high, err[I-1] says lambda(alpha^(err_blk*P+I)) == 0,
// one block per cycle; positions above N are reported as 0. done pulses
// with the last block. step2_on[I-1] shows whether the second step of row
// I (1..P-1) is active. P must be at least 2.
// How a root alpha^i maps to a bit position depends on the code and is left
// to the user. Latency from start to the first block is 2 cycles, and one
// search takes NB+1 cycles of throughput.
//
// Defaults: M = 14 and L = 3 are the evaluated configuration; P = 8, T = 40
// and the primitive polynomial x^14+x^10+x^6+x+1 are this design's choices.
module two_step_cs
  import cs_pkg::*;
#(
  parameter int unsigned M    = CS_M,
  parameter logic [GF_MAX_M:0] POLY = CS_POLY,
  parameter int unsigned L    = CS_L,
  parameter int unsigned P    = CS_P,
  parameter int unsigned T    = CS_T,
  parameter int unsigned N    = (1 << M) - 1,
  localparam int unsigned NB  = (N + P - 1) / P,
  localparam int unsigned BW  = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [M-1:0]  lambda [T],
  output logic          busy,
  output logic          err_valid,
  output logic [BW-1:0] err_blk,
  output logic [P-1:0]  err,
  output logic          done,
  output logic [P-2:0]  step2_on
);

  logic         load, step;
  logic [M-1:0] r    [T];
  logic [M-1:0] prod [T];
  logic [M-1:0] sum_p;
  logic         err_p_q;
  logic [P-1:0] err_raw;
  logic [P-2:0] flag;

  cs_ctrl #(.N(N), .P(P)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .load     (load),
    .step     (step),
    .busy     (busy),
    .out_valid(err_valid),
    .out_blk  (err_blk),
    .done     (done)
  );

  // Coefficient registers with their row-P multipliers.
  for (genvar j = 0; j < int'(T); j++) begin : g_col
    cs_coef_reg #(.M(M), .POLY(POLY), .P(P), .J(j + 1)) u_reg (
      .clk   (clk),
      .rst_n (rst_n),
      .load  (load),
      .step  (step),
      .lambda(lambda[j]),
      .r     (r[j]),
      .prod  (prod[j])
    );
  end

  // Rows 1..P-1: two steps.
  for (genvar i = 1; i < int'(P); i++) begin : g_row
    cs_step1_row #(.M(M), .POLY(POLY), .L(L), .T(T), .I(i)) u_s1 (
      .clk     (clk),
      .rst_n   (rst_n),
      .en      (step),
      .r       (r),
      .flag    (flag[i-1])
    );
    cs_step2_row #(.M(M), .POLY(POLY), .L(L), .T(T), .P(P), .I(i)) u_s2 (
      .flag(flag[i-1]),
      .r   (r),
      .err (err_raw[i-1])
    );
  end

  // Row P: full-width test on the register update products.
  always_comb begin
    sum_p = '0;
    for (int unsigned j = 0; j < T; j++) sum_p = sum_p ^ prod[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err_p_q <= 1'b0;
    else        err_p_q <= step && (sum_p == M'(1));
  end

  assign err_raw[P-1] = err_p_q;
  assign step2_on     = flag;

  // Positions beyond N in the last block are not part of the code.
  always_comb begin
    for (int unsigned i = 0; i < P; i++)
      err[i] = err_valid && err_raw[i]
               && ((int'(err_blk) * int'(P) + int'(i) + 1) <= int'(N));
  end

  // The controller never loads and steps the registers in the same cycle.
  // (The check is disabled during reset, so lint notes rst_n as being used
  // both asynchronously and synchronously; that is intended.)
  a_load_step : assert property (@(posedge clk) disable iff (!rst_n) !(load && step));

endmodule
