// cs_step1_row: first step of one row of the two-step Chien search.
//
// Row I (1 <= I < P) would evaluate sum_j lambda_j * alpha^((w*p+I)*j) and
// compare it with 1. The first step forms only the L most significant bits
// of that sum: T partial constant multipliers alpha^(I*j), keeping product
// bits [M-1:M-L], feed an XOR tree. Since 1 has zeros in those bits (L < M),
// a root is possible only where the L-bit sum is zero. That flag is stored
// in a flip-flop so the second step can use it in the next cycle, which
// keeps the two halves of the evaluation in separate pipeline stages.
//
// Interface: r[j-1] is coefficient register j. When en is high, flag is
// loaded with "MSB sum is zero" at the rising edge; when en is low it is
// cleared, so the second step stays off while nothing is searched (clearing
// is this design's choice). Reset is active low and asynchronous.
module cs_step1_row
  import cs_pkg::*;
#(
  parameter int unsigned M    = CS_M,
  parameter logic [GF_MAX_M:0] POLY = CS_POLY,
  parameter int unsigned L    = CS_L,
  parameter int unsigned T    = CS_T,
  parameter int unsigned I    = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [M-1:0] r [T],
  output logic         flag
);

  logic [L-1:0] part [T];
  logic [L-1:0] sum;
  logic         msb_zero;

  for (genvar j = 0; j < int'(T); j++) begin : g_ffm
    cs_ffm #(.M(M), .POLY(POLY), .EXP(int'(I) * (j + 1)), .HI(M - 1), .LO(M - L)) u_ffm (
      .x(r[j]),
      .y(part[j])
    );
  end

  always_comb begin
    sum = '0;
    for (int unsigned j = 0; j < T; j++) sum = sum ^ part[j];
  end

  assign msb_zero = (sum == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flag <= 1'b0;
    else        flag <= en & msb_zero;
  end

endmodule
