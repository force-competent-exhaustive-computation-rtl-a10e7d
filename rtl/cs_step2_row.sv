// cs_step2_row: second step of one row of the two-step Chien search.
//
// One cycle after the first step, the coefficient registers have already
// moved on by alpha^(p*j). Instead of keeping copies of the old register
// values, this step multiplies the updated ones by alpha^((I-P)*j), which
// gives the same terms lambda_j * alpha^((w*p+I)*j) as the first step saw.
// Only the M-L least significant product bits are formed (partial
// multipliers keeping bits [M-L-1:0]); their XOR sum is compared with the
// low bits of 1, i.e. 0...01. Together with the first step's zero test this
// is the full test sum == 1, i.e. lambda(alpha^(w*p+I)) == 0.
//
// The multiplier inputs are forced to zero unless flag (the first step's
// stored result) is set, so this half switches only about once every 2^L
// cycles on random data. A zero input gives a zero sum, which never equals
// 0...01, so the gating also masks the error flag and no further AND is
// needed. Forcing to zero is this design's way of disabling the multipliers.
//
// Purely combinational: err is valid in the cycle after the first step.
module cs_step2_row
  import cs_pkg::*;
#(
  parameter int unsigned M    = CS_M,
  parameter logic [GF_MAX_M:0] POLY = CS_POLY,
  parameter int unsigned L    = CS_L,
  parameter int unsigned T    = CS_T,
  parameter int unsigned P    = CS_P,
  parameter int unsigned I    = 1
) (
  input  logic         flag,
  input  logic [M-1:0] r [T],
  output logic         err
);

  localparam int unsigned W = M - L;

  logic [M-1:0] rg   [T];
  logic [W-1:0] part [T];
  logic [W-1:0] sum;

  for (genvar j = 0; j < int'(T); j++) begin : g_ffm
    assign rg[j] = flag ? r[j] : '0;
    cs_ffm #(.M(M), .POLY(POLY), .EXP((int'(I) - int'(P)) * (j + 1)), .HI(W - 1), .LO(0)) u_ffm (
      .x(rg[j]),
      .y(part[j])
    );
  end

  always_comb begin
    sum = '0;
    for (int unsigned j = 0; j < T; j++) sum = sum ^ part[j];
  end

  assign err = (sum == W'(1));

endmodule
