// cs_ffm: finite-field multiplier by a constant (FFM), full or partial.
//
// Computes y = (x * alpha^EXP)[HI:LO] in GF(2^M). Multiplying by a constant
// is linear over GF(2), so the product is x times a fixed binary matrix whose
// column k is alpha^(EXP+k); every output bit is the XOR of the input bits
// selected by one row of that matrix. With HI = M-1 and LO = 0 this is the
// full FFM; with a narrower range it is a partial FFM that builds only the
// rows of the wanted product bits, which is what lets the search split one
// multiplication into an MSB part and an LSB part. EXP may be negative.
//
// Purely combinational, no clock. The matrix is worked out at elaboration
// from the primitive polynomial in cs_pkg.
module cs_ffm
  import cs_pkg::*;
#(
  parameter int unsigned M    = CS_M,
  parameter logic [GF_MAX_M:0] POLY = CS_POLY,
  parameter int          EXP  = 1,
  parameter int unsigned HI   = M - 1,
  parameter int unsigned LO   = 0
) (
  input  logic [M-1:0]     x,
  output logic [HI-LO:0]   y
);

  // Column k of the multiplication matrix: alpha^(EXP+k), i.e. the product
  // for input alpha^k.
  typedef logic [M-1:0] col_t;
  typedef col_t mat_t [M];

  function automatic mat_t build_matrix();
    mat_t mat;
    logic [GF_MAX_M-1:0] c;
    c = gf_alpha_pow(EXP, M, POLY);
    for (int unsigned k = 0; k < M; k++) begin
      mat[k] = M'(c);
      c = gf_xtime(c, M, POLY);
    end
    return mat;
  endfunction

  localparam mat_t MAT = build_matrix();

  always_comb begin
    y = '0;
    for (int unsigned k = 0; k < M; k++)
      if (x[k]) y = y ^ MAT[k][HI:LO];
  end

endmodule
