// cs_coef_reg: one coefficient register of the parallel Chien search, with
// its load multiplexer and its update multiplier.
//
// Column j of the search keeps r = lambda_j * alpha^(w*p*j) in an M-bit
// register, w being the number of p-position blocks already searched. A
// load takes lambda_j from the key-equation solver; every step after that
// replaces r by r * alpha^(p*j), produced by the full constant multiplier
// of the last row. That product is also the row-p term of the sum, so it is
// brought out as prod.
//
// Timing: load and step are sampled on the rising clock edge, load winning;
// with neither the register holds. Reset (active low, asynchronous) clears
// it, which is this design's choice.
module cs_coef_reg
  import cs_pkg::*;
#(
  parameter int unsigned M    = CS_M,
  parameter logic [GF_MAX_M:0] POLY = CS_POLY,
  parameter int unsigned P    = CS_P,
  parameter int unsigned J    = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         step,
  input  logic [M-1:0] lambda,
  output logic [M-1:0] r,
  output logic [M-1:0] prod
);

  cs_ffm #(.M(M), .POLY(POLY), .EXP(int'(P * J))) u_ffm (
    .x(r),
    .y(prod)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    r <= '0;
    else if (load) r <= lambda;
    else if (step) r <= prod;
  end

endmodule
