// cs_pkg: shared constants and elaboration-time Galois-field helpers for the
// two-step parallel Chien search.
//
// The field is GF(2^M) in polynomial basis, generated by a primitive
// polynomial; alpha is the root of that polynomial (the element 0...010).
// The functions here are used only to compute the constant matrices of the
// constant multipliers while elaborating; none of them becomes hardware on
// its own. Field size 14 and a first step of 3 MSBs follow the evaluated
// configuration; the primitive polynomial, the parallel factor and the
// error-correction capacity are this design's own choices.
package cs_pkg;

  // Widest field the helpers support.
  localparam int unsigned GF_MAX_M = 16;

  // Defaults of the design.
  localparam int unsigned CS_M = 14;  // field dimension m
  localparam int unsigned CS_L = 3;   // MSBs examined in the first step, l
  localparam int unsigned CS_P = 8;   // parallel factor p
  localparam int unsigned CS_T = 40;  // error-correction capacity t

  // Primitive polynomial x^14 + x^10 + x^6 + x + 1, written with its x^m term.
  localparam logic [GF_MAX_M:0] CS_POLY = 17'h04443;

  // a * x modulo the primitive polynomial of degree m.
  function automatic logic [GF_MAX_M-1:0] gf_xtime(input logic [GF_MAX_M-1:0] a,
                                                   input int unsigned m,
                                                   input logic [GF_MAX_M:0] poly);
    logic [GF_MAX_M:0] s;
    s = {a, 1'b0};
    if (s[m]) s = s ^ poly;
    s[GF_MAX_M] = 1'b0;
    return s[GF_MAX_M-1:0] & ((GF_MAX_M'(1) << m) - GF_MAX_M'(1));
  endfunction

  // a * b in GF(2^m), shift-and-add.
  function automatic logic [GF_MAX_M-1:0] gf_mul(input logic [GF_MAX_M-1:0] a,
                                                 input logic [GF_MAX_M-1:0] b,
                                                 input int unsigned m,
                                                 input logic [GF_MAX_M:0] poly);
    logic [GF_MAX_M-1:0] acc;
    logic [GF_MAX_M-1:0] sh;
    acc = '0;
    sh  = a;
    for (int unsigned k = 0; k < m; k++) begin
      if (b[k]) acc = acc ^ sh;
      sh = gf_xtime(sh, m, poly);
    end
    return acc;
  endfunction

  // alpha^e for any integer e (negative exponents wrap modulo 2^m - 1),
  // by square-and-multiply.
  function automatic logic [GF_MAX_M-1:0] gf_alpha_pow(input int e,
                                                       input int unsigned m,
                                                       input logic [GF_MAX_M:0] poly);
    int ord;
    int r;
    logic [GF_MAX_M-1:0] v;
    logic [GF_MAX_M-1:0] b;
    ord = (1 << m) - 1;
    r = e % ord;
    if (r < 0) r = r + ord;
    v = GF_MAX_M'(1);
    b = GF_MAX_M'(2);
    while (r != 0) begin
      if (r[0]) v = gf_mul(v, b, m, poly);
      b = gf_mul(b, b, m, poly);
      r = r >>> 1;
    end
    return v;
  endfunction

endpackage
