// tb_gf_pkg: reference arithmetic in GF(2^14) for the testbenches.
//
// Kept apart from the design's own helpers on purpose: multiplication is
// done MSB first (Horner on the bits of b), powers of alpha come from an
// antilog table filled once by gf_init(), and inverses from the log table.
// The field is generated by x^14 + x^10 + x^6 + x + 1.
package tb_gf_pkg;

  localparam int unsigned GM   = 14;
  localparam int unsigned GORD = (1 << GM) - 1;
  localparam logic [GM:0] GPOLY = 15'h4443;

  typedef logic [GM-1:0] gf_t;

  gf_t gf_exp [GORD];
  int  gf_log [1 << GM];

  function automatic gf_t gf_mul(gf_t a, gf_t b);
    logic [GM:0] acc;
    acc = '0;
    for (int k = GM - 1; k >= 0; k--) begin
      acc = acc << 1;
      if (acc[GM]) acc = acc ^ GPOLY;
      if (b[k]) acc = acc ^ {1'b0, a};
    end
    return acc[GM-1:0];
  endfunction

  function automatic void gf_init();
    gf_t v;
    v = gf_t'(1);
    for (int e = 0; e < int'(GORD); e++) begin
      gf_exp[e] = v;
      gf_log[v] = e;
      v = gf_mul(v, gf_t'(2));
    end
  endfunction

  function automatic gf_t gf_pow(int e);
    int r;
    r = e % int'(GORD);
    if (r < 0) r += int'(GORD);
    return gf_exp[r];
  endfunction

  function automatic gf_t gf_inv(gf_t a);
    return gf_pow(-gf_log[a]);
  endfunction

endpackage
