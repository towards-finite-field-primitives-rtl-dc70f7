// gf_ref_pkg: reference GF(2^n) arithmetic for the testbenches, written
// differently from the hardware so that the two do not share mistakes.
//
// ref_mul forms the full carry-less product (up to 2n-1 bits) and then
// reduces it by polynomial long division, highest degree first. ref_inv
// searches for the element whose product with x is 1. ref_div multiplies by
// that inverse. ref_log searches the powers of the generator. The EBd and
// inversion control-flow models only count which branches the algorithms take,
// so that end-to-end tests can show each branch was exercised.
package gf_ref_pkg;

  function automatic longint unsigned ref_mul(input longint unsigned a,
                                              input longint unsigned b,
                                              input int n,
                                              input longint unsigned poly);
    longint unsigned prod;
    prod = 0;
    for (int i = 0; i < n; i++)
      if (b[i]) prod ^= (a << i);
    for (int d = 2 * n - 2; d >= n; d--)
      if (prod[d]) prod ^= (poly << (d - n));
    return prod;
  endfunction

  // The same carry-less product and long-division reduction for fields up to
  // GF(2^128); poly includes its degree-n bit.
  function automatic logic [127:0] ref_mul_wide(input logic [127:0] a,
                                                input logic [127:0] b,
                                                input int n,
                                                input logic [128:0] poly);
    logic [255:0] prod;
    prod = '0;
    for (int i = 0; i < n; i++)
      if (b[i]) prod ^= (256'(a) << i);
    for (int d = 2 * n - 2; d >= n; d--)
      if (prod[d]) prod ^= (256'(poly) << (d - n));
    return prod[127:0];
  endfunction

  function automatic longint unsigned ref_inv(input longint unsigned x,
                                              input int n,
                                              input longint unsigned poly);
    if (x == 0) return 0;
    for (longint unsigned y = 1; y < (64'd1 << n); y++)
      if (ref_mul(x, y, n, poly) == 1) return y;
    return 0;
  endfunction

  function automatic longint unsigned ref_div(input longint unsigned a,
                                              input longint unsigned b,
                                              input int n,
                                              input longint unsigned poly);
    return ref_mul(a, ref_inv(b, n, poly), n, poly);
  endfunction

  // Discrete log of x to base g (x != 0); -1 if none.
  function automatic int ref_log(input longint unsigned x, input longint unsigned g,
                                 input int n, input longint unsigned poly);
    longint unsigned p;
    p = 1;
    for (int i = 0; i < (1 << n) - 1; i++) begin
      if (p == x) return i;
      p = ref_mul(p, g, n, poly);
    end
    return -1;
  endfunction

  function automatic int degree(input longint unsigned x);
    for (int i = 63; i >= 0; i--) if (x[i]) return i;
    return -1;
  endfunction

  // Branch counts of the EBd iterations for one division:
  // swaps = iterations that took the (delta < 0) exchange branch,
  // plain = iterations that XORed without exchanging.
  function automatic void ebd_branches(input longint unsigned b, input int n,
                                       input longint unsigned poly,
                                       output int swaps, output int plain);
    longint unsigned s, t;
    int d;
    s = poly; d = -1; swaps = 0; plain = 0;
    for (int i = 0; i < 2 * n - 1; i++) begin
      if (b[0]) begin
        if (d < 0) begin t = b ^ s; s = b; b = t; d = -d; swaps++; end
        else       begin b = b ^ s; plain++; end
      end
      b = b >> 1;
      d = d - 1;
    end
  endfunction

  // Branch counts of the inversion iterations: swaps = (delta == 0) exchange
  // branch, others = the delta != 0 branch taken when x[n] = 1.
  function automatic void inv_branches(input longint unsigned x, input int n,
                                       input longint unsigned poly,
                                       output int swaps, output int others);
    longint unsigned s, t;
    int d;
    s = poly; d = 0; swaps = 0; others = 0;
    for (int i = 0; i < 2 * n; i++) begin
      if (!x[n]) begin x = x << 1; d++; end
      else begin
        if (s[n]) s = s ^ x;
        s = s << 1;
        if (d == 0) begin t = s; s = x; x = t; d = 1; swaps++; end
        else        begin d--; others++; end
      end
    end
  endfunction

endpackage
