// ecc_ref_pkg: reference arithmetic for the testbenches, written
// independently of the RTL data paths.
//
// Field multiplication is a full 465-bit carry-less product followed by
// reduction modulo f(x) = x^233 + x^74 + 1 from the top down; inversion uses
// Fermat's little theorem (a^-1 = a^(2^233 - 2)). Points are affine, with an
// explicit point-at-infinity flag, and scalar multiplication is the plain
// left-to-right double-and-add method. Constants are the NIST B-233 domain
// parameters (FIPS 186-2).
package ecc_ref_pkg;
  import ecc_pkg::*;

  typedef struct packed {
    logic inf;
    gf_t  x;
    gf_t  y;
  } point_t;

  localparam gf_t B233_B  = 233'h066_647ede6c_332c7f8c_0923bb58_213b333b_20e9ce42_81fe115f_7d8f90ad;
  localparam gf_t B233_GX = 233'h0fa_c9dfcbac_8313bb21_39f1bb75_5fef65bc_391f8b36_f8f8eb73_71fd558b;
  localparam gf_t B233_GY = 233'h100_6a08a419_03350678_e58528be_bf8a0bef_f867a7ca_36716f7e_01f81052;

  function automatic gf_t ref_mul(gf_t a, gf_t b);
    logic [2*M-2:0] p;
    logic [2*M-2:0] f_full;
    p = '0;
    for (int i = 0; i < M; i++)
      if (b[i]) p ^= ((2*M-1)'(a) << i);
    f_full = (2*M-1)'(1) << M | (2*M-1)'(1) << 74 | (2*M-1)'(1);
    for (int i = 2*M-2; i >= M; i--)
      if (p[i]) p ^= f_full << (i - M);
    return p[M-1:0];
  endfunction

  function automatic gf_t ref_inv(gf_t a);
    gf_t r, t;
    r = gf_t'(1);
    t = a;
    for (int i = 0; i < M - 1; i++) begin
      r = ref_mul(r, t);
      t = ref_mul(t, t);
    end
    return ref_mul(r, r);
  endfunction

  function automatic gf_t ref_div(gf_t a, gf_t b);
    return ref_mul(a, ref_inv(b));
  endfunction

  function automatic point_t ref_dbl(point_t p);
    point_t q;
    gf_t l;
    if (p.inf || p.x == '0) begin
      q = '0; q.inf = 1'b1; return q;
    end
    l = p.x ^ ref_div(p.y, p.x);
    q.inf = 1'b0;
    q.x = ref_mul(l, l) ^ l ^ CURVE_A;
    q.y = ref_mul(p.x, p.x) ^ ref_mul(l ^ gf_t'(1), q.x);
    return q;
  endfunction

  function automatic point_t ref_add(point_t p, point_t r);
    point_t q;
    gf_t l;
    if (p.inf) return r;
    if (r.inf) return p;
    if (p.x == r.x) begin
      if (p.y == r.y) return ref_dbl(p);
      q = '0; q.inf = 1'b1; return q;
    end
    l = ref_div(p.y ^ r.y, p.x ^ r.x);
    q.inf = 1'b0;
    q.x = ref_mul(l, l) ^ l ^ p.x ^ r.x ^ CURVE_A;
    q.y = ref_mul(l, p.x ^ q.x) ^ q.x ^ p.y;
    return q;
  endfunction

  function automatic point_t ref_smul(gf_t k, point_t p);
    point_t q;
    q = '0; q.inf = 1'b1;
    for (int i = M - 1; i >= 0; i--) begin
      q = ref_dbl(q);
      if (k[i]) q = ref_add(q, p);
    end
    return q;
  endfunction

  // y^2 + xy == x^3 + a x^2 + b
  function automatic logic ref_on_curve(gf_t x, gf_t y);
    gf_t x2;
    x2 = ref_mul(x, x);
    return (ref_mul(y, y) ^ ref_mul(x, y)) ==
           (ref_mul(x2, x) ^ ref_mul(CURVE_A, x2) ^ B233_B);
  endfunction

  function automatic gf_t rand_gf();
    gf_t v;
    for (int i = 0; i < M; i += 32) v[i +: 1] = 1'b0;
    for (int i = 0; i < (M + 31) / 32; i++) begin
      logic [31:0] w;
      w = $urandom;
      for (int j = 0; j < 32; j++)
        if (i * 32 + j < M) v[i * 32 + j] = w[j];
    end
    return v;
  endfunction

endpackage
