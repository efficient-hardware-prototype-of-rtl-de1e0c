// Reference arithmetic for the testbenches: plain modular arithmetic on
// 256-bit numbers with 512-bit intermediates, inversion by Fermat's little
// theorem (a^(p-2) mod p), and textbook affine point operations with the
// point at infinity. None of it shares structure with the hardware, so the
// testbenches compare the RTL against an independent computation. Also holds
// the secp256k1 domain parameters (a = 0, b = 7) and a 16-bit test curve
// y^2 = x^3 + 4x + 12 over GF(65519) of prime order 65287.
package ecc_ref_pkg;
  typedef logic [255:0] u256;

  typedef struct packed {
    logic inf;
    u256  x;
    u256  y;
  } pt_t;

  localparam u256 K1_P  = 256'hFFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFE_FFFFFC2F;
  localparam u256 K1_N  = 256'hFFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFE_BAAEDCE6_AF48A03B_BFD25E8C_D0364141;
  localparam u256 K1_GX = 256'h79BE667E_F9DCBBAC_55A06295_CE870B07_029BFCDB_2DCE28D9_59F2815B_16F81798;
  localparam u256 K1_GY = 256'h483ADA77_26A3C465_5DA4FBFC_0E1108A8_FD17B448_A6855419_9C47D08F_FB10D4B8;
  // 2G, a published value used to cross-check the reference itself.
  localparam u256 K1_2GX = 256'hC6047F94_41ED7D6D_3045406E_95C07CD8_5C778E4B_8CEF3CA7_ABAC09B9_5C709EE5;
  localparam u256 K1_2GY = 256'h1AE168FE_A63DC339_A3C58419_466CEAEE_F7F63265_3266D0E1_236431A9_50CFE52A;

  localparam u256 C16_P  = 256'd65519;
  localparam u256 C16_A  = 256'd4;
  localparam u256 C16_N  = 256'd65287;
  localparam u256 C16_GX = 256'd0;
  localparam u256 C16_GY = 256'd19386;

  function automatic u256 mulmod(u256 a, u256 b, u256 m);
    logic [511:0] t;
    t = {256'd0, a} * {256'd0, b};
    t = t % {256'd0, m};
    return t[255:0];
  endfunction

  function automatic u256 addmod(u256 a, u256 b, u256 m);
    logic [256:0] t;
    t = ({1'b0, a} + {1'b0, b}) % {1'b0, m};
    return t[255:0];
  endfunction

  function automatic u256 submod(u256 a, u256 b, u256 m);
    return addmod(a, m - (b % m), m);
  endfunction

  function automatic u256 powmod(u256 b, u256 e, u256 m);
    u256 r = 256'd1 % m;
    u256 x = b % m;
    for (int i = 0; i < 256; i++) begin
      if (e[i]) r = mulmod(r, x, m);
      x = mulmod(x, x, m);
    end
    return r;
  endfunction

  function automatic u256 invmod(u256 a, u256 m);  // m prime
    return powmod(a, m - 256'd2, m);
  endfunction

  function automatic pt_t pt_dbl(pt_t P, u256 a, u256 p);
    pt_t R;
    u256 l;
    if (P.inf || P.y == '0) begin
      R.inf = 1'b1; R.x = '0; R.y = '0;
      return R;
    end
    l = mulmod(addmod(mulmod(256'd3, mulmod(P.x, P.x, p), p), a, p),
               invmod(addmod(P.y, P.y, p), p), p);
    R.inf = 1'b0;
    R.x = submod(mulmod(l, l, p), addmod(P.x, P.x, p), p);
    R.y = submod(mulmod(l, submod(P.x, R.x, p), p), P.y, p);
    return R;
  endfunction

  function automatic pt_t pt_add(pt_t P, pt_t Q, u256 a, u256 p);
    pt_t R;
    u256 l;
    if (P.inf) return Q;
    if (Q.inf) return P;
    if (P.x == Q.x) begin
      if (P.y == Q.y) return pt_dbl(P, a, p);
      R.inf = 1'b1; R.x = '0; R.y = '0;
      return R;
    end
    l = mulmod(submod(Q.y, P.y, p), invmod(submod(Q.x, P.x, p), p), p);
    R.inf = 1'b0;
    R.x = submod(submod(mulmod(l, l, p), P.x, p), Q.x, p);
    R.y = submod(mulmod(l, submod(P.x, R.x, p), p), P.y, p);
    return R;
  endfunction

  // Right-to-left binary method: a different order from the hardware's.
  function automatic pt_t pt_mul(u256 k, pt_t P, u256 a, u256 p);
    pt_t R, X;
    R.inf = 1'b1; R.x = '0; R.y = '0;
    X = P;
    for (int i = 0; i < 256; i++) begin
      if (k[i]) R = pt_add(R, X, a, p);
      if ((k >> (i + 1)) == '0) break;
      X = pt_dbl(X, a, p);
    end
    return R;
  endfunction

  function automatic pt_t mk_pt(u256 x, u256 y);
    pt_t R;
    R.inf = 1'b0; R.x = x; R.y = y;
    return R;
  endfunction

  // 256-bit random number built from eight 32-bit draws.
  function automatic u256 rand256();
    u256 r;
    for (int i = 0; i < 8; i++) r[32*i +: 32] = $urandom;
    return r;
  endfunction
endpackage
