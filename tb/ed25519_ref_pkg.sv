// Reference models used by the testbenches: plain wide-integer arithmetic
// modulo p and L, the RFC 7748 Montgomery ladder and a word-by-word
// SHA-512 over whole padded blocks. They share no code with the RTL.
package ed25519_ref_pkg;

  localparam logic [255:0] RP = 256'h7fffffffffffffffffffffffffffffffffffffffffffffffffffffffffffffed;
  localparam logic [255:0] RL = 256'h1000000000000000000000000000000014def9dea2f79cd65812631a5cf5d3ed;

  function automatic logic [255:0] fmul(input logic [255:0] a, input logic [255:0] b);
    logic [511:0] t;
    t = 512'(a) * 512'(b);
    return 256'(t % 512'(RP));
  endfunction

  function automatic logic [255:0] fadd(input logic [255:0] a, input logic [255:0] b);
    return 256'((257'(a) + 257'(b)) % 257'(RP));
  endfunction

  function automatic logic [255:0] fsub(input logic [255:0] a, input logic [255:0] b);
    return 256'((257'(a) + 257'(RP) - 257'(b % RP)) % 257'(RP));
  endfunction

  function automatic logic [255:0] fpow(input logic [255:0] a, input logic [255:0] e);
    logic [255:0] r;
    r = 256'd1;
    for (int i = 255; i >= 0; i--) begin
      r = fmul(r, r);
      if (e[i]) r = fmul(r, a);
    end
    return r;
  endfunction

  function automatic logic [255:0] finv(input logic [255:0] a);
    return fpow(a, RP - 256'd2);
  endfunction

  // x-only ladder, projective base point (x1 : z1); returns [k](x1:z1) as
  // the pair {X, Z} of the result, unreduced projectively.
  function automatic logic [511:0] ladder(input logic [255:0] k, input logic [255:0] x1,
                                          input logic [255:0] z1, input int nbits);
    logic [255:0] x2, z2, x3, z3, a, aa, b, bb, e, c, d, da, cb, t;
    logic swap, kt;
    x2 = 1; z2 = 0; x3 = x1; z3 = z1; swap = 0;
    for (int i = nbits - 1; i >= 0; i--) begin
      kt = k[i];
      swap ^= kt;
      if (swap) begin t = x2; x2 = x3; x3 = t; t = z2; z2 = z3; z3 = t; end
      swap = kt;
      a = fadd(x2, z2); aa = fmul(a, a); b = fsub(x2, z2); bb = fmul(b, b);
      e = fsub(aa, bb); c = fadd(x3, z3); d = fsub(x3, z3);
      da = fmul(d, a); cb = fmul(c, b);
      x3 = fmul(z1, fmul(fadd(da, cb), fadd(da, cb)));
      z3 = fmul(x1, fmul(fsub(da, cb), fsub(da, cb)));
      x2 = fmul(aa, bb);
      z2 = fmul(e, fadd(aa, fmul(256'd121665, e)));
    end
    if (swap) begin x2 = x3; z2 = z3; end
    return {x2, z2};
  endfunction

  // ---- Ed25519 in extended coordinates (X:Y:Z:T), a = -1 ----------------
  localparam logic [255:0] RD2 = 256'h2406d9dc56dffce7198e80f2eef3d13000e0149a8283b156ebd69b9426b2f159; // 2d
  localparam logic [255:0] RBX = 256'h216936d3cd6e53fec0a4e231fdd6dc5c692cc7609525a7b2c9562d608f25d51a;
  localparam logic [255:0] RBY = 256'h6666666666666666666666666666666666666666666666666666666666666658;
  localparam logic [255:0] RSQ = 256'h70d9120b9f5ff9442d84f723fc03b0813a5e2c2eb482e57d3391fb5500ba81e7;

  typedef struct packed { logic [255:0] x, y, z, t; } ept_t;

  function automatic ept_t eadd(input ept_t p1, input ept_t p2);
    logic [255:0] a, b, c, d, e, f, g, h;
    ept_t r;
    a = fmul(fsub(p1.y, p1.x), fsub(p2.y, p2.x));
    b = fmul(fadd(p1.y, p1.x), fadd(p2.y, p2.x));
    c = fmul(fmul(RD2, p1.t), p2.t);
    d = fmul(fadd(p1.z, p1.z), p2.z);
    e = fsub(b, a); f = fsub(d, c); g = fadd(d, c); h = fadd(b, a);
    r.x = fmul(e, f); r.y = fmul(g, h); r.t = fmul(e, h); r.z = fmul(f, g);
    return r;
  endfunction

  function automatic ept_t emul(input logic [255:0] k, input ept_t pt);
    ept_t r;
    r.x = 0; r.y = 1; r.z = 1; r.t = 0;
    for (int i = 255; i >= 0; i--) begin
      r = eadd(r, r);
      if (k[i]) r = eadd(r, pt);
    end
    return r;
  endfunction

  function automatic ept_t ebase();
    ept_t r;
    r.x = RBX; r.y = RBY; r.z = 1; r.t = fmul(RBX, RBY);
    return r;
  endfunction

  // affine {x, y}
  function automatic logic [511:0] eaff(input ept_t pt);
    logic [255:0] zi;
    zi = finv(pt.z);
    return {fmul(pt.x, zi), fmul(pt.y, zi)};
  endfunction

  // Ed25519 point encoding as a 256-bit little-endian integer
  function automatic logic [255:0] eenc(input ept_t pt);
    logic [511:0] a;
    a = eaff(pt);
    return {a[256], a[254:0]};
  endfunction

  function automatic logic [255:0] modl(input logic [511:0] x);
    return 256'(x % 512'(RL));
  endfunction

  // ---- SHA-512 -------------------------------------------------------------
  function automatic logic [63:0] rr(input logic [63:0] x, input int n);
    return (x >> n) | (x << (64 - n));
  endfunction

  function automatic logic [63:0] kk(input int t);
    logic [63:0] k [80] = '{
      64'h428a2f98d728ae22, 64'h7137449123ef65cd, 64'hb5c0fbcfec4d3b2f, 64'he9b5dba58189dbbc,
      64'h3956c25bf348b538, 64'h59f111f1b605d019, 64'h923f82a4af194f9b, 64'hab1c5ed5da6d8118,
      64'hd807aa98a3030242, 64'h12835b0145706fbe, 64'h243185be4ee4b28c, 64'h550c7dc3d5ffb4e2,
      64'h72be5d74f27b896f, 64'h80deb1fe3b1696b1, 64'h9bdc06a725c71235, 64'hc19bf174cf692694,
      64'he49b69c19ef14ad2, 64'hefbe4786384f25e3, 64'h0fc19dc68b8cd5b5, 64'h240ca1cc77ac9c65,
      64'h2de92c6f592b0275, 64'h4a7484aa6ea6e483, 64'h5cb0a9dcbd41fbd4, 64'h76f988da831153b5,
      64'h983e5152ee66dfab, 64'ha831c66d2db43210, 64'hb00327c898fb213f, 64'hbf597fc7beef0ee4,
      64'hc6e00bf33da88fc2, 64'hd5a79147930aa725, 64'h06ca6351e003826f, 64'h142929670a0e6e70,
      64'h27b70a8546d22ffc, 64'h2e1b21385c26c926, 64'h4d2c6dfc5ac42aed, 64'h53380d139d95b3df,
      64'h650a73548baf63de, 64'h766a0abb3c77b2a8, 64'h81c2c92e47edaee6, 64'h92722c851482353b,
      64'ha2bfe8a14cf10364, 64'ha81a664bbc423001, 64'hc24b8b70d0f89791, 64'hc76c51a30654be30,
      64'hd192e819d6ef5218, 64'hd69906245565a910, 64'hf40e35855771202a, 64'h106aa07032bbd1b8,
      64'h19a4c116b8d2d0c8, 64'h1e376c085141ab53, 64'h2748774cdf8eeb99, 64'h34b0bcb5e19b48a8,
      64'h391c0cb3c5c95a63, 64'h4ed8aa4ae3418acb, 64'h5b9cca4f7763e373, 64'h682e6ff3d6b2b8a3,
      64'h748f82ee5defb2fc, 64'h78a5636f43172f60, 64'h84c87814a1f0ab72, 64'h8cc702081a6439ec,
      64'h90befffa23631e28, 64'ha4506cebde82bde9, 64'hbef9a3f7b2c67915, 64'hc67178f2e372532b,
      64'hca273eceea26619c, 64'hd186b8c721c0c207, 64'heada7dd6cde0eb1e, 64'hf57d4f7fee6ed178,
      64'h06f067aa72176fba, 64'h0a637dc5a2c898a6, 64'h113f9804bef90dae, 64'h1b710b35131c471b,
      64'h28db77f523047d84, 64'h32caab7b40c72493, 64'h3c9ebe0a15c9bebc, 64'h431d67c49c100d4c,
      64'h4cc5d4becb3e42b6, 64'h597f299cfc657e2a, 64'h5fcb6fab3ad6faec, 64'h6c44198c4a475817};
    return k[t];
  endfunction

  // one compression of a 1024-bit block into the chaining value h
  function automatic logic [511:0] compress(input logic [511:0] h, input logic [1023:0] blk);
    logic [63:0] w [80];
    logic [63:0] v [8];
    logic [63:0] t1, t2;
    logic [511:0] r;
    for (int t = 0; t < 16; t++) w[t] = blk[1023 - 64*t -: 64];
    for (int t = 16; t < 80; t++)
      w[t] = (rr(w[t-2], 19) ^ rr(w[t-2], 61) ^ (w[t-2] >> 6)) + w[t-7]
           + (rr(w[t-15], 1) ^ rr(w[t-15], 8) ^ (w[t-15] >> 7)) + w[t-16];
    for (int i = 0; i < 8; i++) v[i] = h[511 - 64*i -: 64];
    for (int t = 0; t < 80; t++) begin
      t1 = v[7] + (rr(v[4], 14) ^ rr(v[4], 18) ^ rr(v[4], 41)) + ((v[4] & v[5]) ^ (~v[4] & v[6]))
         + kk(t) + w[t];
      t2 = (rr(v[0], 28) ^ rr(v[0], 34) ^ rr(v[0], 39)) + ((v[0] & v[1]) ^ (v[0] & v[2]) ^ (v[1] & v[2]));
      v[7] = v[6]; v[6] = v[5]; v[5] = v[4]; v[4] = v[3] + t1;
      v[3] = v[2]; v[2] = v[1]; v[1] = v[0]; v[0] = t1 + t2;
    end
    for (int i = 0; i < 8; i++) r[511 - 64*i -: 64] = h[511 - 64*i -: 64] + v[i];
    return r;
  endfunction

  localparam logic [511:0] SHA_IV = {
    64'h6a09e667f3bcc908, 64'hbb67ae8584caa73b, 64'h3c6ef372fe94f82b, 64'ha54ff53a5f1d36f1,
    64'h510e527fade682d1, 64'h9b05688c2b3e6c1f, 64'h1f83d9abfb41bd6b, 64'h5be0cd19137e2179};

  // padded single block for a message of nbytes (<= 111) held in msg[0..]
  function automatic logic [1023:0] pad1(input logic [7:0] msg [128], input int nbytes);
    logic [1023:0] b;
    b = '0;
    for (int i = 0; i < nbytes; i++) b[1023 - 8*i -: 8] = msg[i];
    b[1023 - 8*nbytes -: 8] = 8'h80;
    b[127:0] = 128'(nbytes * 8);
    return b;
  endfunction

endpackage
