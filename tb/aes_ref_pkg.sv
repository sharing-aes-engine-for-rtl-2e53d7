// aes_ref_pkg: plain behavioural AES-128 reference for the testbenches.
//
// Written independently of the RTL: the S-box is found by searching for each
// byte's multiplicative inverse and applying the affine map bit by bit, the
// state is a byte array, and the cipher and inverse cipher follow the
// textbook round order. Blocks use the same byte order as the RTL (byte 0 in
// bits [127:120], column-major).
package aes_ref_pkg;

  typedef logic [127:0] blk_t;

  // Loop bounds kept in variables so that the simulator compiles the loops
  // as loops instead of unrolling the whole cipher at every call site.
  int unsigned N4 = 4, N8 = 8, N16 = 16, N44 = 44, N256 = 256, NR = 10;

  function automatic logic [7:0] r_mul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < N8; i++) if (b[i]) p = p ^ (16'(a) << i);
    for (int i = 15; i >= 8; i--) if (p[i]) p = p ^ (16'h011b << (i - 8));
    return p[7:0];
  endfunction

  function automatic logic [7:0] r_sbox(input logic [7:0] x);
    logic [7:0] inv, s;
    inv = 8'h00;
    for (int y = 1; y < N256; y++) if (r_mul(x, 8'(y)) == 8'h01) inv = 8'(y);
    for (int i = 0; i < N8; i++)
      s[i] = inv[i] ^ inv[(i + 4) % 8] ^ inv[(i + 5) % 8] ^ inv[(i + 6) % 8] ^ inv[(i + 7) % 8];
    return s ^ 8'h63;
  endfunction

  logic [7:0] fwd_tab [256];
  logic [7:0] inv_tab [256];
  bit         tab_ready = 0;

  function automatic void build_tables();
    if (tab_ready) return;
    for (int i = 0; i < N256; i++) fwd_tab[i] = r_sbox(8'(i));
    for (int i = 0; i < N256; i++) inv_tab[fwd_tab[i]] = 8'(i);
    tab_ready = 1;
  endfunction

  function automatic logic [7:0] sb(input logic [7:0] x);
    build_tables();
    return fwd_tab[x];
  endfunction

  function automatic logic [7:0] isb(input logic [7:0] x);
    build_tables();
    return inv_tab[x];
  endfunction

  function automatic logic [7:0] bget(input blk_t b, input int i);
    return b[127 - 8*i -: 8];
  endfunction

  function automatic blk_t sub_bytes(input blk_t b, input bit inv);
    blk_t o;
    for (int i = 0; i < N16; i++) o[127 - 8*i -: 8] = inv ? isb(bget(b, i)) : sb(bget(b, i));
    return o;
  endfunction

  function automatic blk_t shift_rows(input blk_t b, input bit inv);
    blk_t o;
    for (int c = 0; c < N4; c++)
      for (int r = 0; r < N4; r++)
        o[127 - 8*(4*c + r) -: 8] = inv ? bget(b, 4*((c - r + 4) % 4) + r)
                                        : bget(b, 4*((c + r) % 4) + r);
    return o;
  endfunction

  function automatic blk_t mix_columns(input blk_t b, input bit inv);
    blk_t o;
    logic [7:0] m [4][4];
    if (inv) m = '{'{8'h0e, 8'h0b, 8'h0d, 8'h09}, '{8'h09, 8'h0e, 8'h0b, 8'h0d},
                   '{8'h0d, 8'h09, 8'h0e, 8'h0b}, '{8'h0b, 8'h0d, 8'h09, 8'h0e}};
    else     m = '{'{8'h02, 8'h03, 8'h01, 8'h01}, '{8'h01, 8'h02, 8'h03, 8'h01},
                   '{8'h01, 8'h01, 8'h02, 8'h03}, '{8'h03, 8'h01, 8'h01, 8'h02}};
    for (int c = 0; c < N4; c++)
      for (int r = 0; r < N4; r++) begin
        logic [7:0] acc;
        acc = 8'h00;
        for (int k = 0; k < N4; k++) acc = acc ^ r_mul(m[r][k], bget(b, 4*c + k));
        o[127 - 8*(4*c + r) -: 8] = acc;
      end
    return o;
  endfunction

  // Round keys k[0..10] of AES-128.
  function automatic void expand_key(input blk_t key, output blk_t rk [11]);
    logic [31:0] w [44];
    logic [7:0]  rc;
    rc = 8'h01;
    for (int i = 0; i < N4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < N44; i++) begin
      logic [31:0] t;
      t = w[i - 1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb(t[31:24]) ^ rc, sb(t[23:16]), sb(t[15:8]), sb(t[7:0])};
        rc = r_mul(rc, 8'h02);
      end
      w[i] = w[i - 4] ^ t;
    end
    for (int r = 0; r <= NR; r++) rk[r] = {w[4*r], w[4*r + 1], w[4*r + 2], w[4*r + 3]};
  endfunction

  function automatic blk_t encrypt(input blk_t pt, input blk_t key);
    blk_t rk [11];
    blk_t s;
    expand_key(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= NR; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != NR) s = mix_columns(s, 0);
      s = s ^ rk[r];
    end
    return s;
  endfunction

  function automatic blk_t decrypt(input blk_t ct, input blk_t key);
    blk_t rk [11];
    blk_t s;
    expand_key(key, rk);
    s = ct ^ rk[10];
    for (int r = NR - 1; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1);
      s = s ^ rk[r];
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

  // FIPS-197 known-answer vectors (Appendix B and C.1).
  localparam blk_t KAT_KEY0 = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam blk_t KAT_PT0  = 128'h3243f6a8885a308d313198a2e0370734;
  localparam blk_t KAT_CT0  = 128'h3925841d02dc09fbdc118597196a0b32;
  localparam blk_t KAT_KEY1 = 128'h000102030405060708090a0b0c0d0e0f;
  localparam blk_t KAT_PT1  = 128'h00112233445566778899aabbccddeeff;
  localparam blk_t KAT_CT1  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;

  function automatic blk_t rand128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

endpackage
