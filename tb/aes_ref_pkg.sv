// aes_ref_pkg: reference model of AES-128 used by the testbenches.
//
// Written straight from the AES definition and independent of the RTL:
// the S-box is computed as the affine transform of a^254 (repeated
// shift-and-add multiplication), the inverse S-box by searching the S-box,
// and the cipher, inverse cipher, key schedule and OFB mode follow the
// standard round by round. Also holds a Hamming (12,8) reference written as
// a parity-check matrix and a GF((2^2)^2) multiplier for the subfield tests.
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] blk;

  function automatic u8 gmul(u8 a, u8 b);
    u8 r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return r;
  endfunction

  function automatic u8 ginv(u8 a);
    u8 r = 8'h01;
    if (a == 0) return 0;
    for (int i = 0; i < 254; i++) r = gmul(r, a);
    return r;
  endfunction

  function automatic u8 sbox(u8 a);
    u8 b = ginv(a);
    u8 r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ ((8'h63 >> i) & 1);
    return r;
  endfunction

  u8 SB_T [256];
  u8 ISB_T [256];
  bit tables_ready = 0;

  function automatic void init_tables();
    if (tables_ready) return;
    for (int a = 0; a < 256; a++) begin
      SB_T[a] = sbox(u8'(a));
      ISB_T[SB_T[a]] = u8'(a);
    end
    tables_ready = 1;
  endfunction

  function automatic u8 sb(u8 a);  init_tables(); return SB_T[a];  endfunction
  function automatic u8 isb(u8 a); init_tables(); return ISB_T[a]; endfunction

  function automatic u8 getb(blk s, int n); return s[127-8*n -: 8]; endfunction

  function automatic blk setb(blk s, int n, u8 v);
    s[127-8*n -: 8] = v;
    return s;
  endfunction

  function automatic blk sub_bytes(blk s, bit inv);
    blk r;
    for (int n = 0; n < 16; n++) r = setb(r, n, inv ? isb(getb(s, n)) : sb(getb(s, n)));
    return r;
  endfunction

  function automatic blk shift_rows(blk s, bit inv);
    blk r;
    for (int row = 0; row < 4; row++)
      for (int c = 0; c < 4; c++)
        r = setb(r, row + 4*c, getb(s, row + 4*(inv ? (c + 4 - row) % 4 : (c + row) % 4)));
    return r;
  endfunction

  function automatic blk mix_columns(blk s, bit inv);
    u8 m [4][4];
    blk r;
    m = inv ? '{'{8'h0e, 8'h0b, 8'h0d, 8'h09}, '{8'h09, 8'h0e, 8'h0b, 8'h0d},
                '{8'h0d, 8'h09, 8'h0e, 8'h0b}, '{8'h0b, 8'h0d, 8'h09, 8'h0e}}
            : '{'{8'h02, 8'h03, 8'h01, 8'h01}, '{8'h01, 8'h02, 8'h03, 8'h01},
                '{8'h01, 8'h01, 8'h02, 8'h03}, '{8'h03, 8'h01, 8'h01, 8'h02}};
    for (int c = 0; c < 4; c++)
      for (int i = 0; i < 4; i++) begin
        u8 acc = 0;
        for (int k = 0; k < 4; k++) acc ^= gmul(m[i][k], getb(s, k + 4*c));
        r = setb(r, i + 4*c, acc);
      end
    return r;
  endfunction

  typedef blk rk_t [11];

  function automatic rk_t expand_key(blk key);
    logic [31:0] w [44];
    logic [31:0] t;
    u8 rc = 8'h01;
    rk_t rk;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb(t[31:24]), sb(t[23:16]), sb(t[15:8]), sb(t[7:0])};
        t[31:24] ^= rc;
        rc = gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic blk encrypt(blk key, blk pt);
    rk_t rk = expand_key(key);
    blk s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != 10) s = mix_columns(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic blk decrypt(blk key, blk ct);
    rk_t rk = expand_key(key);
    blk s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1) ^ rk[r];
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

  // Hamming (12,8): column k of the check matrix for data bit k, as {p3,p2,p1,p0}
  function automatic logic [3:0] ham(u8 b);
    logic [3:0] col [8] = '{4'b0011, 4'b1101, 4'b0101, 4'b1001, 4'b1110, 4'b0110, 4'b1010, 4'b1100};
    logic [3:0] r = 0;
    for (int k = 0; k < 8; k++) if (b[k]) r ^= col[k];
    return r;
  endfunction

  function automatic logic [63:0] ham_state(blk s);
    logic [63:0] r;
    for (int n = 0; n < 16; n++) r[63-4*n -: 4] = ham(getb(s, n));
    return r;
  endfunction

  // GF(2^2) via logarithms (1 = w^0, 2 = w^1, 3 = w^2) and GF((2^2)^2) with y^2 = y + 3
  function automatic logic [1:0] f4mul(logic [1:0] a, logic [1:0] b);
    int la, lb;
    if (a == 0 || b == 0) return 0;
    la = (a == 1) ? 0 : (a == 2) ? 1 : 2;
    lb = (b == 1) ? 0 : (b == 2) ? 1 : 2;
    case ((la + lb) % 3)
      0: return 2'd1;
      1: return 2'd2;
      default: return 2'd3;
    endcase
  endfunction

  function automatic logic [3:0] f16mul(logic [3:0] a, logic [3:0] b);
    // (ah y + al)(bh y + bl) = ah bh (y + 3) + (ah bl + al bh) y + al bl
    logic [1:0] p = f4mul(a[3:2], b[3:2]);
    return {p ^ f4mul(a[3:2], b[1:0]) ^ f4mul(a[1:0], b[3:2]),
            f4mul(p, 2'd3) ^ f4mul(a[1:0], b[1:0])};
  endfunction

endpackage
