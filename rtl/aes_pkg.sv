// aes_pkg: types, constants and small functions shared by the AES-128 engine.
//
// The 128-bit state and every round key use the FIPS-197 byte order: byte n
// of a block sits at bits [127-8n -: 8] and state element s[r][c] is byte
// n = r + 4c, so the block is read into the state column by column.
//
// The composite-field constants describe the S-box field chosen for this
// design: GF(2^2) with P0(x)=x^2+x+1, GF((2^2)^2) with P1(x)=x^2+x+PHI and
// GF(((2^2)^2)^2) with P2(x)=x^2+x+LAMBDA. Of the 16 possible (PHI, LAMBDA)
// pairs and the 8 isomorphic mappings each allows, the one with the fewest
// ones in the input mapping plus the merged output mapping was taken:
// PHI = 2'b11, LAMBDA = 4'b1000, and the mapping sends the AES generator x to
// the composite element 8'h5A (a root of x^8+x^4+x^3+x+1 there). A matrix is
// stored as eight row masks; output bit i is the parity of (row[i] & input).
//   MAP_FWD     : AES basis -> composite basis (delta)
//   MAP_INV_AFF : affine matrix times delta^-1 (constant 8'h63 added after)
//   MAP_AFF_INV : delta times the inverse affine matrix (constant
//                 delta(8'h05) = 8'h69 added after), used by the inverse S-box
//   MAP_INV     : delta^-1
// The Hamming(12,8) check bits follow the bit groups of the design:
//   p3 = b7^b6^b4^b3^b1, p2 = b7^b5^b4^b2^b1, p1 = b6^b5^b4^b0, p0 = b3^b2^b1^b0.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [3:0]   check_t;
  typedef logic [127:0] block_t;
  typedef logic [63:0]  checks_t;   // 16 x 4 check bits, byte n at [63-4n -: 4]

  localparam int unsigned NR = 10;  // rounds of AES-128

  // Operations accepted by the engine
  typedef enum logic [1:0] {
    OP_ENC      = 2'd0,   // encrypt one block
    OP_DEC      = 2'd1,   // decrypt one block
    OP_OFB_IV   = 2'd2,   // load the OFB feedback register (initial vector)
    OP_OFB_DATA = 2'd3    // encrypt/decrypt one block in OFB mode
  } op_e;

  // Where a single-bit fault can be injected in an encryption round
  typedef enum logic {
    FS_SUBBYTES = 1'b0,
    FS_MIXCOL   = 1'b1
  } fault_stage_e;

  localparam logic [1:0] PHI    = 2'b11;
  localparam logic [3:0] LAMBDA = 4'b1000;

  localparam byte_t MAP_FWD     [8] = '{8'h11, 8'h52, 8'h58, 8'hc6, 8'h02, 8'hac, 8'h7e, 8'ha0};
  localparam byte_t MAP_INV     [8] = '{8'hdf, 8'h10, 8'hb6, 8'h16, 8'hde, 8'he2, 8'hcc, 8'h62};
  localparam byte_t MAP_INV_AFF [8] = '{8'h4d, 8'h83, 8'hd7, 8'h0d, 8'hb1, 8'h8c, 8'h50, 8'h84};
  localparam byte_t MAP_AFF_INV [8] = '{8'hee, 8'h2a, 8'h46, 8'ha0, 8'h49, 8'h71, 8'h09, 8'hc6};
  localparam byte_t AFF_C       = 8'h63;
  localparam byte_t AFF_C_MAPPED = 8'h69;

  function automatic byte_t get_byte(block_t b, int unsigned n);
    return b[127-8*n -: 8];
  endfunction

  function automatic check_t get_check(checks_t c, int unsigned n);
    return c[63-4*n -: 4];
  endfunction

  // 8x8 GF(2) matrix times vector, rows given as masks
  function automatic byte_t mat_mul(byte_t rows [8], byte_t x);
    byte_t r;
    for (int i = 0; i < 8; i++) r[i] = ^(rows[i] & x);
    return r;
  endfunction

  // --- GF(2^8) with x^8+x^4+x^3+x+1 ---------------------------------------
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t mul3(byte_t a);
    return xtime(a) ^ a;
  endfunction

  // --- GF(2^2), P0(x) = x^2 + x + 1 --------------------------------------
  function automatic logic [1:0] gf4_mul(logic [1:0] a, logic [1:0] b);
    logic hh;
    hh = a[1] & b[1];
    return {hh ^ (a[1] & b[0]) ^ (a[0] & b[1]), hh ^ (a[0] & b[0])};
  endfunction

  function automatic logic [1:0] gf4_sq(logic [1:0] a);   // also the inverse
    return {a[1], a[1] ^ a[0]};
  endfunction

  // --- GF((2^2)^2), P1(x) = x^2 + x + PHI --------------------------------
  function automatic logic [3:0] gf16_mul(logic [3:0] a, logic [3:0] b);
    logic [1:0] hh;
    hh = gf4_mul(a[3:2], b[3:2]);
    return {hh ^ gf4_mul(a[3:2], b[1:0]) ^ gf4_mul(a[1:0], b[3:2]),
            gf4_mul(hh, PHI) ^ gf4_mul(a[1:0], b[1:0])};
  endfunction

  function automatic logic [3:0] gf16_sq(logic [3:0] a);
    return gf16_mul(a, a);
  endfunction

  // --- Hamming (12,8) check bits -------------------------------------------
  function automatic check_t hamming(byte_t b);
    return {b[7] ^ b[6] ^ b[4] ^ b[3] ^ b[1],
            b[7] ^ b[5] ^ b[4] ^ b[2] ^ b[1],
            b[6] ^ b[5] ^ b[4] ^ b[0],
            b[3] ^ b[2] ^ b[1] ^ b[0]};
  endfunction

  // Syndrome of a single flipped data bit i (column of the check matrix)
  function automatic check_t syndrome_of_bit(int unsigned i);
    return hamming(byte_t'(1 << i));
  endfunction

endpackage
