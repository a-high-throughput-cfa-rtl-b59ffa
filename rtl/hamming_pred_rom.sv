// hamming_pred_rom: precalculated Hamming check-bit tables of the S-box.
//
// For a state byte a the ROM returns
//   h_rd  = h(S[a])        (table hRD)
//   h2_rd = h(02 * S[a])   (table h2RD)
//   h3_rd = h(03 * S[a])   (table h3RD)
// where S is the AES S-box, h the Hamming (12,8) check bits and * the
// GF(2^8) product. Because the code is linear these three tables predict the
// check bits of SubBytes, ShiftRows and MixColumns from the SubBytes input
// alone. The 256 x 12-bit table is filled at elaboration from the S-box
// definition S[a] = A*a^-1 + 8'h63, where the inverse comes from exponent
// and logarithm tables over the generator 8'h03. It is computed independently
// of the composite-field S-box hardware so that a fault there is not
// repeated in the prediction. Read is asynchronous (combinational).
// The three tables follow the scheme; computing them at elaboration instead
// of storing them as data is this implementation's choice.
module hamming_pred_rom
  import aes_pkg::*;
(
  input  byte_t  addr,
  output check_t h_rd,
  output check_t h2_rd,
  output check_t h3_rd
);
  typedef logic [256*12-1:0] table_t;

  function automatic byte_t affine(byte_t b);
    byte_t r;
    for (int i = 0; i < 8; i++)
      r[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  function automatic table_t build_table();
    table_t t;
    byte_t  expo [255];
    byte_t  inv  [256];
    byte_t  s;
    expo[0] = 8'h01;
    for (int k = 1; k < 255; k++) expo[k] = mul3(expo[k-1]);
    inv[0] = 8'h00;
    for (int k = 0; k < 255; k++) inv[expo[k]] = expo[(255 - k) % 255];
    for (int a = 0; a < 256; a++) begin
      s = affine(inv[a]);
      t[12*a +: 12] = {hamming(s), hamming(xtime(s)), hamming(mul3(s))};
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  logic [11:0] entry;
  assign entry = TABLE[12*addr +: 12];
  assign {h_rd, h2_rd, h3_rd} = entry;
endmodule
