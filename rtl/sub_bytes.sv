// sub_bytes: SubBytes / InvSubBytes over the whole 128-bit state.
//
// Sixteen composite-field S-boxes work in parallel, one per state byte, so
// a full state is substituted in one combinational pass. dec selects the
// inverse S-box. Byte order as in aes_pkg. Purely combinational.
// The transformation is standard AES SubBytes; substituting all sixteen bytes
// in one pass is this implementation's choice.
module sub_bytes
  import aes_pkg::*;
(
  input  block_t din,
  input  logic   dec,
  output block_t dout
);
  for (genvar n = 0; n < 16; n++) begin : g_sbox
    cfa_sbox u_sbox (.din(din[127-8*n -: 8]), .dec(dec), .dout(dout[127-8*n -: 8]));
  end
endmodule
