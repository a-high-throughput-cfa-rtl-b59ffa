// mix_columns: MixColumns / InvMixColumns over the 128-bit state.
//
// Each column is multiplied in GF(2^8) by the circulant matrix
// [02 03 01 01] (dec = 0) or [0E 0B 0D 09] (dec = 1). Multiplication by 02
// is a left shift with a conditional XOR of 8'h1b (xtime); the other
// constants are sums of repeated xtime. Purely combinational.
// The matrices are the standard AES ones and the xtime multiplication follows
// the shift-and-XOR method; sharing one block for both directions is this
// implementation's choice.
module mix_columns
  import aes_pkg::*;
(
  input  block_t din,
  input  logic   dec,
  output block_t dout
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    byte_t s [4];
    byte_t x2 [4], x4 [4], x8 [4];
    byte_t o [4];
    always_comb begin
      for (int r = 0; r < 4; r++) begin
        s[r]  = din[127-8*(r+4*c) -: 8];
        x2[r] = xtime(s[r]);
        x4[r] = xtime(x2[r]);
        x8[r] = xtime(x4[r]);
      end
      for (int r = 0; r < 4; r++) begin
        if (!dec) begin
          // 02*s[r] ^ 03*s[r+1] ^ s[r+2] ^ s[r+3]
          o[r] = x2[r] ^ x2[(r+1)%4] ^ s[(r+1)%4] ^ s[(r+2)%4] ^ s[(r+3)%4];
        end else begin
          // 0E*s[r] ^ 0B*s[r+1] ^ 0D*s[r+2] ^ 09*s[r+3]
          o[r] = (x8[r] ^ x4[r] ^ x2[r])
               ^ (x8[(r+1)%4] ^ x2[(r+1)%4] ^ s[(r+1)%4])
               ^ (x8[(r+2)%4] ^ x4[(r+2)%4] ^ s[(r+2)%4])
               ^ (x8[(r+3)%4] ^ s[(r+3)%4]);
        end
      end
    end
    for (genvar r = 0; r < 4; r++) begin : g_out
      assign dout[127-8*(r+4*c) -: 8] = o[r];
    end
  end
endmodule
