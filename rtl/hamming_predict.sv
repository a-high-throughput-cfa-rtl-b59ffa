// hamming_predict: predicted Hamming check bits of an encryption round.
//
// From the state a entering SubBytes it predicts, without using the S-box
// datapath:
//   pred_sb : check bits of SubBytes(a), byte n = hRD[a_n]
//   pred_sr : check bits of ShiftRows(SubBytes(a)), the pred_sb matrix
//             rotated like the data
//   pred_mc : check bits of MixColumns(ShiftRows(SubBytes(a))); with a' the
//             shifted input state, column j:
//     h0,j = h2RD[a'0,j] ^ h3RD[a'1,j] ^ hRD[a'2,j]  ^ hRD[a'3,j]
//     h1,j = hRD[a'0,j]  ^ h2RD[a'1,j] ^ h3RD[a'2,j] ^ hRD[a'3,j]
//     h2,j = hRD[a'0,j]  ^ hRD[a'1,j]  ^ h2RD[a'2,j] ^ h3RD[a'3,j]
//     h3,j = h3RD[a'0,j] ^ hRD[a'1,j]  ^ hRD[a'2,j]  ^ h2RD[a'3,j]
// Sixteen table copies are read in parallel. Purely combinational.
// The prediction equations follow the scheme; reading a'_{i,j} as the byte
// that lands in row i, column j after ShiftRows is how the equations are
// applied here.
module hamming_predict
  import aes_pkg::*;
(
  input  block_t  a,
  output checks_t pred_sb,
  output checks_t pred_sr,
  output checks_t pred_mc
);
  check_t h1 [16], h2 [16], h3 [16];

  for (genvar n = 0; n < 16; n++) begin : g_rom
    hamming_pred_rom u_rom (.addr(a[127-8*n -: 8]), .h_rd(h1[n]), .h2_rd(h2[n]), .h3_rd(h3[n]));
    assign pred_sb[63-4*n -: 4] = h1[n];
  end

  shift_rows #(.W(4)) u_sr (.din(pred_sb), .dec(1'b0), .dout(pred_sr));

  for (genvar j = 0; j < 4; j++) begin : g_col
    for (genvar i = 0; i < 4; i++) begin : g_row
      // Element (k, j) after ShiftRows came from (k, (j+k) mod 4) before it.
      localparam int unsigned S0 = 0 + 4*((j + 0) % 4);
      localparam int unsigned S1 = 1 + 4*((j + 1) % 4);
      localparam int unsigned S2 = 2 + 4*((j + 2) % 4);
      localparam int unsigned S3 = 3 + 4*((j + 3) % 4);
      check_t v;
      always_comb begin
        unique case (i)
          0:       v = h2[S0] ^ h3[S1] ^ h1[S2] ^ h1[S3];
          1:       v = h1[S0] ^ h2[S1] ^ h3[S2] ^ h1[S3];
          2:       v = h1[S0] ^ h1[S1] ^ h2[S2] ^ h3[S3];
          default: v = h3[S0] ^ h1[S1] ^ h1[S2] ^ h2[S3];
        endcase
      end
      assign pred_mc[63-4*(i+4*j) -: 4] = v;
    end
  end
endmodule
