// aes_round: one combinational AES round, fault tolerant when encrypting.
//
// Encryption (dec = 0):
//   SubBytes -> [correct] -> ShiftRows -> MixColumns -> [correct] -> AddRoundKey
// MixColumns is skipped when last = 1. After SubBytes and after MixColumns
// every byte is checked against Hamming check bits predicted from the round
// input (hamming_predict) and a single flipped bit per byte is corrected, so
// the round carries on without interruption. The ShiftRows prediction is the
// rotated SubBytes prediction and is the one checked in the last round.
// Decryption (dec = 1), the standard inverse cipher round:
//   InvShiftRows -> InvSubBytes -> AddRoundKey -> InvMixColumns (skipped when
//   last = 1)
// The substitution and the byte permutation commute, so both directions use
// the same S-boxes, then the same ShiftRows block, and share one MixColumns
// block. No check bits are predicted for the inverse transformations, so
// correction is disabled while decrypting.
// fault_sb / fault_mc are XOR masks applied to the SubBytes and MixColumns
// outputs to model single event upsets. Status outputs report corrections
// and uncorrectable syndromes in this round. Purely combinational.
// The transformations and the places of prediction and correction follow the
// scheme; the last-round ShiftRows check, the fault masks and the absence of
// correction in decryption are this implementation's choices.
module aes_round
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  input  logic   dec,
  input  logic   last,
  input  block_t fault_sb,
  input  block_t fault_mc,
  output block_t state_out,
  output logic   corr_sb,      // a bit was corrected after SubBytes
  output logic   corr_mc,      // a bit was corrected after MixColumns
  output logic   uncorrectable // some byte had an uncorrectable syndrome
);
  block_t  sb, sb_f, sb_c, sr, mix_in, mc, mc_f, mc_c;
  checks_t pred_sb, pred_sr, pred_mc, pred_last;
  logic [15:0] c_sb, u_sb, c_mc, u_mc, c_last, u_last;
  block_t  sr_chk;

  sub_bytes u_sub (.din(state_in), .dec(dec), .dout(sb));
  assign sb_f = sb ^ fault_sb;

  hamming_predict u_pred (.a(state_in), .pred_sb(pred_sb), .pred_sr(pred_sr), .pred_mc(pred_mc));

  for (genvar n = 0; n < 16; n++) begin : g_ecc_sb
    ecc_correct u_ecc (
      .en(!dec), .data(sb_f[127-8*n -: 8]), .pred(pred_sb[63-4*n -: 4]),
      .data_out(sb_c[127-8*n -: 8]), .corrected(c_sb[n]), .uncorrectable(u_sb[n]));
  end

  shift_rows #(.W(8)) u_sr (.din(sb_c), .dec(dec), .dout(sr));

  assign mix_in = dec ? (sr ^ round_key) : sr;
  mix_columns u_mix (.din(mix_in), .dec(dec), .dout(mc));
  assign mc_f = mc ^ fault_mc;

  for (genvar n = 0; n < 16; n++) begin : g_ecc_mc
    ecc_correct u_ecc (
      .en(!dec && !last), .data(mc_f[127-8*n -: 8]), .pred(pred_mc[63-4*n -: 4]),
      .data_out(mc_c[127-8*n -: 8]), .corrected(c_mc[n]), .uncorrectable(u_mc[n]));
  end

  // Last encryption round: the ShiftRows output is checked against the
  // rotated SubBytes prediction (it was already corrected after SubBytes,
  // so this only flags a fault inside the permutation wiring).
  assign pred_last = pred_sr;
  for (genvar n = 0; n < 16; n++) begin : g_ecc_last
    ecc_correct u_ecc (
      .en(!dec && last), .data(sr[127-8*n -: 8]), .pred(pred_last[63-4*n -: 4]),
      .data_out(sr_chk[127-8*n -: 8]), .corrected(c_last[n]), .uncorrectable(u_last[n]));
  end

  always_comb begin
    if (!dec) state_out = (last ? sr_chk : mc_c) ^ round_key;
    else      state_out = last ? (sr ^ round_key) : mc;
    corr_sb       = |c_sb;
    corr_mc       = |c_mc | |c_last;
    uncorrectable = |u_sb | |u_mc | |u_last;
  end
endmodule
