// shift_rows: ShiftRows / InvShiftRows permutation of a 4x4 state.
//
// Row r of the state is rotated left by r positions (right for dec = 1);
// row 0 is unchanged. Element s[r][c] is element n = r + 4c, stored at
// [16*W-1-W*n -: W]. W is the element width: 8 for the data state, 4 for
// the matching matrix of Hamming check bits, which the fault-tolerant round
// rotates exactly like the data. Purely combinational.
// The permutation is standard AES; reusing it for the check-bit matrix
// follows the fault-tolerance scheme, the width parameter is this
// implementation's way of doing so.
module shift_rows #(
  parameter int unsigned W = 8   // bits per state element
) (
  input  logic [16*W-1:0] din,
  input  logic            dec,
  output logic [16*W-1:0] dout
);
  for (genvar r = 0; r < 4; r++) begin : g_row
    for (genvar c = 0; c < 4; c++) begin : g_col
      localparam int unsigned DST = r + 4*c;
      localparam int unsigned SRC_ENC = r + 4*((c + r) % 4);
      localparam int unsigned SRC_DEC = r + 4*((c + 4 - r) % 4);
      assign dout[16*W-1-W*DST -: W] = dec ? din[16*W-1-W*SRC_DEC -: W]
                                           : din[16*W-1-W*SRC_ENC -: W];
    end
  end
endmodule
