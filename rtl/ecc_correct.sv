// ecc_correct: detects and corrects a single bit fault in one byte leaving
// an AES transformation.
//
// The predicted check bits x3..x0 come from the transformation's input (via
// the precalculated tables); the check bits y3..y0 are calculated here from
// the byte the transformation produced. Their XOR is the syndrome. A syndrome
// equal to the check pattern of data bit i means bit i flipped and it is
// inverted; a syndrome with a single one means a check bit itself was hit
// and the data is passed unchanged; any other non-zero syndrome cannot come
// from one flipped bit and is flagged as uncorrectable (data passed
// unchanged). en = 0 disables correction (used where no prediction exists,
// e.g. in decryption rounds). Purely combinational.
// Comparing predicted and calculated check bits and flipping the located bit
// follows the scheme; the treatment of check-bit faults and of uncorrectable
// syndromes, and the enable, are this implementation's choices.
module ecc_correct
  import aes_pkg::*;
(
  input  logic   en,
  input  byte_t  data,          // transformation output, possibly faulty
  input  check_t pred,          // predicted check bits x3..x0
  output byte_t  data_out,      // corrected byte
  output logic   corrected,     // a data bit was flipped back
  output logic   uncorrectable  // syndrome matches no single-bit fault
);
  check_t calc, syn;
  byte_t  flip;

  hamming_gen u_gen (.data(data), .check(calc));

  always_comb begin
    syn  = pred ^ calc;
    flip = '0;
    for (int i = 0; i < 8; i++)
      if (syn == syndrome_of_bit(i)) flip[i] = 1'b1;
    if (!en) flip = '0;
    data_out      = data ^ flip;
    corrected     = |flip;
    uncorrectable = en && (syn != '0) && (flip == '0) && ((syn & (syn - 4'd1)) != '0);
  end
endmodule
