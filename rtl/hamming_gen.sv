// hamming_gen: check bits of the Hamming (12,8) single-error-correcting code
// for one byte b7..b0.
//   p3 = b7^b6^b4^b3^b1   p2 = b7^b5^b4^b2^b1
//   p1 = b6^b5^b4^b0      p0 = b3^b2^b1^b0
// Every data bit has a distinct check-bit pattern of weight two or more, so a
// single flipped bit can be located. Purely combinational.
// The bit groups are those of the fault-tolerance scheme.
module hamming_gen
  import aes_pkg::*;
(
  input  byte_t  data,
  output check_t check   // {p3, p2, p1, p0}
);
  assign check = {data[7] ^ data[6] ^ data[4] ^ data[3] ^ data[1],
                  data[7] ^ data[5] ^ data[4] ^ data[2] ^ data[1],
                  data[6] ^ data[5] ^ data[4] ^ data[0],
                  data[3] ^ data[2] ^ data[1] ^ data[0]};
endmodule
