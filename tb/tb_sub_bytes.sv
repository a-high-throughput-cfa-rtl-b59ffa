// tb_sub_bytes: random 128-bit states through SubBytes and InvSubBytes,
// compared with the reference byte substitution.
module tb_sub_bytes;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  logic dec;
  int checks = 0, failures = 0;

  sub_bytes dut (.din(din), .dec(dec), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      dec = t[0];
      #1;
      checks++;
      if (dout !== sub_bytes(din, dec)) begin
        failures++;
        $display("FAIL din=%h dec=%b got=%h exp=%h", din, dec, dout, sub_bytes(din, dec));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
