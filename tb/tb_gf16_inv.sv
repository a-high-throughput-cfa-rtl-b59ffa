// tb_gf16_inv: exhaustive test of the GF((2^2)^2) inverter. For every
// non-zero a the product a * a^-1 must be 1 (product from the reference
// multiplier), and 0 must map to 0.
module tb_gf16_inv;
  import aes_ref_pkg::*;
  logic [3:0] a, a_inv;
  int checks = 0, failures = 0;

  gf16_inv dut (.a(a), .a_inv(a_inv));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      a = 4'(i);
      #1;
      checks++;
      if (i == 0) begin
        if (a_inv != 0) begin failures++; $display("FAIL inv(0)=%h", a_inv); end
      end else if (f16mul(a, a_inv) != 4'h1) begin
        failures++;
        $display("FAIL a=%h inv=%h product=%h", a, a_inv, f16mul(a, a_inv));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
