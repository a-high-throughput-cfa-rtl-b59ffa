// tb_hamming_pred_rom: all 256 addresses of the check-bit tables against
// h(S[a]), h(02*S[a]) and h(03*S[a]) from the reference model.
module tb_hamming_pred_rom;
  import aes_ref_pkg::*;
  logic [7:0] addr;
  logic [3:0] h_rd, h2_rd, h3_rd;
  int checks = 0, failures = 0;

  hamming_pred_rom dut (.addr(addr), .h_rd(h_rd), .h2_rd(h2_rd), .h3_rd(h3_rd));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      logic [7:0] s;
      addr = 8'(a); #1;
      s = sb(addr);
      checks++;
      if (h_rd !== ham(s) || h2_rd !== ham(gmul(s, 8'h02)) || h3_rd !== ham(gmul(s, 8'h03))) begin
        failures++;
        $display("FAIL a=%h got %h %h %h", addr, h_rd, h2_rd, h3_rd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
