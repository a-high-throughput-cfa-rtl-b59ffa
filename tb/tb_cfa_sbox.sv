// tb_cfa_sbox: exhaustive test of the composite-field S-box in both
// directions against the reference S-box (affine transform of a^254), plus
// the worked example S(95) = 2A and InvS(2A) = 95.
module tb_cfa_sbox;
  import aes_ref_pkg::*;
  logic [7:0] din, dout;
  logic       dec;
  int checks = 0, failures = 0;

  cfa_sbox dut (.din(din), .dec(dec), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [7:0] exp_v, string what);
    checks++;
    if (dout !== exp_v) begin
      failures++;
      $display("FAIL %s din=%h dec=%b got=%h exp=%h", what, din, dec, dout, exp_v);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      din = 8'(i); dec = 0; #1; check(sb(8'(i)), "sbox");
      dec = 1; #1; check(isb(8'(i)), "inv sbox");
    end
    din = 8'h95; dec = 0; #1; check(8'h2a, "example");
    din = 8'h2a; dec = 1; #1; check(8'h95, "example inv");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
