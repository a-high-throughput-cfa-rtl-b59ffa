// tb_hamming_predict: for random round inputs a, the predicted check bits
// must equal the check bits computed from the reference SubBytes(a),
// ShiftRows(SubBytes(a)) and MixColumns(ShiftRows(SubBytes(a))).
module tb_hamming_predict;
  import aes_ref_pkg::*;
  logic [127:0] a;
  logic [63:0]  pred_sb, pred_sr, pred_mc;
  int checks = 0, failures = 0;

  hamming_predict dut (.a(a), .pred_sb(pred_sb), .pred_sr(pred_sr), .pred_mc(pred_mc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      logic [127:0] s1, s2, s3;
      a = {$urandom, $urandom, $urandom, $urandom};
      #1;
      s1 = sub_bytes(a, 0);
      s2 = shift_rows(s1, 0);
      s3 = mix_columns(s2, 0);
      checks += 3;
      if (pred_sb !== ham_state(s1)) begin failures++; $display("FAIL sb a=%h", a); end
      if (pred_sr !== ham_state(s2)) begin failures++; $display("FAIL sr a=%h", a); end
      if (pred_mc !== ham_state(s3)) begin failures++; $display("FAIL mc a=%h", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
