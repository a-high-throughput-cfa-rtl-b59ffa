// tb_ecc_correct: for random bytes with correct predictions, every single
// data-bit flip must be corrected and flagged, every single check-bit flip
// must leave the data unchanged, a fault-free byte must pass untouched, and
// with en = 0 nothing may be changed. Double data-bit flips whose syndrome
// has weight 3 or 4 but matches no column must be flagged uncorrectable.
module tb_ecc_correct;
  import aes_ref_pkg::*;
  logic       en;
  logic [7:0] data, data_out, good;
  logic [3:0] pred;
  logic       corrected, uncorrectable;
  int checks = 0, failures = 0;
  int n_unc = 0;

  ecc_correct dut (.en(en), .data(data), .pred(pred), .data_out(data_out),
                   .corrected(corrected), .uncorrectable(uncorrectable));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(logic [7:0] exp_d, logic exp_c, logic exp_u, string what);
    #1;
    checks++;
    if (data_out !== exp_d || corrected !== exp_c || uncorrectable !== exp_u) begin
      failures++;
      $display("FAIL %s good=%h data=%h pred=%h out=%h c=%b u=%b", what, good, data, pred,
               data_out, corrected, uncorrectable);
    end
  endtask

  initial begin
    for (int t = 0; t < 100; t++) begin
      good = 8'($urandom);
      en = 1;
      pred = ham(good);
      data = good; expect_out(good, 0, 0, "clean");
      for (int k = 0; k < 8; k++) begin
        data = good ^ 8'(1 << k); expect_out(good, 1, 0, "data bit");
      end
      for (int k = 0; k < 4; k++) begin
        data = good; pred = ham(good) ^ 4'(1 << k); expect_out(good, 0, 0, "check bit");
      end
      pred = ham(good);
      for (int j = 0; j < 8; j++)
        for (int k = 0; k < j; k++) begin
          logic [3:0] s;
          s = ham(8'(1 << j)) ^ ham(8'(1 << k));
          if ($countones(s) >= 3 && s != 4'b1110 && s != 4'b1101) begin
            data = good ^ 8'(1 << j) ^ 8'(1 << k);
            expect_out(data, 0, 1, "double");
            n_unc++;
          end
        end
      en = 0;
      data = good ^ 8'h10; expect_out(good ^ 8'h10, 0, 0, "disabled");
    end
    checks++;
    if (n_unc == 0) begin failures++; $display("FAIL no uncorrectable case exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
