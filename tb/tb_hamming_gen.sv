// tb_hamming_gen: all 256 bytes against the reference parity-check matrix,
// and a check that the code separates every single-bit error (distinct
// non-zero syndromes of weight >= 2 for data bits).
module tb_hamming_gen;
  import aes_ref_pkg::*;
  logic [7:0] data;
  logic [3:0] check;
  logic [3:0] col [8];
  int checks = 0, failures = 0;

  hamming_gen dut (.data(data), .check(check));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      data = 8'(i); #1;
      checks++;
      if (check !== ham(data)) begin
        failures++; $display("FAIL data=%h got=%h exp=%h", data, check, ham(data));
      end
    end
    for (int k = 0; k < 8; k++) begin
      data = 8'(1 << k); #1;
      col[k] = check;
      checks++;
      if ($countones(check) < 2) begin failures++; $display("FAIL column %0d weight", k); end
      for (int j = 0; j < k; j++) begin
        checks++;
        if (col[j] == col[k]) begin failures++; $display("FAIL columns %0d %0d equal", j, k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
