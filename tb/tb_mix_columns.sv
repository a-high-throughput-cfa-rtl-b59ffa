// tb_mix_columns: MixColumns and InvMixColumns against the reference
// matrix product, the worked column (87 6E 46 A6 -> first byte 47), the
// FIPS-197 column (DB 13 53 45 -> 8E 4D A1 BC) and inverse-of-forward.
module tb_mix_columns;
  import aes_ref_pkg::*;
  logic [127:0] din, dout, back;
  logic dec;
  int checks = 0, failures = 0;

  mix_columns dut (.din(din), .dec(dec), .dout(dout));
  mix_columns inv (.din(dout), .dec(1'b1), .dout(back));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = {32'h876e46a6, 32'hdb135345, 64'h0}; dec = 0; #1;
    checks++;
    if (dout[127:120] !== 8'h47) begin failures++; $display("FAIL example got %h", dout[127:120]); end
    checks++;
    if (dout[95:64] !== 32'h8e4da1bc) begin failures++; $display("FAIL fips column got %h", dout[95:64]); end
    for (int t = 0; t < 200; t++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      dec = t[0];
      #1;
      checks++;
      if (dout !== mix_columns(din, dec)) begin
        failures++; $display("FAIL din=%h dec=%b got=%h", din, dec, dout);
      end
      if (!dec) begin
        checks++;
        if (back !== din) begin failures++; $display("FAIL inverse din=%h back=%h", din, back); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
