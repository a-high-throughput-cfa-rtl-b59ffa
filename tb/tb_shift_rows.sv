// tb_shift_rows: ShiftRows and InvShiftRows on random and on a counting
// state, compared with the reference permutation; also checks that the
// inverse undoes the forward shift.
module tb_shift_rows;
  import aes_ref_pkg::*;
  logic [127:0] din, dout, back;
  logic dec;
  int checks = 0, failures = 0;

  shift_rows dut (.din(din), .dec(dec), .dout(dout));
  shift_rows inv (.din(dout), .dec(1'b1), .dout(back));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // counting state 00 01 .. 0f: row 1 becomes 05 09 0d 01
    din = 128'h000102030405060708090a0b0c0d0e0f; dec = 0; #1;
    checks++;
    if (dout !== 128'h00050a0f04090e03080d02070c01060b) begin
      failures++; $display("FAIL counting state got %h", dout);
    end
    for (int t = 0; t < 100; t++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      dec = t[0];
      #1;
      checks++;
      if (dout !== shift_rows(din, dec)) begin
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
