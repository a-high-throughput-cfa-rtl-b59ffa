// tb_aes_round: random states and round keys through the encryption and
// decryption rounds (normal and last), compared with the reference round.
// In encryption rounds, a flipped bit injected at every one of the 128
// positions after SubBytes and, in normal rounds, after MixColumns must be
// corrected (same output, correction flagged); an injected fault in a
// decryption round must pass through uncorrected.
module tb_aes_round;
  import aes_ref_pkg::*;
  logic [127:0] state_in, round_key, fault_sb, fault_mc, state_out;
  logic dec, last, corr_sb, corr_mc, uncorrectable;
  int checks = 0, failures = 0;

  aes_round dut (.state_in(state_in), .round_key(round_key), .dec(dec), .last(last),
                 .fault_sb(fault_sb), .fault_mc(fault_mc), .state_out(state_out),
                 .corr_sb(corr_sb), .corr_mc(corr_mc), .uncorrectable(uncorrectable));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] ref_round(logic [127:0] s, logic [127:0] k, bit d, bit l);
    if (!d) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (!l) s = mix_columns(s, 0);
      return s ^ k;
    end
    s = sub_bytes(shift_rows(s, 1), 1) ^ k;
    return l ? s : mix_columns(s, 1);
  endfunction

  task automatic check(logic [127:0] exp_v, logic exp_csb, logic exp_cmc, string what);
    #1;
    checks++;
    if (state_out !== exp_v || corr_sb !== exp_csb || corr_mc !== exp_cmc || uncorrectable) begin
      failures++;
      $display("FAIL %s dec=%b last=%b got=%h exp=%h csb=%b cmc=%b u=%b", what, dec, last,
               state_out, exp_v, corr_sb, corr_mc, uncorrectable);
    end
  endtask

  initial begin
    fault_sb = '0; fault_mc = '0;
    for (int t = 0; t < 40; t++) begin
      logic [127:0] e;
      state_in  = {$urandom, $urandom, $urandom, $urandom};
      round_key = {$urandom, $urandom, $urandom, $urandom};
      dec = t[0]; last = t[1];
      fault_sb = '0; fault_mc = '0;
      e = ref_round(state_in, round_key, dec, last);
      check(e, 0, 0, "clean");
      if (!dec) begin
        for (int b = 0; b < 128; b += 5) begin
          fault_sb = 128'(1) << b; fault_mc = '0;
          check(e, 1, 0, "sb fault");
          if (!last) begin
            fault_sb = '0; fault_mc = 128'(1) << b;
            check(e, 0, 1, "mc fault");
          end
        end
      end else begin
        fault_sb = 128'(1) << (t % 128); fault_mc = '0;
        #1;
        checks++;
        if (state_out === e) begin failures++; $display("FAIL decrypt fault vanished"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
