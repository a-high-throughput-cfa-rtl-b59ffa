// tb_aes_core: the iterative core with round keys served by the reference
// key schedule. Checks the FIPS-197 vector (key 000102..0f, plain text
// 00112233..ff, cipher text 69c4e0d8 6a7b0430 d8cdb780 70b4c55a), random
// encrypt/decrypt pairs, the 11-clock latency, back-to-back starts in the
// done clock, and single-bit faults injected after SubBytes and MixColumns
// in chosen rounds (result must still be correct and the correction
// reported).
module tb_aes_core;
  import aes_ref_pkg::*;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, dec = 0, ready, done;
  logic [127:0] din, dout, rk;
  logic [3:0] rk_idx;
  logic fault_en = 0;
  fault_stage_e fault_stage = FS_SUBBYTES;
  logic [3:0] fault_round = 0, fault_byte = 0;
  logic [2:0] fault_bit = 0;
  logic corr_sb, corr_mc, uncorr;
  rk_t keys;
  logic [127:0] key;
  int checks = 0, failures = 0, n_corr = 0;

  aes_core dut (.clk(clk), .rst_n(rst_n), .start(start), .dec(dec), .din(din),
                .ready(ready), .done(done), .dout(dout), .rk_idx(rk_idx), .rk(rk),
                .fault_en(fault_en), .fault_stage(fault_stage), .fault_round(fault_round),
                .fault_byte(fault_byte), .fault_bit(fault_bit),
                .corr_sb(corr_sb), .corr_mc(corr_mc), .uncorr(uncorr));

  assign rk = (rk_idx <= 10) ? keys[rk_idx] : '0;
  always #5 clk = ~clk;
  always @(posedge clk) if (corr_sb || corr_mc) n_corr++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Starts one block, waits for done, checks result and latency.
  task automatic run(logic d, logic [127:0] in, logic [127:0] exp_v);
    int cycles = 0;
    @(negedge clk);
    while (!ready) @(negedge clk);
    start = 1; dec = d; din = in;
    @(negedge clk);
    start = 0; fault_en = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks += 2;
    if (dout !== exp_v) begin
      failures++; $display("FAIL dec=%b in=%h got=%h exp=%h", d, in, dout, exp_v);
    end
    if (cycles != 11) begin failures++; $display("FAIL latency %0d", cycles); end
  endtask

  initial begin
    key = 128'h000102030405060708090a0b0c0d0e0f;
    keys = expand_key(key);
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0, 128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(1, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 128'h00112233445566778899aabbccddeeff);
    for (int t = 0; t < 10; t++) begin
      logic [127:0] p;
      key = {$urandom, $urandom, $urandom, $urandom};
      keys = expand_key(key);
      p = {$urandom, $urandom, $urandom, $urandom};
      run(0, p, encrypt(key, p));
      run(1, encrypt(key, p), p);
    end
    // back-to-back: start again in the done clock
    begin
      logic [127:0] p0, p1;
      int gap;
      p0 = {$urandom, $urandom, $urandom, $urandom};
      p1 = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk); start = 1; dec = 0; din = p0;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (dout !== encrypt(key, p0)) begin failures++; $display("FAIL b2b first"); end
      checks++;
      if (!ready) begin failures++; $display("FAIL not ready in done clock"); end
      start = 1; din = p1;
      @(negedge clk); start = 0; gap = 1;
      while (!done) begin @(negedge clk); gap++; end
      checks += 2;
      if (dout !== encrypt(key, p1)) begin failures++; $display("FAIL b2b second"); end
      if (gap != 11) begin failures++; $display("FAIL b2b spacing %0d", gap); end
    end
    // fault injection in every round and both stages
    for (int r = 1; r <= 10; r++) begin
      for (int s = 0; s < 2; s++) begin
        logic [127:0] p;
        int n_before;
        if (s == 1 && r == 10) continue;
        p = {$urandom, $urandom, $urandom, $urandom};
        fault_en = 1; fault_stage = fault_stage_e'(s); fault_round = 4'(r);
        fault_byte = 4'($urandom); fault_bit = 3'($urandom);
        n_before = n_corr;
        run(0, p, encrypt(key, p));
        @(negedge clk);
        checks++;
        if (n_corr != n_before + 1) begin
          failures++; $display("FAIL round %0d stage %0d corrections %0d", r, s, n_corr - n_before);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
