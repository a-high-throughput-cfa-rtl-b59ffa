// tb_key_expansion: FIPS-197 key 2b7e1516 28aed2a6 abf71588 09cf4f3c (last
// round key d014f9a8 c9ee2589 e13f0cc8 b6630ca6) and random keys against the
// reference schedule; ready must stay low for exactly 10 clocks.
module tb_key_expansion;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, ready;
  logic [127:0] key, rd_key;
  logic [3:0] rd_idx = 0;
  int checks = 0, failures = 0;

  key_expansion dut (.clk(clk), .rst_n(rst_n), .load(load), .key(key), .ready(ready),
                     .rd_idx(rd_idx), .rd_key(rd_key));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] k);
    rk_t exp_rk = expand_key(k);
    int cycles = 0;
    @(negedge clk); key = k; load = 1;
    @(negedge clk); load = 0;
    while (!ready) begin @(negedge clk); cycles++; end
    checks++;
    if (cycles != 10) begin failures++; $display("FAIL busy for %0d clocks", cycles); end
    for (int r = 0; r <= 10; r++) begin
      rd_idx = 4'(r); #1;
      checks++;
      if (rd_key !== exp_rk[r]) begin
        failures++; $display("FAIL key %h round %0d got %h exp %h", k, r, rd_key, exp_rk[r]);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (!ready) begin failures++; $display("FAIL not ready after reset"); end
    run(128'h2b7e151628aed2a6abf7158809cf4f3c);
    rd_idx = 10; #1;
    checks++;
    if (rd_key !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin
      failures++; $display("FAIL FIPS round key 10 %h", rd_key);
    end
    for (int t = 0; t < 5; t++) run({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
