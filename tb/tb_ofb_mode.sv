// tb_ofb_mode: OFB front end with a behavioural block-cipher model (the
// reference AES-128 with an 11-clock latency) in place of the core.
// Checks the NIST SP 800-38A OFB-AES128 vectors, decryption by the same
// operation after reloading the IV, pass-through of single-block ENC/DEC
// requests, and that a new request is accepted in the clock a block
// completes.
module tb_ofb_mode;
  import aes_ref_pkg::*;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, resp_valid;
  op_e req_op = OP_ENC;
  logic [127:0] req_data = 0, resp_data;
  logic core_start, core_dec, core_ready, core_done;
  logic [127:0] core_din, core_dout;
  logic [127:0] key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  int checks = 0, failures = 0;

  ofb_mode dut (.clk(clk), .rst_n(rst_n), .req_valid(req_valid), .req_ready(req_ready),
                .req_op(req_op), .req_data(req_data), .resp_valid(resp_valid),
                .resp_data(resp_data), .core_start(core_start), .core_dec(core_dec),
                .core_din(core_din), .core_ready(core_ready), .core_done(core_done),
                .core_dout(core_dout));

  // behavioural cipher: 11 clocks from start to done
  int cnt = 0;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= 0; core_done <= 0; core_dout <= '0;
    end else begin
      core_done <= 0;
      if (cnt == 0 && core_start) begin
        cnt <= 10;
        core_dout <= core_dec ? decrypt(key, core_din) : encrypt(key, core_din);
      end else if (cnt > 0) begin
        cnt <= cnt - 1;
        if (cnt == 1) core_done <= 1;
      end
    end
  end
  assign core_ready = (cnt == 0);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] resp_q [$];
  always @(posedge clk) if (rst_n && resp_valid) resp_q.push_back(resp_data);

  task automatic send(op_e op, logic [127:0] d);
    @(negedge clk);
    req_valid = 1; req_op = op; req_data = d;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic expect_resp(logic [127:0] e, string what);
    while (resp_q.size() == 0) @(negedge clk);
    checks++;
    begin
      logic [127:0] got = resp_q.pop_front();
      if (got !== e) begin failures++; $display("FAIL %s got %h exp %h", what, got, e); end
    end
  endtask

  localparam logic [127:0] IV = 128'h000102030405060708090a0b0c0d0e0f;
  logic [127:0] pt [4] = '{128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
                          128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
  logic [127:0] ct [4] = '{128'h3b3fd92eb72dad20333449f8e83cfb4a, 128'h7789508d16918f03f53c52dac54ed825,
                          128'h9740051e9c5fecf64344f7a82260edcc, 128'h304c6528f659c77866a510d9c1d6ae5e};

  initial begin
    int t0, t1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    send(OP_OFB_IV, IV);
    // four data blocks back to back: the request is held valid, so each is
    // taken in the completion clock of the previous one
    @(negedge clk);
    t0 = $time;
    for (int i = 0; i < 4; i++) begin
      req_valid = 1; req_op = OP_OFB_DATA; req_data = pt[i];
      while (!req_ready) @(negedge clk);
      @(negedge clk);
    end
    req_valid = 0;
    for (int i = 0; i < 4; i++) expect_resp(ct[i], "ofb encrypt");
    t1 = $time;
    checks++;
    // 4 blocks x 11 clocks, plus the final completion clock
    if ((t1 - t0) / 10 > 46) begin failures++; $display("FAIL OFB took %0d clocks", (t1 - t0) / 10); end
    // decryption: same operation on the cipher text
    send(OP_OFB_IV, IV);
    for (int i = 0; i < 4; i++) begin send(OP_OFB_DATA, ct[i]); expect_resp(pt[i], "ofb decrypt"); end
    // single blocks
    send(OP_ENC, pt[0]); expect_resp(encrypt(key, pt[0]), "enc");
    send(OP_DEC, ct[1]); expect_resp(decrypt(key, ct[1]), "dec");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
