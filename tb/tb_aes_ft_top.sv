// tb_aes_ft_top: end-to-end test of the whole engine at its default
// configuration. It loads a key (requests must stall during the 10-clock
// expansion), encrypts and decrypts single blocks (FIPS-197 vector and
// random blocks), runs the NIST SP 800-38A OFB-AES128 vectors back to back,
// decrypts them in OFB mode, reloads a second key, and injects single-bit
// upsets after SubBytes and MixColumns in every round, including the last,
// during both single-block and OFB encryption. Every result is compared with
// the reference model, the 11-clock block time is checked, and each
// mechanism (key stall, ENC, DEC, IV load, OFB data, back-to-back accept,
// SubBytes correction, MixColumns correction, last-round correction, key
// reload) is counted and must occur at least once.
module tb_aes_ft_top;
  import aes_ref_pkg::*;
  import aes_pkg::*;
  logic clk = 0, rst_n = 0;
  logic key_load = 0, key_ready;
  logic [127:0] key = 0, in_data = 0, out_data;
  logic in_valid = 0, in_ready, out_valid;
  op_e in_op = OP_ENC;
  logic fault_en = 0;
  fault_stage_e fault_stage = FS_SUBBYTES;
  logic [3:0] fault_round = 0, fault_byte = 0;
  logic [2:0] fault_bit = 0;
  logic [15:0] corr_count, uncorr_count;
  int checks = 0, failures = 0;

  aes_ft_top dut (.clk(clk), .rst_n(rst_n), .key_load(key_load), .key(key),
                  .key_ready(key_ready), .in_valid(in_valid), .in_ready(in_ready),
                  .in_op(in_op), .in_data(in_data), .out_valid(out_valid), .out_data(out_data),
                  .fault_en(fault_en), .fault_stage(fault_stage), .fault_round(fault_round),
                  .fault_byte(fault_byte), .fault_bit(fault_bit),
                  .corr_count(corr_count), .uncorr_count(uncorr_count));

  always #5 clk = ~clk;

  typedef enum int {M_KEY_STALL, M_ENC, M_DEC, M_IV, M_OFB, M_B2B, M_CORR_SB, M_CORR_MC,
                    M_CORR_LAST, M_KEY_RELOAD, M_NUM} mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"key stall", "encrypt", "decrypt", "IV load", "OFB data",
                               "back-to-back", "SubBytes correction", "MixColumns correction",
                               "last-round correction", "key reload"};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] resp_q [$];
  longint resp_t [$];
  always @(posedge clk) if (rst_n && out_valid) begin resp_q.push_back(out_data); resp_t.push_back($time / 10); end

  // stall counting: a request held while the key is expanding
  always @(posedge clk) if (in_valid && !in_ready && !key_ready) mech[M_KEY_STALL]++;
  // acceptance in the same clock a result leaves
  always @(posedge clk) if (in_valid && in_ready && out_valid) mech[M_B2B]++;

  logic [127:0] cur_key;

  task automatic load_key(logic [127:0] k);
    @(negedge clk);
    key = k; key_load = 1;
    @(negedge clk);
    key_load = 0;
    cur_key = k;
  endtask

  task automatic send(op_e op, logic [127:0] d);
    req_valid_set(op, d);
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 0;
    case (op)
      OP_ENC:    mech[M_ENC]++;
      OP_DEC:    mech[M_DEC]++;
      OP_OFB_IV: mech[M_IV]++;
      default:   mech[M_OFB]++;
    endcase
  endtask

  task automatic req_valid_set(op_e op, logic [127:0] d);
    in_valid = 1; in_op = op; in_data = d;
  endtask

  task automatic expect_resp(logic [127:0] e, string what);
    while (resp_q.size() == 0) @(negedge clk);
    checks++;
    begin
      logic [127:0] got = resp_q.pop_front();
      void'(resp_t.pop_front());
      if (got !== e) begin failures++; $display("FAIL %s got %h exp %h", what, got, e); end
    end
  endtask

  localparam logic [127:0] K1 = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam logic [127:0] IV = 128'h000102030405060708090a0b0c0d0e0f;
  logic [127:0] pt [4] = '{128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
                          128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
  logic [127:0] ct [4] = '{128'h3b3fd92eb72dad20333449f8e83cfb4a, 128'h7789508d16918f03f53c52dac54ed825,
                          128'h9740051e9c5fecf64344f7a82260edcc, 128'h304c6528f659c77866a510d9c1d6ae5e};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;

    // key load with a request already waiting: it must stall until ready
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    begin
      longint t_acc;
      req_valid_set(OP_ENC, 128'h00112233445566778899aabbccddeeff);
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      t_acc = $time / 10;
      @(negedge clk); in_valid = 0; mech[M_ENC]++;
      while (resp_q.size() == 0) @(negedge clk);
      checks += 2;
      if (resp_t[0] - t_acc != 11) begin failures++; $display("FAIL block latency %0d", resp_t[0] - t_acc); end
      if (resp_q[0] !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin failures++; $display("FAIL FIPS vector"); end
      void'(resp_q.pop_front()); void'(resp_t.pop_front());
    end
    send(OP_DEC, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    expect_resp(128'h00112233445566778899aabbccddeeff, "FIPS decrypt");

    // reload key, OFB vectors back to back
    load_key(K1);
    mech[M_KEY_RELOAD]++;
    send(OP_OFB_IV, IV);
    for (int i = 0; i < 4; i++) begin
      req_valid_set(OP_OFB_DATA, pt[i]);
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      mech[M_OFB]++;
    end
    in_valid = 0;
    for (int i = 0; i < 4; i++) expect_resp(ct[i], "OFB encrypt");
    checks++;
    if (resp_t.size() != 0) begin failures++; $display("FAIL extra responses"); end
    send(OP_OFB_IV, IV);
    for (int i = 0; i < 4; i++) begin send(OP_OFB_DATA, ct[i]); expect_resp(pt[i], "OFB decrypt"); end

    // random single blocks
    for (int t = 0; t < 6; t++) begin
      automatic logic [127:0] p = {$urandom, $urandom, $urandom, $urandom};
      send(OP_ENC, p); expect_resp(encrypt(cur_key, p), "random encrypt");
      send(OP_DEC, encrypt(cur_key, p)); expect_resp(p, "random decrypt");
    end

    // single event upsets in every round at both stages
    for (int r = 1; r <= 10; r++) begin
      for (int s = 0; s < 2; s++) begin
        automatic logic [127:0] p = {$urandom, $urandom, $urandom, $urandom};
        automatic int n_before = int'(corr_count);
        if (s == 1 && r == 10) continue;   // the last round has no MixColumns
        fault_en = 1; fault_stage = fault_stage_e'(s); fault_round = 4'(r);
        fault_byte = 4'($urandom); fault_bit = 3'($urandom);
        send(OP_ENC, p);
        fault_en = 0;
        expect_resp(encrypt(cur_key, p), "encrypt with upset");
        @(negedge clk);
        checks++;
        if (int'(corr_count) != n_before + 1) begin
          failures++; $display("FAIL upset round %0d stage %0d corrections %0d", r, s, int'(corr_count) - n_before);
        end else begin
          if (r == 10)      mech[M_CORR_LAST]++;
          else if (s == 0)  mech[M_CORR_SB]++;
          else              mech[M_CORR_MC]++;
        end
      end
    end

    // upsets during OFB encryption
    send(OP_OFB_IV, IV);
    for (int i = 0; i < 4; i++) begin
      fault_en = 1; fault_stage = fault_stage_e'(i % 2); fault_round = 4'(2 + i);
      fault_byte = 4'($urandom); fault_bit = 3'($urandom);
      send(OP_OFB_DATA, pt[i]);
      fault_en = 0;
      expect_resp(ct[i], "OFB encrypt with upset");
    end

    checks++;
    if (uncorr_count != 0) begin failures++; $display("FAIL uncorrectable count %0d", uncorr_count); end

    for (int m = 0; m < M_NUM; m++) begin
      checks++;
      $display("mechanism %-22s : %0d", mech_name[m], mech[m]);
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", mech_name[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
