// key_expansion: AES-128 key schedule, producing and holding the 44-word
// expanded key w[0..43] as 11 round keys.
//
// The cipher key is copied into w[0..3]. Each following group of four words
// is made in one clock: w[i] = w[i-4] ^ g(w[i-1]) for i a multiple of 4, where
// g = RotWord (one-byte left rotation), SubWord (four composite-field
// S-boxes) and an XOR of Rcon[j] = {RC[j], 0, 0, 0} with RC[1] = 01,
// RC[j] = 02*RC[j-1]; the other three words are w[i] = w[i-4] ^ w[i-1].
// Interface: a load pulse with key starts the expansion; ready goes low for
// NR = 10 clocks and returns high when all round keys are stored. rd_idx
// selects the round key presented on rd_key (asynchronous read of the
// register array). Reset clears the array and leaves ready high.
// The schedule is the standard AES-128 one; producing one round key per
// clock and holding all eleven in registers is this implementation's choice.
module key_expansion
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  block_t     key,
  output logic       ready,
  input  logic [3:0] rd_idx,
  output block_t     rd_key
);
  block_t      rk_mem [NR+1];
  logic [3:0]  idx;        // round key being produced
  byte_t       rc;
  logic        busy;
  logic [31:0] w0, w1, w2, w3, rot, sub, n0, n1, n2, n3;
  block_t      prev;

  assign prev = rk_mem[idx - 4'd1];
  assign {w0, w1, w2, w3} = prev;
  assign rot = {w3[23:0], w3[31:24]};

  for (genvar b = 0; b < 4; b++) begin : g_subword
    cfa_sbox u_sbox (.din(rot[8*b +: 8]), .dec(1'b0), .dout(sub[8*b +: 8]));
  end

  always_comb begin
    n0 = w0 ^ sub ^ {rc, 24'h0};
    n1 = w1 ^ n0;
    n2 = w2 ^ n1;
    n3 = w3 ^ n2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      idx  <= 4'd1;
      rc   <= 8'h01;
      for (int i = 0; i <= NR; i++) rk_mem[i] <= '0;
    end else if (load) begin
      rk_mem[0] <= key;
      busy      <= 1'b1;
      idx       <= 4'd1;
      rc        <= 8'h01;
    end else if (busy) begin
      rk_mem[idx] <= {n0, n1, n2, n3};
      rc          <= xtime(rc);
      idx         <= idx + 4'd1;
      if (idx == 4'(NR)) busy <= 1'b0;
    end
  end

  assign ready  = !busy;
  assign rd_key = (rd_idx <= 4'(NR)) ? rk_mem[rd_idx] : '0;
endmodule
