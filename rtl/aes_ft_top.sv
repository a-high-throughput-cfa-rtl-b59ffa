// aes_ft_top: fault-tolerant AES-128 engine for on-board encryption.
//
// A key loaded through key_load/key is expanded once into 11 round keys
// (10 clocks, key_ready low meanwhile). Blocks are then submitted with
// in_valid/in_ready and an operation code: single-block encryption or
// decryption, or output feedback mode (load an IV, then encrypt/decrypt data
// blocks). The iterative core runs one round per clock, 11 clocks per block,
// with composite-field S-boxes; every encryption round checks the SubBytes,
// ShiftRows and MixColumns results against Hamming (12,8) check bits
// predicted from the round input and flips back a single upset bit per byte.
// Results appear on out_data with a one-clock out_valid pulse.
// fault_* inject one bit flip into a chosen round of the next block accepted,
// to exercise the correction; corr_count and uncorr_count count the rounds
// in which a correction happened and those with an uncorrectable syndrome.
// Requests are held off (in_ready low) while the key is being expanded.
// The composition (composite-field S-boxes, Hamming prediction and
// correction, OFB) follows the design; the port list, the counters and the
// fault-injection ports are this implementation's choices.
module aes_ft_top
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // key
  input  logic         key_load,
  input  block_t       key,
  output logic         key_ready,
  // blocks
  input  logic         in_valid,
  output logic         in_ready,
  input  op_e          in_op,
  input  block_t       in_data,
  output logic         out_valid,
  output block_t       out_data,
  // SEU injection
  input  logic         fault_en,
  input  fault_stage_e fault_stage,
  input  logic [3:0]   fault_round,
  input  logic [3:0]   fault_byte,
  input  logic [2:0]   fault_bit,
  // fault status
  output logic [15:0]  corr_count,
  output logic [15:0]  uncorr_count
);
  logic       core_start, core_dec, core_ready, core_done, ofb_ready;
  block_t     core_din, core_dout, rk;
  logic [3:0] rk_idx;
  logic       corr_sb, corr_mc, uncorr;

  key_expansion u_key (
    .clk(clk), .rst_n(rst_n), .load(key_load), .key(key), .ready(key_ready),
    .rd_idx(rk_idx), .rd_key(rk));

  ofb_mode u_ofb (
    .clk(clk), .rst_n(rst_n),
    .req_valid(in_valid && key_ready && !key_load), .req_ready(ofb_ready),
    .req_op(in_op), .req_data(in_data),
    .resp_valid(out_valid), .resp_data(out_data),
    .core_start(core_start), .core_dec(core_dec), .core_din(core_din),
    .core_ready(core_ready), .core_done(core_done), .core_dout(core_dout));

  assign in_ready = ofb_ready && key_ready && !key_load;

  aes_core u_core (
    .clk(clk), .rst_n(rst_n), .start(core_start), .dec(core_dec), .din(core_din),
    .ready(core_ready), .done(core_done), .dout(core_dout),
    .rk_idx(rk_idx), .rk(rk),
    .fault_en(fault_en), .fault_stage(fault_stage), .fault_round(fault_round),
    .fault_byte(fault_byte), .fault_bit(fault_bit),
    .corr_sb(corr_sb), .corr_mc(corr_mc), .uncorr(uncorr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      corr_count   <= '0;
      uncorr_count <= '0;
    end else begin
      if (corr_sb || corr_mc) corr_count   <= corr_count + 16'd1;
      if (uncorr)             uncorr_count <= uncorr_count + 16'd1;
    end
  end

  // A key load while a block is being processed would change round keys
  // under it.
  // The core is idle (ready) throughout reset, so no disable is needed.
  a_key_idle: assert property (@(posedge clk) key_load |-> core_ready);
endmodule
