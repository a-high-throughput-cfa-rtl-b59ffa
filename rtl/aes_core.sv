// aes_core: iterative AES-128 cipher and inverse cipher, one round per clock.
//
// The 128-bit input block is copied into the state register together with
// the first AddRoundKey (round key 0 when encrypting, 10 when decrypting).
// Rounds 1..10 then run one per clock through aes_round; the last skips
// MixColumns. The round key comes from the key_expansion array through
// rk_idx/rk (index r when encrypting, 10-r when decrypting).
// Interface: start is taken when ready is high; din and dec are sampled
// then. done pulses for one clock with the result on dout (held until the
// next start). Latency: start at edge t, done and dout valid after edge
// t+10, i.e. 11 clocks per block, and a new start is accepted in the done
// cycle.
// Fault injection (models a single event upset): if fault_en is high at
// start, the bit fault_bit of state byte fault_byte is flipped at the output
// of SubBytes (fault_stage = FS_SUBBYTES) or MixColumns (FS_MIXCOL) in round
// fault_round of that block. corr_* and uncorr report, for one clock per
// round, what the round's Hamming checks did.
// The round sequence is standard AES; the one-round-per-clock iteration,
// the reset and the fault-injection decode are this implementation's
// choices.
module aes_core
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         dec,
  input  block_t       din,
  output logic         ready,
  output logic         done,
  output block_t       dout,
  output logic [3:0]   rk_idx,
  input  block_t       rk,
  input  logic         fault_en,
  input  fault_stage_e fault_stage,
  input  logic [3:0]   fault_round,
  input  logic [3:0]   fault_byte,
  input  logic [2:0]   fault_bit,
  output logic         corr_sb,
  output logic         corr_mc,
  output logic         uncorr
);
  block_t       state, round_out, fmask, fault_sb, fault_mc;
  logic [3:0]   round;
  logic         busy, dec_q, last;
  logic         f_en;
  fault_stage_e f_stage;
  logic [3:0]   f_round, f_byte;
  logic [2:0]   f_bit;
  logic         c_sb, c_mc, u_any;

  assign ready = !busy;
  assign last  = (round == 4'(NR));

  always_comb begin
    if (!busy) rk_idx = dec ? 4'(NR) : 4'd0;
    else       rk_idx = dec_q ? 4'(NR) - round : round;
  end

  always_comb begin
    fmask = '0;
    fmask[7'd120 - 7'({f_byte, 3'b000}) + 7'(f_bit)] = 1'b1;
    fault_sb = (busy && f_en && round == f_round && f_stage == FS_SUBBYTES) ? fmask : '0;
    fault_mc = (busy && f_en && round == f_round && f_stage == FS_MIXCOL)   ? fmask : '0;
  end

  aes_round u_round (
    .state_in(state), .round_key(rk), .dec(dec_q), .last(last),
    .fault_sb(fault_sb), .fault_mc(fault_mc), .state_out(round_out),
    .corr_sb(c_sb), .corr_mc(c_mc), .uncorrectable(u_any));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= '0;
      round   <= 4'd1;
      busy    <= 1'b0;
      dec_q   <= 1'b0;
      done    <= 1'b0;
      f_en    <= 1'b0;
      f_stage <= FS_SUBBYTES;
      f_round <= '0;
      f_byte  <= '0;
      f_bit   <= '0;
      corr_sb <= 1'b0;
      corr_mc <= 1'b0;
      uncorr  <= 1'b0;
    end else begin
      done    <= 1'b0;
      corr_sb <= 1'b0;
      corr_mc <= 1'b0;
      uncorr  <= 1'b0;
      if (!busy) begin
        if (start) begin
          state   <= din ^ rk;
          dec_q   <= dec;
          round   <= 4'd1;
          busy    <= 1'b1;
          f_en    <= fault_en;
          f_stage <= fault_stage;
          f_round <= fault_round;
          f_byte  <= fault_byte;
          f_bit   <= fault_bit;
        end
      end else begin
        state   <= round_out;
        round   <= round + 4'd1;
        corr_sb <= c_sb;
        corr_mc <= c_mc;
        uncorr  <= u_any;
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign dout = state;
endmodule
