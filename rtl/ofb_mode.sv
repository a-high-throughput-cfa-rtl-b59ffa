// ofb_mode: request front end of the engine, adding output feedback (OFB)
// mode to single-block encryption and decryption.
//
// In OFB the cipher only ever encrypts: O_1 = E_K(IV), O_i = E_K(O_{i-1}),
// and each data block is XORed with O_i. The same operation encrypts and
// decrypts, and a bit error in a transmitted block corrupts only that bit
// of the recovered block, which suits noisy satellite links.
// Requests (req_valid/req_ready handshake, op from aes_pkg::op_e):
//   OP_ENC / OP_DEC : the block goes through the core; the response is the
//                     cipher or plain text.
//   OP_OFB_IV       : loads the feedback register in one clock; no response.
//   OP_OFB_DATA     : encrypts the feedback register, stores the result back
//                     as the next feedback value and responds with
//                     data ^ keystream.
// One request is in flight at a time, and the next may be accepted in the
// clock the current one completes; resp_valid pulses for one clock with
// resp_data. Adds no latency to the core's: a response comes in the clock
// the core signals done.
// OFB itself is the standard mode; the request codes, the handshake and the
// single-block pass-through are this implementation's choices.
module ofb_mode
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   req_valid,
  output logic   req_ready,
  input  op_e    req_op,
  input  block_t req_data,
  output logic   resp_valid,
  output block_t resp_data,
  // core side
  output logic   core_start,
  output logic   core_dec,
  output block_t core_din,
  input  logic   core_ready,
  input  logic   core_done,
  input  block_t core_dout
);
  block_t feedback, pending, fb_now;
  logic   busy, is_ofb;

  // A new request may be taken in the clock the previous one completes; the
  // feedback value then comes straight from the core output.
  assign fb_now     = (busy && core_done && is_ofb) ? core_dout : feedback;
  assign req_ready  = core_ready && (!busy || core_done);
  assign core_start = req_valid && req_ready && (req_op != OP_OFB_IV);
  assign core_dec   = (req_op == OP_DEC);
  assign core_din   = (req_op == OP_OFB_DATA) ? fb_now : req_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feedback <= '0;
      pending  <= '0;
      busy     <= 1'b0;
      is_ofb   <= 1'b0;
    end else begin
      if (busy && core_done) begin
        busy <= 1'b0;
        if (is_ofb) feedback <= core_dout;
      end
      if (req_valid && req_ready) begin
        if (req_op == OP_OFB_IV) begin
          feedback <= req_data;
        end else begin
          busy    <= 1'b1;
          is_ofb  <= (req_op == OP_OFB_DATA);
          pending <= req_data;
        end
      end
    end
  end

  assign resp_valid = busy && core_done;
  assign resp_data  = is_ofb ? (pending ^ core_dout) : core_dout;
endmodule
