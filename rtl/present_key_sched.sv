// present_key_sched: key expansion shared by the input and the output scan
// cipher. Both ciphers process their block during the same D = 32 steps of a
// segment phase, driven by one step index, so one unit serves both: a forward
// key register gives the encryption round keys K1..K32 to the output cipher,
// and a backward register gives the decryption round keys K32..K1 to the
// input cipher at the same time.
//
// Forward: at step 0 the key state is the master key itself (combinational
// bypass), afterwards the register steps forward once per clock. After the
// last step (step D-1) the forward register holds the state of K32; it is
// copied into the backward register, which then walks backwards with the
// inverse update during the next block. The backward register therefore holds
// the right value from the second block after reset on; the first block after
// reset is only ever applied to the reset contents of the cipher registers,
// which are discarded by the pipeline fill (see scan_ctrl).
//
// Interface: en advances the state (scan enable, all registers freeze while it
// is low), step is the step index 0..D-1 from the controller, key is the
// master key from the device's key management; it must be stable during a
// scan session. enc_rk/dec_rk are the round keys for the current step.
//
// Sharing the key expansion follows the document; the forward/backward split
// and the copy of the last state are this design's choices.
module present_key_sched
  import present_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [RND_W-1:0] step,
  input  key_t             key,
  output block_t           enc_rk,
  output block_t           dec_rk
);

  key_t fwd_q, bwd_q;
  key_t fwd_cur;

  assign fwd_cur = (step == '0) ? key : fwd_q;
  assign enc_rk  = fwd_cur[KEY_W-1 -: N];   // round key: top 64 bits
  assign dec_rk  = bwd_q[KEY_W-1 -: N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwd_q <= '0;
      bwd_q <= '0;
    end else if (en) begin
      if (step == RND_W'(D - 1)) begin
        bwd_q <= fwd_cur;                      // key state of K32
        fwd_q <= key;
      end else begin
        fwd_q <= key_update(fwd_cur, step + RND_W'(1));
        bwd_q <= key_update_inv(bwd_q, RND_W'(D - 1) - step);
      end
    end
  end

endmodule
