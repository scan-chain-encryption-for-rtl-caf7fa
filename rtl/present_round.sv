// present_round: the "Block Cipher" of a scan cipher. It is the combinational
// step of a round-based PRESENT engine that works in place on an N-bit round
// register: the register feeds din, and dout is loaded back into the same
// register on the next clock edge, so one block takes D = 32 clock cycles.
//
// Encryption (DECRYPT = 0), step 0..30: dout = P(S(din ^ rk)), one full round;
//                           step 31:    dout = din ^ rk, the final key addition.
// Decryption (DECRYPT = 1), step 0:     dout = din ^ rk (rk = last round key);
//                           step 1..31: dout = S^-1(P^-1(din)) ^ rk.
// The round key rk for each step is supplied by present_key_sched.
//
// The scan-cipher scheme only asks for a block cipher with an N-bit round
// register and a D-cycle latency; using an iterated in-place round unit and
// this split of the 32 steps is this design's choice.
module present_round
  import present_pkg::*;
#(
  parameter bit DECRYPT = 1'b0
) (
  input  block_t           din,
  input  block_t           rk,
  input  logic [RND_W-1:0] step,
  output block_t           dout
);

  always_comb begin
    if (!DECRYPT) begin
      if (step == RND_W'(D - 1)) dout = din ^ rk;
      else                       dout = p_layer(s_layer(din ^ rk));
    end else begin
      if (step == '0) dout = din ^ rk;
      else            dout = inv_s_layer(inv_p_layer(din)) ^ rk;
    end
  end

endmodule
