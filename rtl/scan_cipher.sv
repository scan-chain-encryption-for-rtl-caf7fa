// scan_cipher: the optimised scan cipher with two N-bit round registers R1 and
// R2 (R[0], R[1]) used in ping-pong. During one segment phase of N scan clock
// cycles one register shifts: it takes the serial input bit into its LSB and
// presents its MSB on the serial output, so the block it processed in the
// previous phase leaves MSB first while the next N-bit segment enters. The
// other register holds the segment that was shifted in during the previous
// phase and is encrypted (output cipher) or decrypted (input cipher) in place
// through the round unit during the first D = 32 cycles of the phase; it then
// idles until the phase ends and the two registers swap roles.
//
// Every serial bit therefore leaves 2*N scan cycles after it entered, as the
// matching bit of the processed block. With DECRYPT = 1 this is the Input Scan
// Cipher (decrypts data from the tester before it enters the scan chain), with
// DECRYPT = 0 the Output Scan Cipher (encrypts the scan chain response).
//
// Interface: en is the scan enable, all state is frozen while it is low; sel
// names the shifting register (0: R1 shifts and R2 is processed, 1: the
// reverse); crypt marks the D processing cycles, with step their index and rk
// the round key from the shared key expansion. Both registers are cleared by
// reset so that a reset never lets unprocessed data through.
//
// R1/R2, the two muxes and the interleaving of shift and cipher follow the
// document; bit order (MSB out first) is this design's choice.
module scan_cipher
  import present_pkg::*;
#(
  parameter bit DECRYPT = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             sel,
  input  logic             crypt,
  input  logic [RND_W-1:0] step,
  input  block_t           rk,
  input  logic             sin,
  output logic             sout
);

  block_t r_q [2];
  block_t din, dout;

  // Fig. 2 bottom mux: the register not shifting feeds the block cipher.
  assign din = sel ? r_q[0] : r_q[1];

  present_round #(.DECRYPT(DECRYPT)) u_round (
    .din  (din),
    .rk   (rk),
    .step (step),
    .dout (dout)
  );

  // Fig. 2 output mux: the shifting register drives the serial output.
  assign sout = sel ? r_q[1][N-1] : r_q[0][N-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q[0] <= '0;
      r_q[1] <= '0;
    end else if (en) begin
      for (int i = 0; i < 2; i++) begin
        if (sel == i[0])  r_q[i] <= {r_q[i][N-2:0], sin};
        else if (crypt)   r_q[i] <= dout;
      end
    end
  end

endmodule
