// secure_scan_top: scan-chain encryption around the scan chain of a secure
// circuit. Test data never enters or leaves the chip in clear: the tester
// encrypts every N = 64-bit segment of a scan pattern with PRESENT under the
// device's current key, the Input Scan Cipher decrypts it on the fly before it
// enters the circuit's scan chain, and the Output Scan Cipher encrypts the
// chain's response before it leaves on chip scan-out. Without the key an
// attacker can neither set nor read the chain, while a trusted user with the
// key keeps full test, diagnosis and debug access.
//
// Structure: scan_ctrl (phase counter, R1/R2 select, round step, fill states),
// present_key_sched (one key expansion for both ciphers), scan_cipher with
// DECRYPT=1 (input) and DECRYPT=0 (output), and optionally obs_points, the
// N - (CHAIN_LEN mod N) observation flip-flops that complete the last
// segment of every pattern.
//
// Timing, counted in scan-enabled clock cycles from reset: a chip scan-in bit
// reaches circuit_scan_in 2*N cycles later as plaintext; a circuit_scan_out
// bit leaves on chip_scan_out 2*N cycles later encrypted; so_valid rises after
// 4*N cycles. Every pattern must occupy a whole number of segments, padded at
// its start with N - R filler bits when R = CHAIN_LEN mod N is not zero (or,
// with OBS_POINTS, the observation flip-flops take those positions), and the
// capture cycle (scan_enable low for one clock) falls on a segment boundary.
// For K patterns this costs 4*N + (N - R)(K + 1) cycles over plain scan.
//
// The circuit under test and its key store are outside this module: the
// chain is reached through circuit_scan_in/circuit_scan_out with
// dut_scan_en/dut_clk_en as its scan enable and clock enable, and the key
// arrives on the key port. The architecture and its cycle budget follow the
// document; port names, bit order and the fill sequencing are this design's.
module secure_scan_top
  import present_pkg::*;
#(
  parameter int unsigned CHAIN_LEN  = 7873,  // flip-flops in the circuit's scan chain
  parameter bit          OBS_POINTS = 1'b1,  // add N - R observation flip-flops
  // width of the observation input (N - R, or 1 when R = 0)
  localparam int unsigned OBS_W = (CHAIN_LEN % N == 0) ? 1 : N - CHAIN_LEN % N
) (
  input  logic clk,
  input  logic rst_n,
  input  logic scan_enable,
  input  key_t key,
  input  logic chip_scan_in,
  output logic chip_scan_out,
  output logic so_valid,
  output logic seg_end,      // last cycle of a segment phase (capture may follow)
  output logic scan_hold,    // scan_enable low: ciphers and controller frozen
  // to and from the circuit under test
  output logic dut_scan_en,
  output logic dut_clk_en,
  output logic circuit_scan_in,
  input  logic circuit_scan_out,
  input  logic [OBS_W-1:0] obs
);

  localparam int unsigned R_BITS  = CHAIN_LEN % N;
  localparam int unsigned OBS_LEN = (R_BITS == 0) ? 0 : N - R_BITS;

  logic             sel, crypt;
  logic [RND_W-1:0] step;
  block_t           enc_rk, dec_rk;
  logic             out_cipher_si;

  scan_ctrl u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .scan_enable (scan_enable),
    .sel         (sel),
    .crypt       (crypt),
    .step        (step),
    .dut_scan_en (dut_scan_en),
    .dut_clk_en  (dut_clk_en),
    .so_valid    (so_valid),
    .hold        (scan_hold),
    .phase_end   (seg_end)
  );

  present_key_sched u_keys (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (scan_enable && crypt),
    .step   (step),
    .key    (key),
    .enc_rk (enc_rk),
    .dec_rk (dec_rk)
  );

  scan_cipher #(.DECRYPT(1'b1)) u_in_cipher (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (scan_enable),
    .sel   (sel),
    .crypt (crypt),
    .step  (step),
    .rk    (dec_rk),
    .sin   (chip_scan_in),
    .sout  (circuit_scan_in)
  );

  if (OBS_POINTS && OBS_LEN > 0) begin : g_obs
    obs_points #(.LEN(OBS_LEN)) u_obs (
      .clk     (clk),
      .rst_n   (rst_n),
      .clk_en  (dut_clk_en),
      .scan_en (dut_scan_en),
      .obs     (obs),
      .si      (circuit_scan_out),
      .so      (out_cipher_si)
    );
  end else begin : g_no_obs
    assign out_cipher_si = circuit_scan_out;
  end

  scan_cipher #(.DECRYPT(1'b0)) u_out_cipher (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (scan_enable),
    .sel   (sel),
    .crypt (crypt),
    .step  (step),
    .rk    (enc_rk),
    .sin   (out_cipher_si),
    .sout  (chip_scan_out)
  );

endmodule
