// scan_ctrl: controller of the scan-chain encryption. It is shared by both
// scan ciphers (one PRESENT control unit for both) and sequences everything
// from the scan enable alone.
//
// A phase counter counts the N scan clock cycles of a segment phase. At the end
// of every phase the select bit flips, so R1 and R2 of both ciphers swap
// between shifting and ciphering. The first D cycles of a phase are the
// cipher steps (crypt, step = 0..D-1); D <= N is required.
//
// The state machine tracks the pipeline fill after reset:
//   FILL_IN0, FILL_IN1   the input cipher receives its first two segments; no
//                        plaintext exists yet, so the circuit's scan chain is
//                        held (dut_clk_en low while scanning);
//   FILL_OUT0, FILL_OUT1 the chain shifts decrypted data; the output cipher
//                        has no encrypted block to send yet;
//   STREAM               steady state, chip scan-out carries encrypted
//                        response data (so_valid).
// Each fill state lasts one phase, so the chain starts 2*N cycles and valid
// output 4*N cycles after the first scan-in bit.
//
// While scan_enable is low (a capture cycle, or a pause in the middle of a
// shift) every register here and in the ciphers is frozen and the state is
// resumed when scan_enable returns; hold reports that. The circuit's scan
// flip-flops see dut_scan_en = scan_enable; dut_clk_en gates their clock so
// that they do not shift during FILL_IN (capture cycles still reach them).
//
// The controller's role, the freeze on scan-enable low and the reset of the
// ciphers follow the document; the fill states and output strobes are this
// design's way of producing the timing of its figures.
module scan_ctrl
  import present_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             scan_enable,
  output logic             sel,
  output logic             crypt,
  output logic [RND_W-1:0] step,
  output logic             dut_scan_en,
  output logic             dut_clk_en,
  output logic             so_valid,
  output logic             hold,
  output logic             phase_end
);

  typedef enum logic [2:0] {
    FILL_IN0, FILL_IN1, FILL_OUT0, FILL_OUT1, STREAM
  } state_e;

  localparam int unsigned CNT_W = $clog2(N);

  state_e           state_q;
  logic [CNT_W-1:0] cnt_q;
  logic             sel_q;
  logic             chain_on;

  assign phase_end   = scan_enable && (cnt_q == CNT_W'(N - 1));
  assign sel         = sel_q;
  assign crypt       = (cnt_q < CNT_W'(D));
  assign step        = cnt_q[RND_W-1:0];
  assign chain_on    = (state_q != FILL_IN0) && (state_q != FILL_IN1);
  assign dut_scan_en = scan_enable;
  assign dut_clk_en  = !scan_enable || chain_on;
  assign so_valid    = (state_q == STREAM);
  assign hold        = !scan_enable;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= FILL_IN0;
      cnt_q   <= '0;
      sel_q   <= 1'b0;
    end else if (scan_enable) begin
      cnt_q <= cnt_q + CNT_W'(1);
      if (phase_end) begin
        sel_q <= !sel_q;
        unique case (state_q)
          FILL_IN0:  state_q <= FILL_IN1;
          FILL_IN1:  state_q <= FILL_OUT0;
          FILL_OUT0: state_q <= FILL_OUT1;
          default:   state_q <= STREAM;
        endcase
      end
    end
  end

  initial begin
    assert (D <= N) else $error("cipher latency D must not exceed segment length N");
    assert (N == (1 << CNT_W)) else $error("phase counter assumes N is a power of two");
  end

endmodule
