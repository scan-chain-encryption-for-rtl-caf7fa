// tb_secure_scan_top: end-to-end test of the scan-chain encryption at reduced
// chain lengths. Three designs run in parallel, each driven by a scan_session
// (tester plus behavioural scan chain, see there for the checks):
//   s0: 150-cell chain, no observation flip-flops (R = 22: 42 filler bits per
//       pattern that travel through the chain and come back encrypted);
//   s1: 150-cell chain with 42 observation flip-flops;
//   s2: 128-cell chain, a whole number of segments (no padding);
//   s3: 1728-cell chain with 55 patterns, the size of the s35932 benchmark
//       test set (27 segments per pattern, 1485 blocks through each cipher).
module tb_secure_scan_top;
  import present_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done [4];
  int   chk [4], fail [4];

  // one top and one session per configuration
  `define SCAN_SESSION(IDX, LEN, OBS, NPAT)                                          \
    logic rst_n_``IDX, se_``IDX, si_``IDX, so_``IDX, v_``IDX, seg_``IDX, hold_``IDX;  \
    logic dse_``IDX, dce_``IDX, csi_``IDX, cso_``IDX;                                  \
    key_t key_``IDX;                                                                   \
    logic [((LEN % N) == 0 ? 1 : N - LEN % N) - 1:0] obs_``IDX;                        \
    secure_scan_top #(.CHAIN_LEN(LEN), .OBS_POINTS(OBS)) dut_``IDX (                   \
      .clk, .rst_n(rst_n_``IDX), .scan_enable(se_``IDX), .key(key_``IDX),              \
      .chip_scan_in(si_``IDX), .chip_scan_out(so_``IDX), .so_valid(v_``IDX),           \
      .seg_end(seg_``IDX), .scan_hold(hold_``IDX), .dut_scan_en(dse_``IDX),            \
      .dut_clk_en(dce_``IDX), .circuit_scan_in(csi_``IDX),                             \
      .circuit_scan_out(cso_``IDX), .obs(obs_``IDX));                                  \
    scan_session #(.CHAIN_LEN(LEN), .OBS_POINTS(OBS), .K(NPAT)) ses_``IDX (            \
      .clk, .rst_n(rst_n_``IDX), .scan_enable(se_``IDX), .key(key_``IDX),              \
      .chip_scan_in(si_``IDX), .chip_scan_out(so_``IDX), .so_valid(v_``IDX),           \
      .seg_end(seg_``IDX), .scan_hold(hold_``IDX), .dut_scan_en(dse_``IDX),            \
      .dut_clk_en(dce_``IDX), .circuit_scan_in(csi_``IDX),                             \
      .circuit_scan_out(cso_``IDX), .obs(obs_``IDX),                                   \
      .done(done[IDX]), .checks(chk[IDX]), .failures(fail[IDX]));

  `SCAN_SESSION(0, 150, 1'b0, 4)
  `SCAN_SESSION(1, 150, 1'b1, 4)
  `SCAN_SESSION(2, 128, 1'b1, 3)
  `SCAN_SESSION(3, 1728, 1'b1, 55)

  initial begin
    wait (done[0] && done[1] && done[2] && done[3]);
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3],
             fail[0] + fail[1] + fail[2] + fail[3]);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3],
             fail[0] + fail[1] + fail[2] + fail[3] + 1);
    $finish;
  end
endmodule
