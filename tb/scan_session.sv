// scan_session: end-to-end test harness for secure_scan_top (instantiated by
// the top-level testbenches). It plays the tester and the circuit under test:
//  - a behavioural scan chain of CHAIN_LEN cells with a fixed capture function
//    (cell i captures x[i] ^ x[i+1 mod F] ^ (i mod 5 == 0)), clocked by the
//    top's dut_clk_en / dut_scan_en;
//  - K random patterns plus one all-zero unload pattern, each padded at its
//    start to whole 64-bit segments, encrypted segment by segment with the
//    reference PRESENT-80 and shifted in MSB first, with one capture cycle on
//    the segment boundary where each pattern is completely in the chain;
//  - the chip scan-out stream is cut into segments, decrypted with the
//    reference and compared with the expected response stream (response
//    bits, then either the next pattern's filler bits or the values captured
//    by the observation flip-flops).
// It also checks that the chain holds exactly each clear pattern at capture,
// that no scan-out segment leaves in clear, the cycle at which output becomes
// valid, and the total cycle count against 4N + (N-R)(K+1) over plain scan.
// Scan-enable pauses are inserted while the input cipher decrypts (fill), while
// the output cipher encrypts (drain) and, without observation flip-flops, in
// the middle of a pattern (with the circuit's clock stopped by the tester).
// Each mechanism is counted; one that never happened is a failure.
module scan_session #(
  parameter int unsigned CHAIN_LEN  = 150,
  parameter bit          OBS_POINTS = 1'b0,
  parameter int unsigned K          = 3
) (
  input  logic clk,
  // to and from secure_scan_top
  output logic rst_n,
  output logic scan_enable,
  output present_pkg::key_t key,
  output logic chip_scan_in,
  input  logic chip_scan_out,
  input  logic so_valid,
  input  logic seg_end,
  input  logic scan_hold,
  input  logic dut_scan_en,
  input  logic dut_clk_en,
  input  logic circuit_scan_in,
  output logic circuit_scan_out,
  output logic [((CHAIN_LEN % present_pkg::N) == 0 ? 1 : present_pkg::N - CHAIN_LEN % present_pkg::N) - 1:0] obs,
  // result
  output logic done,
  output int   checks,
  output int   failures
);
  import present_pkg::*;
  import present_ref_pkg::*;

  localparam int F    = int'(CHAIN_LEN);
  localparam int NN   = int'(N);
  localparam int SEGS = (F + NN - 1) / NN;
  localparam int L    = SEGS * NN;           // shift cycles per pattern
  localparam int PAD  = L - F;               // N - R filler / observation bits
  localparam int OBSW = (PAD == 0) ? 1 : PAD;
  localparam bit USE_OBS = OBS_POINTS && PAD > 0;

  // ---------------- behavioural circuit under test: its scan chain ----------
  bit [F-1:0] chain, mask;
  bit         capture_allowed;
  int         captures = 0;

  function automatic bit [F-1:0] capture_fn(bit [F-1:0] x);
    return x ^ {x[0], x[F-1:1]} ^ mask;
  endfunction

  assign circuit_scan_out = chain[F-1];

  always_ff @(posedge clk) begin
    if (dut_clk_en) begin
      if (dut_scan_en) chain <= {chain[F-2:0], circuit_scan_in};
      else if (capture_allowed) begin
        chain <= capture_fn(chain);
        captures <= captures + 1;
      end
    end
  end

  // ---------------- tester ----------------------------------------------------
  bit [F-1:0]    pat   [K+2];
  bit [OBSW-1:0] obsv  [K+2];
  bit [OBSW-1:0] dummy [K+2];
  bit            cin   [$];
  bit            cout  [$];
  int e = 0, cycles = 0, hold_cycles = 0;
  int holds_fill = 0, holds_drain = 0, holds_mid = 0, swaps = 0, clear_segments = 0;
  int valid_at = -1;
  int extra_checked = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [F=%0d obs=%0b] %s", F, OBS_POINTS, what);
    end
  endtask

  // one clock: drive at the falling edge, sample before the rising edge
  task automatic tick(input bit se, input bit allow_cap);
    scan_enable     = se;
    capture_allowed = allow_cap;
    chip_scan_in    = (se && e < cin.size()) ? cin[e] : 1'($urandom);
    #1;
    if (se) begin
      if (so_valid && valid_at < 0) valid_at = e;
      if (seg_end) swaps++;
      if (e >= 4 * NN) cout.push_back(chip_scan_out);
    end else begin
      check(scan_hold, "scan_hold low during a pause");
    end
    @(negedge clk);
    cycles++;
    if (se) e++;
  endtask

  task automatic pause(input int n, input bit allow_cap);
    repeat (n) begin
      tick(1'b0, allow_cap);
      hold_cycles++;
    end
  endtask

  initial begin
    int total_e;
    int next_cap = 1;
    longint t_plain, t_expect;
    done = 1'b0; checks = 0; failures = 0;
    rst_n = 1'b0; scan_enable = 1'b0; chip_scan_in = 1'b0; capture_allowed = 1'b0;
    key = {$urandom, $urandom, 16'($urandom)};
    obs = '0;
    for (int i = 0; i < F; i++) mask[i] = (i % 5 == 0);
    // patterns 1..K random, K+1 all zero (unloads the last response)
    for (int k = 1; k <= int'(K) + 1; k++) begin
      for (int i = 0; i < F; i++) pat[k][i] = (k <= int'(K)) ? 1'($urandom) : 1'b0;
      for (int i = 0; i < OBSW; i++) begin
        obsv[k][i]  = 1'($urandom);
        dummy[k][i] = 1'($urandom);
      end
    end
    // padded bit sequence b_0..b_{L-1}: filler first, then chain[F-1]..chain[0]
    for (int k = 1; k <= int'(K) + 1; k++) begin
      automatic bit b [];
      b = new[L];
      for (int i = 0; i < PAD; i++) b[i] = dummy[k][i];
      for (int j = 0; j < F; j++) b[L-1-j] = pat[k][j];
      for (int m = 0; m < SEGS; m++) begin
        automatic blk_t blk, ct;
        for (int i = 0; i < NN; i++) blk[NN-1-i] = b[m*NN + i];
        ct = ref_encrypt(blk, key);
        for (int i = 0; i < NN; i++) cin.push_back(ct[NN-1-i]);
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    total_e = 4 * NN + (int'(K) + 1) * L;
    while (e < total_e) begin
      // pause while the input cipher decrypts the first segment
      if (e == NN + 10 && holds_fill == 0) begin
        pause(3, 1'b0);
        holds_fill++;
      end
      // pause in the middle of the second pattern (circuit clock stopped)
      if (!USE_OBS && e == 2 * NN + L + L / 2 + 5 && holds_mid == 0) begin
        pause(2, 1'b0);
        holds_mid++;
      end
      // pause while the output cipher encrypts the last response segment
      if (e == 2 * NN + (int'(K) + 1) * L + 10 && holds_drain == 0) begin
        pause(4, 1'b0);
        holds_drain++;
      end
      // capture cycle once pattern k is completely in the chain
      if (next_cap <= int'(K) && e == 2 * NN + next_cap * L) begin
        check(chain == pat[next_cap], $sformatf("chain holds clear pattern %0d", next_cap));
        obs = obsv[next_cap];
        tick(1'b0, 1'b1);
        next_cap++;
      end
      tick(1'b1, 1'b0);
    end

    // decrypt and compare the response stream (loads 2..K+1 carry responses 1..K)
    for (int k = 2; k <= int'(K) + 1; k++) begin
      automatic bit [F-1:0] resp = capture_fn(pat[k-1]);
      for (int m = 0; m < SEGS; m++) begin
        automatic blk_t ct, pt, exp_blk;
        for (int i = 0; i < NN; i++) begin
          automatic int q = (k - 1) * L + m * NN + i;    // index in the scan-out stream
          automatic int w = m * NN + i;                  // position within the load
          ct[NN-1-i] = cout[q];
          if (USE_OBS) exp_blk[NN-1-i] = (w < PAD) ? obsv[k-1][PAD-1-w] : resp[F-1-(w-PAD)];
          else         exp_blk[NN-1-i] = (w < F) ? resp[F-1-w] : dummy[k][w-F];
        end
        pt = ref_decrypt(ct, key);
        check(pt == exp_blk, $sformatf("response %0d segment %0d: got %h expected %h",
                                       k - 1, m, pt, exp_blk));
        if (ct == exp_blk) clear_segments++;
        if (m == 0) extra_checked += PAD;
      end
    end
    check(clear_segments == 0, "a response segment left the chip in clear");
    check(valid_at == 4 * NN, $sformatf("so_valid rose at cycle %0d", valid_at));

    // cycle budget: plain scan T = (F+1)K + F, encrypted 4N + (N-R)(K+1) more
    t_plain  = longint'(F + 1) * K + F;
    t_expect = t_plain + 4 * NN + ((F % NN) == 0 ? 0 : longint'(NN - F % NN) * (K + 1));
    check(longint'(cycles - hold_cycles) == t_expect,
          $sformatf("test time %0d cycles, expected %0d", cycles - hold_cycles, t_expect));

    // mechanisms
    check(captures == int'(K), $sformatf("captures %0d", captures));
    check(holds_fill > 0 && holds_drain > 0, "pauses during decryption and encryption");
    check(USE_OBS || holds_mid > 0, "pause in the middle of a pattern");
    check(swaps >= 2 * SEGS, "R1/R2 swaps");
    check(PAD == 0 || extra_checked > 0, "filler or observation bits checked");
    $display("[F=%0d obs=%0b K=%0d] cycles=%0d (plain scan %0d, overhead %0d) pauses=%0d captures=%0d swaps=%0d filler/obs bits per pattern=%0d",
             F, OBS_POINTS, K, cycles - hold_cycles, t_plain, longint'(cycles - hold_cycles) - t_plain,
             hold_cycles, captures, swaps, PAD);
    done = 1'b1;
  end
endmodule
