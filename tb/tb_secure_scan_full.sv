// tb_secure_scan_full: the complete design at its default size, a 7873-cell
// scan chain (the pipelined AES core of the evaluation: 123 segments of 64
// bits plus one bit) with its 63 observation flip-flops, taken through a
// scan session of the evaluation's full test set, K = 1148 patterns plus the
// unload pattern, about 9.1 million clock cycles. See scan_session for
// the checks.
module tb_secure_scan_full;
  import present_pkg::*;

  localparam int unsigned CHAIN_LEN = 7873;
  localparam int unsigned OBS_W = (CHAIN_LEN % N == 0) ? 1 : N - CHAIN_LEN % N;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, scan_enable, chip_scan_in, chip_scan_out, so_valid, seg_end, scan_hold;
  logic dut_scan_en, dut_clk_en, circuit_scan_in, circuit_scan_out;
  logic [OBS_W-1:0] obs;
  key_t key;
  logic done;
  int   checks, failures;

  secure_scan_top dut (
    .clk, .rst_n, .scan_enable, .key, .chip_scan_in, .chip_scan_out, .so_valid,
    .seg_end, .scan_hold, .dut_scan_en, .dut_clk_en, .circuit_scan_in,
    .circuit_scan_out, .obs
  );

  scan_session #(.CHAIN_LEN(CHAIN_LEN), .OBS_POINTS(1'b1), .K(1148)) ses (
    .clk, .rst_n, .scan_enable, .key, .chip_scan_in, .chip_scan_out, .so_valid,
    .seg_end, .scan_hold, .dut_scan_en, .dut_clk_en, .circuit_scan_in,
    .circuit_scan_out, .obs, .done, .checks, .failures
  );

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
