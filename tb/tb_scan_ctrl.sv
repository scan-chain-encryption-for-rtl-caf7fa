// tb_scan_ctrl: drives the controller with a random scan-enable pattern and
// checks every cycle against a count of scan-enabled cycles e: phase counter
// e mod N, R1/R2 select (e / N) mod 2, cipher steps in the first D cycles,
// chain clock held for the first 2*N cycles, output valid after 4*N cycles,
// and a complete freeze while scan_enable is low. Also checks that reset
// returns it to the start of the fill.
module tb_scan_ctrl;
  import present_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             rst_n, scan_enable;
  logic             sel, crypt, dut_scan_en, dut_clk_en, so_valid, hold, phase_end;
  logic [RND_W-1:0] step;
  int checks = 0, failures = 0, holds = 0;

  scan_ctrl dut (.clk, .rst_n, .scan_enable, .sel, .crypt, .step, .dut_scan_en,
                 .dut_clk_en, .so_valid, .hold, .phase_end);

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic run(input int cycles);
    int e = 0;
    for (int t = 0; t < cycles; t++) begin
      int cnt;
      scan_enable = ($urandom_range(0, 9) != 0);
      if (!scan_enable) holds++;
      #1;
      cnt = e % int'(N);
      expect_bit("sel", sel, 1'((e / int'(N)) % 2));
      expect_bit("crypt", crypt, cnt < int'(D));
      checks++;
      if (step !== 5'(cnt)) begin
        failures++;
        $display("FAIL step %0d expected %0d", step, cnt);
      end
      expect_bit("phase_end", phase_end, scan_enable && cnt == int'(N) - 1);
      expect_bit("dut_scan_en", dut_scan_en, scan_enable);
      expect_bit("dut_clk_en", dut_clk_en, !scan_enable || e >= 2 * int'(N));
      expect_bit("so_valid", so_valid, e >= 4 * int'(N));
      expect_bit("hold", hold, !scan_enable);
      if (scan_enable) e++;
      @(negedge clk);
    end
  endtask

  initial begin
    rst_n = 1'b0; scan_enable = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(12 * int'(N));
    // reset in the middle of a session restarts the fill
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    run(7 * int'(N));
    checks++;
    if (holds == 0) begin
      failures++;
      $display("FAIL no hold exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
