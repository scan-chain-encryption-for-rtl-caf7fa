// tb_obs_points: checks the observation-point scan flip-flops against a
// bit-level model: shifting (si into bit 0, so from the last bit), capture of
// the observation inputs when scan enable is low, and hold while the clock
// enable is low. Uses a short length and the default length.
module tb_obs_points;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int L1 = 5;
  localparam int L2 = 63;

  logic rst_n, clk_en, scan_en, si;
  logic [L1-1:0] obs1;
  logic [L2-1:0] obs2;
  logic so1, so2;
  logic [L1-1:0] m1;
  logic [L2-1:0] m2;
  int checks = 0, failures = 0, captures = 0, shifts = 0;

  obs_points #(.LEN(L1)) u1 (.clk, .rst_n, .clk_en, .scan_en, .obs(obs1), .si, .so(so1));
  obs_points             u2 (.clk, .rst_n, .clk_en, .scan_en, .obs(obs2), .si, .so(so2));

  initial begin
    rst_n = 1'b0; clk_en = 1'b0; scan_en = 1'b0; si = 1'b0; obs1 = '0; obs2 = '0;
    m1 = '0; m2 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      clk_en  = ($urandom_range(0, 7) != 0);
      scan_en = ($urandom_range(0, 9) != 0);
      si      = 1'($urandom);
      obs1    = L1'($urandom);
      obs2    = {$urandom, $urandom};
      #1;
      checks += 2;
      if (so1 !== m1[L1-1] || so2 !== m2[L2-1]) begin
        failures++;
        $display("FAIL serial output at %0t", $time);
      end
      if (clk_en) begin
        if (scan_en) begin
          m1 = {m1[L1-2:0], si};
          m2 = {m2[L2-2:0], si};
          shifts++;
        end else begin
          m1 = obs1;
          m2 = obs2;
          captures++;
        end
      end
      @(negedge clk);
    end
    checks++;
    if (captures == 0 || shifts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
