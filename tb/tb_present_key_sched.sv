// tb_present_key_sched: steps the shared key expansion the way the controller
// does (32 cipher steps, then idle cycles, with random pauses of the enable)
// and checks every step's encryption round key (K1..K32) and, from the second
// block after reset or a key change on, every decryption round key (K32..K1)
// against the reference key schedule.
module tb_present_key_sched;
  import present_pkg::*;
  import present_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             rst_n, en;
  logic [RND_W-1:0] step;
  key_t             key;
  block_t           enc_rk, dec_rk;
  int checks = 0, failures = 0;

  present_key_sched dut (.clk, .rst_n, .en, .step, .key, .enc_rk, .dec_rk);

  task automatic run_block(input bit check_dec);
    blk_t rk [33];
    ref_round_keys(key, rk);
    for (int s = 0; s < 32; s++) begin
      // random pause: enable low, state must hold
      if ($urandom_range(0, 7) == 0) begin
        en = 1'b0;
        repeat ($urandom_range(1, 3)) @(negedge clk);
      end
      en = 1'b1;
      step = 5'(s);
      #1;
      checks++;
      if (enc_rk !== rk[s + 1]) begin
        failures++;
        $display("FAIL enc step %0d: %h vs %h", s, enc_rk, rk[s + 1]);
      end
      if (check_dec) begin
        checks++;
        if (dec_rk !== rk[32 - s]) begin
          failures++;
          $display("FAIL dec step %0d: %h vs %h", s, dec_rk, rk[32 - s]);
        end
      end
      @(negedge clk);
    end
    en = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0; step = '0;
    key = {$urandom, $urandom, 16'($urandom)};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 20; k++) begin
      if (k % 5 == 0) key = {$urandom, $urandom, 16'($urandom)};
      run_block(1'b0);              // first block with a new key: decryption not valid yet
      for (int b = 0; b < 3; b++) run_block(1'b1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
