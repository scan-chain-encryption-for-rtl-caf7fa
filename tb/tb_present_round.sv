// tb_present_round: drives an encrypting and a decrypting round unit through
// the 32 steps of a block, feeding each step's output back as the next input
// with round keys from the reference key schedule, and compares the results
// with the published PRESENT-80 vectors and with the reference model on
// random keys and blocks.
module tb_present_round;
  import present_pkg::*;
  import present_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  block_t           e_din, e_rk, e_dout, d_din, d_rk, d_dout;
  logic [RND_W-1:0] step;
  int checks = 0, failures = 0;

  present_round #(.DECRYPT(1'b0)) u_enc (.din(e_din), .rk(e_rk), .step(step), .dout(e_dout));
  present_round #(.DECRYPT(1'b1)) u_dec (.din(d_din), .rk(d_rk), .step(step), .dout(d_dout));

  task automatic run_block(input blk_t pt, input blk_t ct_in, input k80_t key,
                           output blk_t ct, output blk_t pt_out);
    blk_t rk [33];
    ref_round_keys(key, rk);
    e_din = pt;
    d_din = ct_in;
    for (int s = 0; s < 32; s++) begin
      step = 5'(s);
      e_rk = rk[s + 1];
      d_rk = rk[32 - s];
      @(negedge clk);
      e_din = e_dout;
      d_din = d_dout;
    end
    ct = e_din;
    pt_out = d_din;
  endtask

  task automatic check(input string what, input blk_t got, input blk_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    blk_t ct, pt;
    for (int v = 0; v < 4; v++) begin
      run_block(TV_PT[v], TV_CT[v], TV_KEY[v], ct, pt);
      check("vector encrypt", ct, TV_CT[v]);
      check("vector decrypt", pt, TV_PT[v]);
    end
    for (int t = 0; t < 200; t++) begin
      automatic k80_t key = {$urandom, $urandom, 16'($urandom)};
      automatic blk_t p   = {$urandom, $urandom};
      automatic blk_t c   = {$urandom, $urandom};
      run_block(p, c, key, ct, pt);
      check("random encrypt", ct, ref_encrypt(p, key));
      check("random decrypt", pt, ref_decrypt(c, key));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
