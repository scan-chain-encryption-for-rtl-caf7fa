// tb_scan_cipher: runs an Input Scan Cipher (decrypting) and an Output Scan
// Cipher (encrypting) side by side with the phase sequencing of the
// controller (N cycles per phase, R1/R2 swapped each phase, cipher steps in
// the first D cycles), random serial data and random pauses of the scan
// enable, including pauses in the middle of a block operation. The bits
// leaving each cipher during phase p must be the reference decryption /
// encryption of the block shifted in during phase p-2, MSB first, and
// nothing may change while the enable is low. A reset in the middle of a
// phase must clear both registers, so no earlier data can be shifted out.
module tb_scan_cipher;
  import present_pkg::*;
  import present_ref_pkg::*;

  localparam int PHASES = 40;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             rst_n, en, sel, crypt;
  logic [RND_W-1:0] step;
  block_t           enc_rk, dec_rk;
  logic             sin, enc_out, dec_out;
  int checks = 0, failures = 0, pauses_in_crypt = 0;

  scan_cipher #(.DECRYPT(1'b0)) u_enc (.clk, .rst_n, .en, .sel, .crypt, .step, .rk(enc_rk),
                                       .sin, .sout(enc_out));
  scan_cipher #(.DECRYPT(1'b1)) u_dec (.clk, .rst_n, .en, .sel, .crypt, .step, .rk(dec_rk),
                                       .sin, .sout(dec_out));

  initial begin
    k80_t key = {$urandom, $urandom, 16'($urandom)};
    blk_t rk [33];
    blk_t in_blk [PHASES];
    blk_t exp_enc, exp_dec;
    logic held_enc, held_dec;
    ref_round_keys(key, rk);
    rst_n = 1'b0; en = 1'b0; sel = 1'b0; crypt = 1'b0; step = '0; sin = 1'b0;
    enc_rk = '0; dec_rk = '0;
    repeat (2) @(negedge clk);
    // reset must clear both registers: the first two phases shift out zeros
    rst_n = 1'b1;
    for (int p = 0; p < PHASES; p++) begin
      if (p >= 2) begin
        exp_enc = ref_encrypt(in_blk[p-2], key);
        exp_dec = ref_decrypt(in_blk[p-2], key);
      end else if (p == 1) begin
        // R2 held its reset value (zero) and was processed during phase 0
        exp_enc = ref_encrypt('0, key);
        exp_dec = ref_decrypt('0, key);
      end else begin
        exp_enc = '0;
        exp_dec = '0;
      end
      for (int c = 0; c < int'(N); c++) begin
        sel = p[0];
        crypt = (c < int'(D));
        step = 5'(c);
        enc_rk = rk[c + 1 > 32 ? 32 : c + 1];
        dec_rk = rk[c < 32 ? 32 - c : 1];
        if ($urandom_range(0, 15) == 0) begin
          en = 1'b0;
          if (crypt) pauses_in_crypt++;
          #1 held_enc = enc_out; held_dec = dec_out;
          repeat ($urandom_range(1, 4)) begin
            sin = 1'($urandom);
            @(negedge clk);
            checks++;
            if (enc_out !== held_enc || dec_out !== held_dec) begin
              failures++;
              $display("FAIL output moved while enable low");
            end
          end
        end
        en = 1'b1;
        sin = 1'($urandom);
        in_blk[p][N-1-c] = sin;
        #1;
        begin
          checks += 2;
          if (enc_out !== exp_enc[N-1-c]) begin
            failures++;
            $display("FAIL enc phase %0d bit %0d", p, c);
          end
          if (dec_out !== exp_dec[N-1-c]) begin
            failures++;
            $display("FAIL dec phase %0d bit %0d", p, c);
          end
        end
        @(negedge clk);
      end
    end
    // reset in the middle of a phase: nothing that was in R1/R2 may come out,
    // the register shifting next starts from zero
    for (int c = 0; c < 20; c++) begin
      en = 1'b1; sel = 1'b0; crypt = 1'b0; sin = 1'($urandom);
      @(negedge clk);
    end
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < int'(N); c++) begin
      en = 1'b1; sel = 1'b0; crypt = (c < int'(D)); step = 5'(c);
      sin = 1'($urandom);
      #1;
      checks++;
      if (enc_out !== 1'b0 || dec_out !== 1'b0) begin
        failures++;
        $display("FAIL data left a cipher after reset");
      end
      @(negedge clk);
    end
    checks++;
    if (pauses_in_crypt == 0) begin
      failures++;
      $display("FAIL no pause during a block operation was exercised");
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
