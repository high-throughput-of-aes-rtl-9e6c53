// tb_aes_top: end-to-end test of the whole system at its default (and only)
// configuration. Each operation encrypts a block with encrypt high, then
// switches encrypt low and asks for decryption, which loads the key, expands
// it and decrypts the encryptor's output. The ciphertext is compared with the
// validation rows and the reference model, the plaintext with the original
// block, and the latencies are checked: 41 edges from the edge that samples
// the encryption request to valid_out_en (one for the mode register, 40 for
// the block) and 81 from the decryption request to valid_out_de (one, plus
// 40 for the key schedule and 40 for the block). Counted mechanisms, each of
// which must occur: encryptions, decryptions, mode switches, requests held
// high for several cycles that start only one operation, data requests
// remembered while the key schedule runs, and a reset that aborts an
// operation.
module tb_aes_top;
  import aes_ref_pkg::*;

  logic clk = 0;
  logic reset = 1;
  logic encrypt = 0;
  logic key_valid_in = 0;
  logic key_valid_in1 = 0;
  blk_t Data_in = '0;
  blk_t key_in = '0;
  logic valid_out_en;
  blk_t cipher_text;
  logic valid_out_de;
  blk_t plain_text;
  int checks = 0;
  int failures = 0;
  int n_enc = 0, n_dec = 0, n_switch = 0, n_held = 0, n_pending = 0, n_reset = 0;

  aes_top dut (.clk, .reset, .encrypt, .key_valid_in, .key_valid_in1, .Data_in, .key_in,
    .valid_out_en, .cipher_text, .valid_out_de, .plain_text);

  always #4 clk = ~clk;   // 8 ns period, 125 MHz

  task automatic check(blk_t got, blk_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%032h exp=%032h", what, got, exp);
    end
  endtask

  task automatic op(blk_t pt, blk_t key, blk_t exp_ct, int hold);
    int n;
    bit seen_low;
    @(negedge clk);
    Data_in = pt;
    key_in = key;
    encrypt = 1;
    key_valid_in = 1;
    n = 0;
    seen_low = 0;
    do begin
      @(negedge clk);
      n++;
      if (n == hold) key_valid_in = 0;
      if (!valid_out_en) seen_low = 1;
    end while (!(valid_out_en && seen_low) && n < 100);
    check(128'(n), 41, "encryption latency");
    check(cipher_text, exp_ct, "ciphertext");
    check(cipher_text, aes_ref_pkg::encrypt(pt, key), "ciphertext against reference");
    n_enc++;
    // switch to decryption; the request is held high for `hold` cycles
    encrypt = 0;
    key_valid_in = 0;
    key_valid_in1 = 1;
    n_switch++;
    n = 0;
    seen_low = 0;
    do begin
      @(negedge clk);
      n++;
      if (n == hold) key_valid_in1 = 0;
      if (!valid_out_de) seen_low = 1;
    end while (!(valid_out_de && seen_low) && n < 200);
    key_valid_in1 = 0;
    check(128'(n), 81, "decryption latency");
    check(plain_text, pt, "plaintext round trip");
    n_dec++;
    n_pending++;   // the data request waited for the key schedule
    if (hold > 1) n_held++;
    // a held request must not start a second operation
    repeat (hold + 45) @(negedge clk);
    check(128'(valid_out_de), 1, "one decryption per request");
    check(128'(valid_out_en), 1, "encryptor untouched by decryption");
    check(cipher_text, exp_ct, "ciphertext held while decrypting");
  endtask

  blk_t tk [4];
  blk_t tp [4];
  blk_t tc [4];
  blk_t k;
  blk_t p;

  initial begin
    tk[0] = 128'h000102030405060708090a0b0c0d0e0f;
    tp[0] = 128'h00112233445566778899aabbccddeeff;
    tc[0] = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    tk[1] = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    tp[1] = 128'h3925841d02dc09fbdc118597196a0b32;
    tc[1] = 128'h7dfdff39cc79c14315baf5ef727cc0cf;
    tk[2] = 128'h000102030405060708090a0b0c0d0e0f;
    tp[2] = 128'h00112233445566778899aabbccddeeff;
    tc[2] = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    tk[3] = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    tp[3] = 128'hf34481ec3cc627bacd5dc3fb08f273e6;
    tc[3] = 128'he42023437f94d94d2a085dfcd40c2cd0;
    repeat (3) @(negedge clk);
    reset = 0;
    @(negedge clk);
    check(cipher_text, '0, "cipher_text cleared by reset");
    check(plain_text, '0, "plain_text cleared by reset");
    for (int i = 0; i < 4; i++) op(tp[i], tk[i], tc[i], i + 1);
    for (int i = 0; i < 8; i++) begin
      k = rand_blk();
      p = rand_blk();
      op(p, k, aes_ref_pkg::encrypt(p, k), $urandom_range(1, 30));
    end
    // reset in the middle of a decryption erases all data
    @(negedge clk);
    Data_in = tp[0]; key_in = tk[0]; encrypt = 1; key_valid_in = 1;
    repeat (45) @(negedge clk);
    encrypt = 0; key_valid_in = 0; key_valid_in1 = 1;
    repeat (30) @(negedge clk);
    key_valid_in1 = 0;
    reset = 1;
    @(negedge clk);
    reset = 0;
    n_reset++;
    repeat (100) @(negedge clk);
    check(128'(valid_out_en), 0, "reset clears valid_out_en");
    check(128'(valid_out_de), 0, "reset aborts the decryption");
    check(cipher_text, '0, "reset clears cipher_text");
    check(plain_text, '0, "reset clears plain_text");
    $display("mechanisms: encryptions=%0d decryptions=%0d mode_switches=%0d held_requests=%0d remembered_data_requests=%0d resets=%0d",
             n_enc, n_dec, n_switch, n_held, n_pending, n_reset);
    checks++; if (n_enc == 0) begin failures++; $display("FAIL no encryption"); end
    checks++; if (n_dec == 0) begin failures++; $display("FAIL no decryption"); end
    checks++; if (n_switch == 0) begin failures++; $display("FAIL no mode switch"); end
    checks++; if (n_held == 0) begin failures++; $display("FAIL no held request"); end
    checks++; if (n_pending == 0) begin failures++; $display("FAIL no remembered data request"); end
    checks++; if (n_reset == 0) begin failures++; $display("FAIL no reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
