// tb_aes_decrypt: checks the decryption core against the reference model and
// the four validation rows (ciphertext back to plaintext), plus random
// blocks. A key pulse followed by a block must take 80 clock edges from the
// key-accepting edge to the edge that raises valid_out (40 for the key
// schedule, 40 for the block); a further block under the same key takes 40.
// A data pulse that comes while the key schedule runs must be remembered, a
// key pulse during a block ignored, and reset must clear the outputs.
module tb_aes_decrypt;
  import aes_ref_pkg::*;

  logic clk = 0;
  logic reset = 1;
  logic data_valid_in = 0;
  logic key_valid_in = 0;
  blk_t Data_in = '0;
  blk_t key_in = '0;
  logic valid_out;
  blk_t cipher_out;
  int checks = 0;
  int failures = 0;

  aes_decrypt dut (.clk, .reset, .data_valid_in, .key_valid_in, .Data_in, .key_in,
    .valid_out, .cipher_out);

  always #5 clk = ~clk;

  task automatic check(blk_t got, blk_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%032h exp=%032h", what, got, exp);
    end
  endtask

  // new_key: key pulse first; data_delay: edges between key and data pulse;
  // disturb: a key pulse with another key in the middle of the block
  task automatic run(blk_t ct, blk_t key, bit new_key, int data_delay, blk_t exp_pt,
                     bit disturb);
    int n = 0;
    int exp_n;
    exp_n = new_key ? 80 : 40;
    @(negedge clk);
    Data_in = ct;
    key_in = key;
    key_valid_in = new_key;
    data_valid_in = (data_delay == 0);
    @(negedge clk);
    n = 1;
    key_valid_in = 0;
    data_valid_in = 0;
    key_in = rand_blk();
    while (!valid_out && n < 200) begin
      data_valid_in = (n == data_delay);
      key_valid_in = disturb && (n == exp_n - 20);
      @(negedge clk);
      n++;
    end
    data_valid_in = 0;
    key_valid_in = 0;
    check(128'(n), 128'(exp_n), "latency in clock edges");
    check(cipher_out, exp_pt, "plaintext");
    repeat (3) @(negedge clk);
    check(128'(valid_out), 1, "valid_out holds");
    check(cipher_out, exp_pt, "plaintext holds");
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
    tk[2] = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    tp[2] = 128'h3243f6a8885a308d313198a2e0370734;
    tc[2] = 128'h3925841d02dc09fbdc118597196a0b32;
    tk[3] = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    tp[3] = 128'hf34481ec3cc627bacd5dc3fb08f273e6;
    tc[3] = 128'he42023437f94d94d2a085dfcd40c2cd0;
    repeat (2) @(negedge clk);
    reset = 0;
    @(negedge clk);
    check(128'(valid_out), 0, "valid_out low after reset");
    for (int i = 0; i < 4; i++) begin
      check(decrypt(tc[i], tk[i]), tp[i], "reference model on table row");
      run(tc[i], tk[i], 1, i * 7, tp[i], i == 1);
    end
    // same key, data only
    run(tc[2], '0, 0, 0, tp[2], 0);
    for (int i = 0; i < 12; i++) begin
      k = rand_blk();
      p = rand_blk();
      run(encrypt(p, k), k, 1, $urandom_range(0, 39), p, i % 3 == 0);
      p = rand_blk();
      run(encrypt(p, k), '0, 0, 0, p, 0);
    end
    // reset during the key schedule clears everything
    @(negedge clk);
    Data_in = tc[0]; key_in = tk[0]; data_valid_in = 1; key_valid_in = 1;
    @(negedge clk);
    data_valid_in = 0; key_valid_in = 0;
    repeat (60) @(negedge clk);
    reset = 1;
    @(negedge clk);
    reset = 0;
    repeat (90) @(negedge clk);
    check(128'(valid_out), 0, "reset aborts the operation");
    check(cipher_out, '0, "reset clears the output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
