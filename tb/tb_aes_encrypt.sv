// tb_aes_encrypt: checks the encryption core against the reference model and
// the four key/plaintext/ciphertext rows used to validate the design
// (including the AES standard's example), plus random blocks. Every block's
// latency must be 40 clock edges from the accepting edge to the edge that
// raises valid_out. Also checked: the stored key serves later data pulses,
// pulses during a block are ignored, valid_out and cipher_out hold until the
// next block, and reset clears them.
module tb_aes_encrypt;
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

  aes_encrypt dut (.clk, .reset, .data_valid_in, .key_valid_in, .Data_in, .key_in,
    .valid_out, .cipher_out);

  always #5 clk = ~clk;

  task automatic check(blk_t got, blk_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%032h exp=%032h", what, got, exp);
    end
  endtask

  // one block; with_key also presents a key; disturb sends ignored pulses
  task automatic run(blk_t pt, blk_t key, bit with_key, blk_t exp_ct, bit disturb);
    int n = 0;
    @(negedge clk);
    Data_in = pt;
    key_in = key;
    data_valid_in = 1;
    key_valid_in = with_key;
    @(negedge clk);          // accepting edge passed
    n = 1;
    data_valid_in = 0;
    key_valid_in = 0;
    Data_in = rand_blk();
    key_in = rand_blk();
    check(128'(valid_out), 0, "valid_out low while running");
    while (!valid_out && n < 100) begin
      if (disturb && n == 10) begin
        data_valid_in = 1;
        key_valid_in = 1;
      end else begin
        data_valid_in = 0;
        key_valid_in = 0;
      end
      @(negedge clk);
      n++;
    end
    data_valid_in = 0;
    key_valid_in = 0;
    check(128'(n), 40, "latency in clock edges");
    check(cipher_out, exp_ct, "ciphertext");
    repeat (3) @(negedge clk);
    check(128'(valid_out), 1, "valid_out holds");
    check(cipher_out, exp_ct, "ciphertext holds");
  endtask

  blk_t tk [4];
  blk_t tp [4];
  blk_t tc [4];
  blk_t k;
  blk_t p;
  blk_t cur_key;

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
    // data without any key is not accepted
    data_valid_in = 1;
    @(negedge clk);
    data_valid_in = 0;
    repeat (45) @(negedge clk);
    check(128'(valid_out), 0, "no block without a key");
    for (int i = 0; i < 4; i++) begin
      check(encrypt(tp[i], tk[i]), tc[i], "reference model on table row");
      run(tp[i], tk[i], 1, tc[i], i == 2);
    end
    // stored key from the last row
    run(tp[2], '0, 0, tc[2], 0);
    cur_key = tk[3];
    for (int i = 0; i < 30; i++) begin
      k = rand_blk();
      p = rand_blk();
      if (i % 3 != 2) cur_key = k;    // every third block reuses the stored key
      run(p, k, i % 3 != 2, encrypt(p, cur_key), i % 4 == 1);
    end
    // reset during a block clears the outputs
    @(negedge clk);
    Data_in = tp[0]; key_in = tk[0]; data_valid_in = 1; key_valid_in = 1;
    @(negedge clk);
    data_valid_in = 0; key_valid_in = 0;
    repeat (10) @(negedge clk);
    reset = 1;
    @(negedge clk);
    reset = 0;
    repeat (40) @(negedge clk);
    check(128'(valid_out), 0, "reset aborts the block");
    check(cipher_out, '0, "reset clears cipher_out");
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
