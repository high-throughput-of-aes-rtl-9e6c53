// tb_aes_round: drives the round datapath step by step, without the
// sequencer. For the forward unit it applies the encryption sequence with
// reference round keys and compares the state register after every edge
// with the reference transformation of the previous state; the final result
// must be the reference ciphertext. The inverse unit gets the equivalent
// inverse cipher sequence (InvMixColumn-transformed keys in rounds 1..9) and
// must return the plaintext. Idle edges must hold the state.
module tb_aes_round;
  import aes_ref_pkg::*;
  import aes_pkg::*;

  logic   clk = 0;
  logic   reset = 1;
  step_e  step_f = STEP_IDLE, step_i = STEP_IDLE;
  blk_t   din_f = '0, din_i = '0, key_f = '0, key_i = '0;
  blk_t   st_f, st_i, res_f, res_i;
  blk_t   vec_pt [22];
  blk_t   vec_key [22];
  int checks = 0;
  int failures = 0;

  aes_round #(.INVERSE(1'b0)) dut_f (.clk, .reset, .step(step_f), .data_in(din_f),
    .round_key(key_f), .state(st_f), .result(res_f));
  aes_round #(.INVERSE(1'b1)) dut_i (.clk, .reset, .step(step_i), .data_in(din_i),
    .round_key(key_i), .state(st_i), .result(res_i));

  always #5 clk = ~clk;

  task automatic check(blk_t got, blk_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%032h exp=%032h", what, got, exp);
    end
  endtask

  // the step, key and expected state of every edge of one block
  step_e  seq_step [40];
  blk_t   seq_key  [40];
  blk_t   seq_exp  [40];

  function automatic void build(blk_t pt, blk_t key, bit inverse);
    blk_t x;
    int   e = 0;
    blk_t k;
    x = inverse ? pt ^ round_key(key, 10) : pt ^ round_key(key, 0);
    seq_step[e] = STEP_LOAD;
    seq_key[e]  = inverse ? round_key(key, 10) : round_key(key, 0);
    seq_exp[e]  = x;
    e++;
    for (int r = 1; r <= 10; r++) begin
      for (int s = 0; s < 4; s++) begin
        if (s == 2 && r == 10) continue;
        k = '0;
        case (s)
          0: begin x = sub_bytes(x, inverse);   seq_step[e] = STEP_SUB;   end
          1: begin x = shift_rows(x, inverse);  seq_step[e] = STEP_SHIFT; end
          2: begin x = mix_columns(x, inverse); seq_step[e] = STEP_MIX;   end
          default: begin
            if (!inverse)    k = round_key(key, r);
            else if (r < 10) k = mix_columns(round_key(key, 10 - r), 1);
            else             k = round_key(key, 0);
            x ^= k;
            seq_step[e] = STEP_ARK;
          end
        endcase
        seq_key[e] = k;
        seq_exp[e] = x;
        e++;
      end
    end
  endfunction

  task automatic run(blk_t pt, blk_t key);
    blk_t ct;
    ct = encrypt(pt, key);
    for (int dir = 0; dir < 2; dir++) begin
      build(dir == 0 ? pt : ct, key, dir == 1);
      din_f = pt;
      din_i = ct;
      for (int e = 0; e < 40; e++) begin
        if (dir == 0) begin step_f = seq_step[e]; key_f = seq_key[e]; end
        else          begin step_i = seq_step[e]; key_i = seq_key[e]; end
        #1;
        if (e == 39) check(dir == 0 ? res_f : res_i, dir == 0 ? ct : pt, "result before last edge");
        @(negedge clk);
        step_f = STEP_IDLE;
        step_i = STEP_IDLE;
        check(dir == 0 ? st_f : st_i, seq_exp[e], $sformatf("dir %0d edge %0d", dir, e));
      end
      @(negedge clk);
      check(dir == 0 ? st_f : st_i, dir == 0 ? ct : pt, "idle holds");
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    @(negedge clk);
    check(st_f, '0, "reset clears state");
    vec_pt[0] = 128'h3243f6a8885a308d313198a2e0370734;
    vec_key[0] = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    vec_pt[1] = 128'h00112233445566778899aabbccddeeff;
    vec_key[1] = 128'h000102030405060708090a0b0c0d0e0f;
    for (int i = 2; i < 22; i++) begin
      vec_pt[i] = rand_blk();
      vec_key[i] = rand_blk();
    end
    for (int i = 0; i < 22; i++) run(vec_pt[i], vec_key[i]);
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
