// tb_aes_key_expansion: checks the key schedule. For the standard's example
// key and for random keys, the unit is loaded and stepped ten times with
// random gaps between steps; after every step rk_cur and round are compared
// with the reference expansion, and at the end all eleven stored keys are
// read back. A second instance without storage must give the same keys.
// Without further steps the last key must be held.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;
  import aes_pkg::round_t;

  logic   clk = 0;
  logic   reset = 1;
  logic   load = 0;
  logic   step = 0;
  blk_t   key_in = '0;
  blk_t   rk_cur, rk_cur2, rd_key, rd_key2;
  round_t round, round2;
  round_t rd_idx = '0;
  int checks = 0;
  int failures = 0;

  aes_key_expansion #(.STORE_ALL(1'b1)) dut (
    .clk, .reset, .load, .key_in, .step, .rk_cur, .round, .rd_idx, .rd_key);
  aes_key_expansion #(.STORE_ALL(1'b0)) dut_nostore (
    .clk, .reset, .load, .key_in, .step, .rk_cur(rk_cur2), .round(round2),
    .rd_idx, .rd_key(rd_key2));

  always #5 clk = ~clk;

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%032h exp=%032h", what, got, exp);
    end
  endtask

  task automatic run_key(blk_t key);
    @(negedge clk);
    key_in = key;
    load = 1;
    @(negedge clk);
    load = 0;
    key_in = rand_blk();   // the key must have been captured
    check(rk_cur, key, "round key 0");
    check(128'(round), 0, "round index 0");
    for (int r = 1; r <= 10; r++) begin
      repeat ($urandom_range(0, 3)) @(negedge clk);
      step = 1;
      @(negedge clk);
      step = 0;
      check(rk_cur, round_key(key, r), $sformatf("rk_cur round %0d", r));
      check(rk_cur2, round_key(key, r), $sformatf("no-store rk_cur round %0d", r));
      check(128'(round), 128'(r), "round index");
    end
    repeat (2) @(negedge clk);
    check(rk_cur, round_key(key, 10), "round key 10 held");
    for (int r = 0; r <= 10; r++) begin
      rd_idx = round_t'(r);
      #1;
      check(rd_key, round_key(key, r), $sformatf("stored key %0d", r));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    run_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    check(rk_cur, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "standard example round key 10");
    run_key(128'h000102030405060708090a0b0c0d0e0f);
    for (int i = 0; i < 20; i++) run_key(rand_blk());
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
