// tb_aes_add_round_key: checks AddRoundKey on the standard's worked example
// (round 1 MixColumn output with round key 1) and on random state/key pairs,
// each bit against the XOR computed here.
module tb_aes_add_round_key;
  import aes_ref_pkg::*;

  logic clk = 0;
  blk_t s, k, o;
  int checks = 0;
  int failures = 0;

  aes_add_round_key dut (.state_in(s), .round_key(k), .state_out(o));

  always #5 clk = ~clk;

  task automatic check(blk_t got, blk_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%032h exp=%032h", what, got, exp);
    end
  endtask

  initial begin
    s = 128'h046681e5e0cb199a48f8d37a2806264c;
    k = 128'ha0fafe1788542cb123a339392a6c7605;
    @(posedge clk);
    check(o, 128'ha49c7ff2689f352b6b5bea43026a5049, "example");
    for (int i = 0; i < 200; i++) begin
      s = rand_blk();
      k = rand_blk();
      @(posedge clk);
      check(o, s ^ k, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
