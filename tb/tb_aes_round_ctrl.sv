// tb_aes_round_ctrl: checks the 40-edge step sequence. After a start pulse
// the sequencer must produce, edge by edge, LOAD, then SUB, SHIFT, MIX, ARK
// for rounds 1..9 and SUB, SHIFT, ARK for round 10, with key_step on every
// ShiftRows edge and last on edge 39 only, busy for exactly the 39 edges
// after the accepting one, and starts during a block must be ignored.
module tb_aes_round_ctrl;
  import aes_pkg::*;

  logic   clk = 0;
  logic   reset = 1;
  logic   start = 0;
  logic   busy;
  step_e  step;
  round_t round;
  logic   key_step;
  logic   last;
  int checks = 0;
  int failures = 0;

  aes_round_ctrl dut (.clk, .reset, .start, .busy, .step, .round, .key_step, .last);

  always #5 clk = ~clk;

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d", what, got, exp);
    end
  endtask

  // expected step on edge e (0 .. 39) of a block
  function automatic step_e exp_step(int e);
    if (e == 0) return STEP_LOAD;
    if (e <= 36) begin
      case ((e - 1) % 4)
        0: return STEP_SUB;
        1: return STEP_SHIFT;
        2: return STEP_MIX;
        default: return STEP_ARK;
      endcase
    end
    if (e == 37) return STEP_SUB;
    if (e == 38) return STEP_SHIFT;
    return STEP_ARK;
  endfunction

  task automatic run_block(bit spam_start);
    int n_last = 0;
    @(negedge clk);
    check(int'(busy), 0, "idle before start");
    start = 1;
    for (int e = 0; e < BLOCK_CYCLES; e++) begin
      #1;
      check(int'(step), int'(exp_step(e)), $sformatf("step on edge %0d", e));
      if (e > 0) begin
        check(int'(round), (e + 3) / 4 > 10 ? 10 : (e + 3) / 4, $sformatf("round on edge %0d", e));
        check(int'(busy), 1, "busy");
      end
      check(int'(key_step), int'(exp_step(e) == STEP_SHIFT), $sformatf("key_step on edge %0d", e));
      check(int'(last), int'(e == BLOCK_CYCLES - 1), $sformatf("last on edge %0d", e));
      n_last += int'(last);
      @(negedge clk);
      start = spam_start;
    end
    start = 0;
    #1;
    check(int'(busy), 0, "idle after 40 edges");
    check(int'(step), int'(STEP_IDLE), "no step when idle");
    check(n_last, 1, "one last per block");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    repeat (3) @(negedge clk);
    #1;
    check(int'(step), int'(STEP_IDLE), "idle step");
    run_block(0);
    run_block(1);
    repeat (5) @(negedge clk);
    run_block(0);
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
