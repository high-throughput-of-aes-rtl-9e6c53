// tb_aes_shift_rows: checks ShiftRows and its inverse. The round-1 values of the AES
// standard's worked example are checked in both directions, then 500 random
// states against the reference model, plus inverse(forward(x)) == x.
module tb_aes_shift_rows;
  import aes_ref_pkg::*;

  logic   clk = 0;
  blk_t   fin, iin;
  blk_t   fout, iout;
  int checks = 0;
  int failures = 0;

  aes_shift_rows #(.INVERSE(1'b0)) dut_fwd (.in(fin), .out(fout));
  aes_shift_rows #(.INVERSE(1'b1)) dut_inv (.in(iin), .out(iout));

  always #5 clk = ~clk;

  task automatic check(blk_t got, blk_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%032h exp=%032h", what, got, exp);
    end
  endtask

  initial begin
    fin = 128'hd42711aee0bf98f1b8b45de51e415230;
    iin = 128'hd4bf5d30e0b452aeb84111f11e2798e5;
    @(posedge clk);
    check(fout, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "example forward");
    check(iout, 128'hd42711aee0bf98f1b8b45de51e415230, "example inverse");
    for (int i = 0; i < 500; i++) begin
      fin = rand_blk();
      iin = rand_blk();
      @(posedge clk);
      check(fout, shift_rows(fin, 0), "forward");
      check(iout, shift_rows(iin, 1), "inverse");
      iin = fout;
      @(posedge clk);
      check(iout, fin, "round trip");
    end
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
