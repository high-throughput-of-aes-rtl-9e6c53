// tb_aes_mix_columns: checks MixColumn and its inverse. The round-1 values of the AES
// standard's worked example are checked in both directions, then 500 random
// states against the reference model, plus inverse(forward(x)) == x.
module tb_aes_mix_columns;
  import aes_ref_pkg::*;

  logic   clk = 0;
  blk_t   fin, iin;
  blk_t   fout, iout;
  int checks = 0;
  int failures = 0;

  aes_mix_columns #(.INVERSE(1'b0)) dut_fwd (.in(fin), .out(fout));
  aes_mix_columns #(.INVERSE(1'b1)) dut_inv (.in(iin), .out(iout));

  always #5 clk = ~clk;

  task automatic check(blk_t got, blk_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%032h exp=%032h", what, got, exp);
    end
  endtask

  initial begin
    fin = 128'hd4bf5d30e0b452aeb84111f11e2798e5;
    iin = 128'h046681e5e0cb199a48f8d37a2806264c;
    @(posedge clk);
    check(fout, 128'h046681e5e0cb199a48f8d37a2806264c, "example forward");
    check(iout, 128'hd4bf5d30e0b452aeb84111f11e2798e5, "example inverse");
    for (int i = 0; i < 500; i++) begin
      fin = rand_blk();
      iin = rand_blk();
      @(posedge clk);
      check(fout, mix_columns(fin, 0), "forward");
      check(iout, mix_columns(iin, 1), "inverse");
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
