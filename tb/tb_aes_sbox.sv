// tb_aes_sbox: checks the forward and inverse S-box for all 256 inputs
// against the reference model (brute-force GF(2^8) inverse plus affine map)
// and against entries printed in the AES standard (S(00)=63, S(53)=ed,
// S(ff)=16).
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic       clk = 0;
  logic [7:0] in;
  logic [7:0] fwd_out;
  logic [7:0] inv_out;
  int checks = 0;
  int failures = 0;

  aes_sbox #(.INVERSE(1'b0)) dut_fwd (.in(in), .out(fwd_out));
  aes_sbox #(.INVERSE(1'b1)) dut_inv (.in(in), .out(inv_out));

  always #5 clk = ~clk;

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in=%02h got=%02h exp=%02h", what, in, got, exp);
    end
  endtask

  initial begin
    for (int x = 0; x < 256; x++) begin
      in = 8'(x);
      @(posedge clk);
      check(fwd_out, sbox(in), "sbox");
      check(inv_out, inv_sbox(in), "inv_sbox");
      if (x == 8'h00) check(fwd_out, 8'h63, "S(00)");
      if (x == 8'h53) check(fwd_out, 8'hed, "S(53)");
      if (x == 8'hff) check(fwd_out, 8'h16, "S(ff)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
