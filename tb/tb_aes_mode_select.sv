// tb_aes_mode_select: drives encrypt, key_valid_in and key_valid_in1 with
// random levels and held requests, and compares the four request pulses each
// cycle with a model written here: the selected request is registered, and
// a pulse is given in the first cycle the registered request is high.
module tb_aes_mode_select;
  logic clk = 0;
  logic reset = 1;
  logic encrypt = 0, key_valid_in = 0, key_valid_in1 = 0;
  logic enc_data_valid, enc_key_valid, dec_data_valid, dec_key_valid;
  logic [3:0] m_q = '0, m_prev = '0, m_d;
  int checks = 0;
  int failures = 0;
  int enc_pulses = 0, dec_pulses = 0;

  aes_mode_select dut (.clk, .reset, .encrypt, .key_valid_in, .key_valid_in1,
    .enc_data_valid, .enc_key_valid, .dec_data_valid, .dec_key_valid);

  always #5 clk = ~clk;

  // model: {enc_data, enc_key, dec_data, dec_key}
  always_comb m_d = {encrypt, encrypt & key_valid_in, ~encrypt & key_valid_in1,
                     ~encrypt & key_valid_in1};
  always @(posedge clk) begin
    if (reset) begin
      m_q <= '0;
      m_prev <= '0;
    end else begin
      m_q <= m_d;
      m_prev <= m_q;
    end
  end

  task automatic check(logic [3:0] got, logic [3:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%b exp=%b", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 0;
    // a held encryption request gives one pulse
    encrypt = 1; key_valid_in = 1;
    repeat (6) begin
      @(negedge clk);
      check({enc_data_valid, enc_key_valid, dec_data_valid, dec_key_valid}, m_q & ~m_prev, "held enc");
      enc_pulses += int'(enc_data_valid);
    end
    checks++;
    if (enc_pulses != 1) begin failures++; $display("FAIL held encrypt gave %0d pulses", enc_pulses); end
    // mode switch with a held decryption request
    encrypt = 0; key_valid_in = 0; key_valid_in1 = 1;
    repeat (6) begin
      @(negedge clk);
      check({enc_data_valid, enc_key_valid, dec_data_valid, dec_key_valid}, m_q & ~m_prev, "held dec");
      dec_pulses += int'(dec_key_valid);
    end
    checks++;
    if (dec_pulses != 1) begin failures++; $display("FAIL held decrypt gave %0d pulses", dec_pulses); end
    // random levels
    repeat (500) begin
      encrypt = 1'($urandom);
      key_valid_in = 1'($urandom);
      key_valid_in1 = 1'($urandom);
      @(negedge clk);
      check({enc_data_valid, enc_key_valid, dec_data_valid, dec_key_valid}, m_q & ~m_prev, "random");
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
