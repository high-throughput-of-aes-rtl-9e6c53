// aes_encrypt: AES-128 encryption core ("AES Encryption" of the structure
// diagram), iterative with a register after each transformation.
//
// A key_valid_in pulse stores key_in as the cipher key. A data_valid_in
// pulse, while the core is idle and a key is known (stored earlier or
// arriving in the same cycle), accepts Data_in: that edge performs the
// initial AddRoundKey and the block then runs through the 39 remaining
// transformations of aes_round_ctrl. The key schedule runs on the fly beside
// it: aes_key_expansion is reloaded with the cipher key when the block
// starts and advanced once per round. 40 clock edges after acceptance,
// counting the accepting edge, cipher_out holds the ciphertext and valid_out
// rises; both hold until the next block is accepted or reset. Pulses that
// arrive while a block is running are ignored.
//
// The port names and the 40-cycle latency follow the design's block diagram
// and timing report; the pulse handshake, the stored key and holding
// valid_out high are this design's choices. reset is asynchronous, active
// high, and clears all registers.
module aes_encrypt
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   data_valid_in,
  input  logic   key_valid_in,
  input  block_t Data_in,
  input  block_t key_in,
  output logic   valid_out,
  output block_t cipher_out
);

  block_t key_q;
  logic   key_ok;
  logic   busy;
  logic   start;
  step_e  step;
  round_t round;
  logic   key_step;
  logic   last;
  block_t start_key;
  block_t rk_cur;
  round_t rk_round;
  block_t rd_unused;
  block_t round_key;
  block_t state;
  block_t result;

  assign start_key = key_valid_in ? key_in : key_q;
  assign start     = data_valid_in && !busy && (key_ok || key_valid_in);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      key_q  <= '0;
      key_ok <= 1'b0;
    end else if (key_valid_in && !busy) begin
      key_q  <= key_in;
      key_ok <= 1'b1;
    end
  end

  aes_round_ctrl u_ctrl (
    .clk, .reset, .start, .busy, .step, .round, .key_step, .last
  );

  aes_key_expansion #(.STORE_ALL(1'b0)) u_keys (
    .clk, .reset,
    .load  (start),
    .key_in(start_key),
    .step  (key_step),
    .rk_cur(rk_cur),
    .round (rk_round),
    .rd_idx('0),
    .rd_key(rd_unused)
  );

  // the initial AddRoundKey uses the cipher key itself
  assign round_key = (step == STEP_LOAD) ? start_key : rk_cur;

  aes_round #(.INVERSE(1'b0)) u_round (
    .clk, .reset, .step,
    .data_in  (Data_in),
    .round_key(round_key),
    .state    (state),
    .result   (result)
  );

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      valid_out  <= 1'b0;
      cipher_out <= '0;
    end else if (start) begin
      valid_out  <= 1'b0;
    end else if (last) begin
      valid_out  <= 1'b1;
      cipher_out <= result;
    end
  end

  // AddRoundKey of round r must see round key r
  a_key_in_step : assert property (@(posedge clk) disable iff (reset)
    step == STEP_ARK |-> rk_round == round);

endmodule
