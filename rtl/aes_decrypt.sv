// aes_decrypt: AES-128 decryption core ("AES Decryption" of the structure
// diagram), iterative with a register after each transformation.
//
// The inverse cipher needs the round keys last to first, so the core works in
// two phases. A key_valid_in pulse (while no block is running) loads key_in
// into aes_key_expansion, which then computes one round key every four
// cycles and stores all eleven: 40 cycles counting the loading edge. A
// data_valid_in pulse may come at any time; it is remembered, and the first
// edge after the key schedule is complete samples Data_in and starts the
// block. Data_in must therefore be held until then; in the full system it is
// the encryptor's ciphertext, which is ready by that time. The block takes
// 40 edges through aes_round with INVERSE = 1, in the order InvSubBytes,
// InvShiftRows, InvMixColumn, AddRoundKey of the block diagram, i.e. the
// equivalent inverse cipher of the AES standard: it starts with round key 10,
// uses InvMixColumn(round key 10-r) in rounds r = 1 .. 9 and round key 0 in
// round 10. Key loading plus one block thus take 80 cycles, the figure the
// design reports for decryption. Further blocks under the same key take 40.
//
// cipher_out (the name the structure diagram prints; it carries the
// plaintext) holds the last result; valid_out rises with it and falls when a
// new key or block is accepted. The pulse handshake, the
// remembered data request and the stored round keys are this design's
// choices. reset is asynchronous, active high, and clears all registers.
module aes_decrypt
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

  typedef enum logic [1:0] {
    D_IDLE  = 2'd0,   // no key
    D_KEY   = 2'd1,   // key schedule running
    D_READY = 2'd2,   // round keys stored
    D_RUN   = 2'd3    // block running
  } dstate_e;

  dstate_e    dstate;
  logic [5:0] kcnt;
  logic       pending;
  logic       key_load;
  logic       kx_step;
  logic       start;
  logic       busy;
  step_e      step;
  round_t     round;
  logic       key_step_unused;
  logic       last;
  block_t     rk_cur_unused;
  round_t     kx_round;
  round_t     rd_idx;
  block_t     rd_key;
  block_t     rd_key_imc;
  block_t     round_key;
  block_t     state;
  block_t     result;

  assign key_load = key_valid_in && (dstate != D_RUN);
  assign kx_step  = (dstate == D_KEY) && (kcnt[1:0] == 2'd3);
  assign start    = (dstate == D_READY) && !key_load && (pending || data_valid_in);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      dstate  <= D_IDLE;
      kcnt    <= '0;
      pending <= 1'b0;
    end else begin
      if (start)              pending <= 1'b0;
      else if (data_valid_in) pending <= 1'b1;

      if (key_load) begin
        dstate <= D_KEY;
        kcnt   <= 6'd1;
      end else begin
        unique case (dstate)
          D_KEY: begin
            kcnt <= kcnt + 6'd1;
            if (kcnt == 6'(BLOCK_CYCLES - 1)) dstate <= D_READY;
          end
          D_READY: if (start) dstate <= D_RUN;
          D_RUN:   if (last) dstate <= D_READY;
          default: ;
        endcase
      end
    end
  end

  aes_round_ctrl u_ctrl (
    .clk, .reset, .start, .busy, .step, .round,
    .key_step(key_step_unused), .last
  );

  aes_key_expansion #(.STORE_ALL(1'b1)) u_keys (
    .clk, .reset,
    .load  (key_load),
    .key_in(key_in),
    .step  (kx_step),
    .rk_cur(rk_cur_unused),
    .round (kx_round),
    .rd_idx(rd_idx),
    .rd_key(rd_key)
  );

  // round key 10 enters with the block; round r then uses key 10 - r
  assign rd_idx = (step == STEP_LOAD) ? round_t'(NUM_ROUNDS) : round_t'(4'(NUM_ROUNDS) - round);

  aes_mix_columns #(.INVERSE(1'b1)) u_key_imc (.in(rd_key), .out(rd_key_imc));

  assign round_key = (step == STEP_ARK && round != round_t'(NUM_ROUNDS)) ? rd_key_imc : rd_key;

  aes_round #(.INVERSE(1'b1)) u_round (
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
    end else if (start || key_load) begin
      valid_out  <= 1'b0;
    end else if (last) begin
      valid_out  <= 1'b1;
      cipher_out <= result;
    end
  end

  a_keys_complete : assert property (@(posedge clk) disable iff (reset)
    start |-> kx_round == round_t'(NUM_ROUNDS));
  a_start_idle : assert property (@(posedge clk) disable iff (reset)
    start |-> !busy);

endmodule
