// aes_key_expansion: the AES-128 key schedule, one round key per step.
//
// load captures the 128-bit cipher key as round key 0. Each step pulse
// computes the next round key from the current one (RotWord, SubWord through
// four forward S-boxes, XOR with the round constant, then the chain of word
// XORs) and registers it, so round key r is available on rk_cur after the
// r-th step; round tells which key rk_cur holds. The controller that owns
// this unit decides when to step: the encryptor steps once per round, in
// time for its AddRoundKey; the decryptor runs all ten steps before it
// starts, because the inverse cipher needs the keys in reverse order.
//
// With STORE_ALL = 1 every round key is also written into an 11-entry
// register array that is read combinationally at rd_idx (decryptor). With
// STORE_ALL = 0 the array is left out (encryptor, on-the-fly keys).
//
// The design names a Key Expansion block that turns the cipher key into a
// succession of round keys; the stepping interface and the storage are this
// design's choices. Reset is asynchronous and active high and clears all
// key registers.
module aes_key_expansion
  import aes_pkg::*;
#(
  parameter bit STORE_ALL = 1'b1
) (
  input  logic   clk,
  input  logic   reset,
  input  logic   load,      // capture key_in as round key 0
  input  block_t key_in,
  input  logic   step,      // compute and register the next round key
  output block_t rk_cur,    // latest round key
  output round_t round,     // index of rk_cur, 0 .. 10
  input  round_t rd_idx,    // read port (STORE_ALL = 1 only)
  output block_t rd_key
);

  block_t rk_q;
  round_t round_q;
  block_t rk_next;
  word_t  w [4];
  word_t  nw [4];
  word_t  rot;
  word_t  sub;
  word_t  t;

  always_comb begin
    for (int i = 0; i < 4; i++) w[i] = rk_q[127 - 32*i -: 32];
    rot = {w[3][23:0], w[3][31:24]};
  end

  for (genvar i = 0; i < 4; i++) begin : g_subword
    aes_sbox #(.INVERSE(1'b0)) u_sbox (.in(rot[8*i +: 8]), .out(sub[8*i +: 8]));
  end

  always_comb begin
    t     = sub ^ {rcon(round_t'(round_q + 4'd1)), 24'h000000};
    nw[0] = w[0] ^ t;
    nw[1] = w[1] ^ nw[0];
    nw[2] = w[2] ^ nw[1];
    nw[3] = w[3] ^ nw[2];
    rk_next = {nw[0], nw[1], nw[2], nw[3]};
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      rk_q    <= '0;
      round_q <= '0;
    end else if (load) begin
      rk_q    <= key_in;
      round_q <= '0;
    end else if (step && round_q < round_t'(NUM_ROUNDS)) begin
      rk_q    <= rk_next;
      round_q <= round_q + 4'd1;
    end
  end

  assign rk_cur = rk_q;
  assign round  = round_q;

  if (STORE_ALL) begin : g_store
    block_t mem [NUM_ROUNDS + 1];

    always_ff @(posedge clk or posedge reset) begin
      if (reset) begin
        for (int i = 0; i <= NUM_ROUNDS; i++) mem[i] <= '0;
      end else if (load) begin
        mem[0] <= key_in;
      end else if (step && round_q < round_t'(NUM_ROUNDS)) begin
        mem[round_q + 4'd1] <= rk_next;
      end
    end

    assign rd_key = (rd_idx <= round_t'(NUM_ROUNDS)) ? mem[rd_idx] : '0;
  end else begin : g_no_store
    assign rd_key = rk_q;
  end

  // a step beyond round 10 is a controller error
  a_no_extra_step : assert property (@(posedge clk) disable iff (reset)
    step && !load |-> round_q < round_t'(NUM_ROUNDS));

endmodule
