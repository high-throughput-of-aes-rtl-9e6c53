// aes_round: the round datapath, "AES round 1-9" and "AES round 10" of the
// block diagram folded onto one set of transformation units that every
// round reuses.
//
// The state register sits behind a multiplexer over the four
// transformations, SubBytes, ShiftRows, MixColumn and AddRoundKey (or their
// inverses when INVERSE = 1), so it is loaded once per transformation: this
// is the register after each transformation of the pipelining scheme. The
// tenth round is the same unit with MixColumn skipped by the sequencer.
// STEP_LOAD loads data_in ^ round_key (the initial AddRoundKey) and is
// allowed only with the block's valid signal, which the sequencer turns into
// STEP_LOAD. result is the AddRoundKey output, which the core captures as
// its output on the last edge.
//
// The decryption core applies the steps in the same order (InvSubBytes,
// InvShiftRows, InvMixColumn, AddRoundKey), the "equivalent inverse cipher"
// of the AES standard; it then supplies InvMixColumn-transformed round keys
// for rounds 1 to 9. Reset is asynchronous and active high and clears the
// state.
module aes_round
  import aes_pkg::*;
#(
  parameter bit INVERSE = 1'b0
) (
  input  logic   clk,
  input  logic   reset,
  input  step_e  step,
  input  block_t data_in,     // block entering on STEP_LOAD
  input  block_t round_key,   // key for STEP_LOAD and STEP_ARK
  output block_t state,
  output block_t result       // state ^ round_key
);

  block_t state_q;
  block_t sub_out;
  block_t shift_out;
  block_t mix_out;
  block_t load_out;
  block_t ark_out;

  aes_sub_bytes #(.INVERSE(INVERSE)) u_sub (.in(state_q), .out(sub_out));
  aes_shift_rows #(.INVERSE(INVERSE)) u_shift (.in(state_q), .out(shift_out));
  aes_mix_columns #(.INVERSE(INVERSE)) u_mix (.in(state_q), .out(mix_out));
  aes_add_round_key u_ark (.state_in(state_q), .round_key(round_key), .state_out(ark_out));
  aes_add_round_key u_load (.state_in(data_in), .round_key(round_key), .state_out(load_out));

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state_q <= '0;
    end else begin
      unique case (step)
        STEP_LOAD:  state_q <= load_out;
        STEP_SUB:   state_q <= sub_out;
        STEP_SHIFT: state_q <= shift_out;
        STEP_MIX:   state_q <= mix_out;
        STEP_ARK:   state_q <= ark_out;
        default:    state_q <= state_q;
      endcase
    end
  end

  assign state  = state_q;
  assign result = ark_out;

endmodule
