// aes_top: AES-128 encryption and decryption system with the pin list of
// the design.
//
// A 128-bit block and a 128-bit key enter on Data_in and key_in. With
// encrypt high, a rising key_valid_in starts an encryption; cipher_text
// holds the result and valid_out_en rises 40 cycles after the encryptor
// accepts the block (41 after the request edge, the mode register adds
// one). With encrypt low, a rising key_valid_in1 makes the decryptor load
// key_in, expand it (40 cycles) and then decrypt the encryptor's current
// output cipher_text (40 cycles); plain_text and valid_out_de then hold the
// result. As in the design's structure diagram the decryptor's data input is
// wired to the encryptor's output, so the system round-trips a block: encrypt
// it, then decrypt it back, and the two results can be compared.
//
// Blocks: aes_mode_select (mode multiplexers and request registers),
// aes_encrypt and aes_decrypt, each with its own aes_round datapath,
// aes_round_ctrl sequencer and aes_key_expansion key schedule. Both cores
// keep their last result and valid flag until their next operation starts.
// reset is asynchronous, active high, and clears every register.
module aes_top
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   encrypt,
  input  logic   key_valid_in,
  input  logic   key_valid_in1,
  input  block_t Data_in,
  input  block_t key_in,
  output logic   valid_out_en,
  output block_t cipher_text,
  output logic   valid_out_de,
  output block_t plain_text
);

  logic enc_data_valid;
  logic enc_key_valid;
  logic dec_data_valid;
  logic dec_key_valid;

  aes_mode_select u_mode (
    .clk, .reset, .encrypt, .key_valid_in, .key_valid_in1,
    .enc_data_valid, .enc_key_valid, .dec_data_valid, .dec_key_valid
  );

  aes_encrypt u0 (
    .clk, .reset,
    .data_valid_in(enc_data_valid),
    .key_valid_in (enc_key_valid),
    .Data_in      (Data_in),
    .key_in       (key_in),
    .valid_out    (valid_out_en),
    .cipher_out   (cipher_text)
  );

  aes_decrypt u1 (
    .clk, .reset,
    .data_valid_in(dec_data_valid),
    .key_valid_in (dec_key_valid),
    .Data_in      (cipher_text),
    .key_in       (key_in),
    .valid_out    (valid_out_de),
    .cipher_out   (plain_text)
  );

endmodule
