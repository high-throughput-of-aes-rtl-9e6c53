// aes_mode_select: the mode multiplexers and valid registers in front of
// the two cores (encrypt1, encrypt2, decrypt1 and decrypt2 of the system
// schematic).
//
// The encrypt input selects which core a request goes to. While encrypt is
// high the encryptor sees it: its data request is encrypt itself and its key
// request is key_valid_in. While encrypt is low the decryptor sees
// key_valid_in1 as both its key and its data request. Each multiplexer
// output is registered, and each core receives a one-cycle pulse in the
// first cycle its registered request is high, so a request level that is
// held high starts exactly one operation. A request presented before a clock
// edge reaches its core as a pulse right after that edge.
//
// The four registers, their multiplexers and the selection by encrypt are
// those of the schematic; the rising-edge pulses and which input feeds
// each multiplexer are this design's reading of it. reset is asynchronous
// and active high.
module aes_mode_select (
  input  logic clk,
  input  logic reset,
  input  logic encrypt,
  input  logic key_valid_in,    // key request, encryption side
  input  logic key_valid_in1,   // key and data request, decryption side
  output logic enc_data_valid,  // pulses to aes_encrypt
  output logic enc_key_valid,
  output logic dec_data_valid,  // pulses to aes_decrypt
  output logic dec_key_valid
);

  typedef struct packed {
    logic enc_data;   // encrypt1
    logic enc_key;    // encrypt2
    logic dec_data;   // decrypt1
    logic dec_key;    // decrypt2
  } req_t;

  req_t mux_d;
  req_t req_q;
  req_t req_prev;

  always_comb begin
    mux_d.enc_data = encrypt ? 1'b1         : 1'b0;
    mux_d.enc_key  = encrypt ? key_valid_in : 1'b0;
    mux_d.dec_data = encrypt ? 1'b0         : key_valid_in1;
    mux_d.dec_key  = encrypt ? 1'b0         : key_valid_in1;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      req_q    <= '0;
      req_prev <= '0;
    end else begin
      req_q    <= mux_d;
      req_prev <= req_q;
    end
  end

  req_t pulse;
  assign pulse = req_q & ~req_prev;

  assign enc_data_valid = pulse.enc_data;
  assign enc_key_valid  = pulse.enc_key;
  assign dec_data_valid = pulse.dec_data;
  assign dec_key_valid  = pulse.dec_key;

  a_one_side : assert property (@(posedge clk) disable iff (reset)
    !((enc_data_valid || enc_key_valid) && (dec_data_valid || dec_key_valid)));

endmodule
