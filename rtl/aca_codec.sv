// ACA1 codec: an ACA1 encoder and an ACA1 decoder side by side.
//
// The method codes binary images (or any binary source) two symbols at a
// time: the second of two more-probable symbols is not coded at all, a flag
// decision is coded where that would leave the decoder in doubt, and the
// code register is only moved on the less-probable-symbol path, so most
// symbols cost one subtraction. The encoder and the decoder each have their
// own look-up tables (context memory, Q table, adaptation) and context
// register and share nothing but the clock and reset; the published block
// diagram is the same for both directions.
//
// Encoder ports (enc_*): two symbols per in_valid/in_ready handshake, code
// bytes out on code/buf_full/ack. Decoder ports (dec_*): start with the
// number of windows, code bytes in with valid/ready, symbols out with
// valid/ready, done after the last symbol. A code stream must be decoded
// from the same reset state the encoder started from: reset both, encode,
// and decode. After reset each side spends 1026 cycles clearing its
// context memory.
module aca_codec (
  input  logic        clk,
  input  logic        rst_n,
  // encoder
  input  logic        enc_in_valid,
  output logic        enc_in_ready,
  input  logic        enc_sym1,
  input  logic        enc_sym2,
  input  logic        enc_in_last,
  output logic [7:0]  enc_code,
  output logic        enc_buf_full,
  input  logic        enc_ack,
  output logic        enc_done,
  // decoder
  input  logic        dec_start,
  input  logic [31:0] dec_n_windows,
  output logic        dec_done,
  input  logic        dec_code_valid,
  output logic        dec_code_ready,
  input  logic [7:0]  dec_code_byte,
  output logic        dec_out_valid,
  input  logic        dec_out_ready,
  output logic        dec_out_sym
);

  aca_encoder u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (enc_in_valid),
    .in_ready (enc_in_ready),
    .sym1     (enc_sym1),
    .sym2     (enc_sym2),
    .in_last  (enc_in_last),
    .code     (enc_code),
    .buf_full (enc_buf_full),
    .ack      (enc_ack),
    .done     (enc_done)
  );

  aca_decoder u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (dec_start),
    .n_windows  (dec_n_windows),
    .done       (dec_done),
    .code_valid (dec_code_valid),
    .code_ready (dec_code_ready),
    .code_byte  (dec_code_byte),
    .out_valid  (dec_out_valid),
    .out_ready  (dec_out_ready),
    .out_sym    (dec_out_sym)
  );

endmodule
