// hamming_codec: the two ends of a link protected by the (17,12)
// position-XOR Hamming code.
//
// What it does: the sending end encodes a 12-bit word into a 17-bit data
// stream (hamming_enc); the receiving end checks a 17-bit received stream,
// reports the error position and returns the corrected stream and the 12 data
// bits it carries (hamming_dec). The link itself (modems and transmission
// media) is not part of the design: enc_out leaves the block and dec_in
// comes back into it, so a testbench or the surrounding system can connect
// them directly or flip bits on the way.
//
// Interface:
//   enc_in   [DATA_BITS-1:0]           word to send
//   enc_out  [DATA_BITS+HAM_BITS-1:0]  stream to send, {data, H}
//   dec_in   [DATA_BITS+HAM_BITS-1:0]  stream received
//   dec_out  [DATA_BITS+HAM_BITS-1:0]  received stream after correction
//   dec_data [DATA_BITS-1:0]           data bits of dec_out
//   err_pos  [HAM_BITS-1:0]            position of the wrong bit, 0 = none
//   err_flag                           err_pos is nonzero
// Timing: combinational from input to output on both sides, no clock.
//
// From the design description: the two instances and their default sizes.
// This design's own choices: the dec_data, err_pos and err_flag ports.
module hamming_codec
  import hamming_pkg::*;
#(
  parameter int unsigned DATA_BITS = DATA_BITS_DEFAULT,
  parameter int unsigned HAM_BITS  = HAM_BITS_DEFAULT
) (
  input  logic [DATA_BITS-1:0]          enc_in,
  output logic [DATA_BITS+HAM_BITS-1:0] enc_out,
  input  logic [DATA_BITS+HAM_BITS-1:0] dec_in,
  output logic [DATA_BITS+HAM_BITS-1:0] dec_out,
  output logic [DATA_BITS-1:0]          dec_data,
  output logic [HAM_BITS-1:0]           err_pos,
  output logic                          err_flag
);

  hamming_enc #(
    .DATA_BITS(DATA_BITS),
    .HAM_BITS (HAM_BITS)
  ) encoding (
    .encoder_in (enc_in),
    .encoder_out(enc_out)
  );

  hamming_dec #(
    .DATA_BITS(DATA_BITS),
    .HAM_BITS (HAM_BITS)
  ) decoding (
    .decoder_in (dec_in),
    .decoder_out(dec_out),
    .err_pos    (err_pos),
    .err_flag   (err_flag)
  );

  assign dec_data = dec_out[DATA_BITS+HAM_BITS-1:HAM_BITS];

endmodule
