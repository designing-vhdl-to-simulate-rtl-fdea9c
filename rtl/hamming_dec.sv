// hamming_dec: position-XOR Hamming decoder and single-bit corrector,
// (17,12) by default.
//
// What it does: takes a received data stream laid out as hamming_enc builds
// it (Hamming bits H1..Hn at positions 1..n, data bits at positions
// n+1..n+m, stream bit i = position i+1) and returns the stream with the bit
// that the check points at complemented.
//
// How it works: the received Hamming bits h_in are XORed with the binary
// position number of every received data bit that is 1. The result, err_pos,
// is 0 when the stream is consistent. Otherwise its value, read as a decimal
// number, is the position of the wrong bit, and that bit of the stream is
// inverted. Example: 1001_1001_1000_10111 (position 6 flipped to 0) gives
// err_pos = 6, and the stream is restored.
//
// Limits of the code, kept as they are: a flipped data bit is always
// corrected. A flipped Hamming bit Hj yields err_pos = 2^(j-1); for H1 and H2
// that is their own position and they are corrected, but for H3, H4 and H5
// err_pos points at positions 4, 8 and 16 and a good bit is inverted. Two or
// more flipped bits are not corrected.
//
// Interface: decoder_in / decoder_out are the received and corrected streams,
// err_pos is the check result, err_flag is high when it is nonzero.
// Timing: purely combinational, no clock.
//
// From the design description: the check rule, reading the result as the
// error position, and complementing that bit. This design's own choices: the
// err_pos and err_flag outputs (the description computes err_pos internally),
// and leaving the stream unchanged when err_pos is larger than the stream
// length, which no single-bit error can produce.
module hamming_dec
  import hamming_pkg::*;
#(
  parameter int unsigned DATA_BITS = DATA_BITS_DEFAULT,
  parameter int unsigned HAM_BITS  = HAM_BITS_DEFAULT
) (
  input  logic [DATA_BITS+HAM_BITS-1:0] decoder_in,
  output logic [DATA_BITS+HAM_BITS-1:0] decoder_out,
  output logic [HAM_BITS-1:0]           err_pos,
  output logic                          err_flag
);

  localparam int unsigned N = DATA_BITS + HAM_BITS;

  if (!ham_bits_ok(DATA_BITS, HAM_BITS)) begin : g_bad_width
    $error("hamming_dec: HAM_BITS=%0d too small for DATA_BITS=%0d", HAM_BITS, DATA_BITS);
  end

  logic [HAM_BITS-1:0]  h_in;
  logic [DATA_BITS-1:0] d_in;

  assign h_in = decoder_in[HAM_BITS-1:0];
  assign d_in = decoder_in[N-1:HAM_BITS];

  always_comb begin
    err_pos = h_in;
    for (int unsigned k = 0; k < DATA_BITS; k++) begin
      if (d_in[k]) err_pos ^= HAM_BITS'(HAM_BITS + 1 + k);
    end
  end

  assign err_flag = (err_pos != '0);

  // Complement the bit at position err_pos (stream bit err_pos-1).
  always_comb begin
    decoder_out = decoder_in;
    for (int unsigned p = 1; p <= N; p++) begin
      if (err_pos == HAM_BITS'(p)) decoder_out[p-1] = ~decoder_in[p-1];
    end
  end

endmodule
