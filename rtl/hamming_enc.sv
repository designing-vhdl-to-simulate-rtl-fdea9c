// hamming_enc: position-XOR Hamming encoder, (17,12) by default.
//
// What it does: takes a DATA_BITS-wide word and returns the data stream that
// is sent, DATA_BITS + HAM_BITS wide. Stream bit i (0-based) is stream
// position i+1. Data bit D(k+1) = encoder_in[k] sits at position
// HAM_BITS+1+k; Hamming bit H(j+1) sits at position j+1, so
//   encoder_out = {encoder_in, hcode}.
// For the default: positions 17..6 hold D12..D1 and positions 5..1 hold H5..H1.
//
// How it works: hcode is the XOR of the binary position numbers of all data
// bits that are 1 (a data bit that is 0 contributes nothing). Example:
// data 1001_1001_1001 has ones at positions 6, 9, 10, 13, 14 and 17, whose
// XOR is 10111, so the stream is 1001_1001_1001_10111.
//
// The code is systematic: the upper DATA_BITS stream bits are the data bits
// wired straight through, and only the HAM_BITS low bits are logic.
//
// Timing: purely combinational, no clock; the stream is valid one
// propagation delay after the data.
//
// From the design description: the bit layout, the position-XOR rule and the
// (12, 5) default. This design's own choices: the parameter names, and an
// elaboration check that the two widths satisfy 2^n >= m + n + 1.
module hamming_enc
  import hamming_pkg::*;
#(
  parameter int unsigned DATA_BITS = DATA_BITS_DEFAULT,
  parameter int unsigned HAM_BITS  = HAM_BITS_DEFAULT
) (
  input  logic [DATA_BITS-1:0]          encoder_in,
  output logic [DATA_BITS+HAM_BITS-1:0] encoder_out
);

  if (!ham_bits_ok(DATA_BITS, HAM_BITS)) begin : g_bad_width
    $error("hamming_enc: HAM_BITS=%0d too small for DATA_BITS=%0d", HAM_BITS, DATA_BITS);
  end

  logic [HAM_BITS-1:0] hcode;

  always_comb begin
    hcode = '0;
    for (int unsigned k = 0; k < DATA_BITS; k++) begin
      if (encoder_in[k]) hcode ^= HAM_BITS'(HAM_BITS + 1 + k);
    end
  end

  assign encoder_out = {encoder_in, hcode};

endmodule
