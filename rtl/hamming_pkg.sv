// hamming_pkg: constants and elaboration-time helpers shared by the
// position-XOR Hamming encoder and decoder.
//
// The code places the m data bits of a word at stream positions n+1 .. n+m
// and the n Hamming bits H1..Hn at positions 1..n. The Hamming bits are the
// XOR of the binary position numbers of every data bit that is 1. The number
// of Hamming bits is the smallest n that satisfies 2^n >= m + n + 1, so that
// every position of the stream, and the value 0 for "no error", can be told
// apart by an n-bit number.
//
// The default configuration, 12 data bits and 5 Hamming bits, is the
// (17,12) code the design is built around. min_ham_bits() evaluates the rule
// above for other word lengths (the code is meant for words of 4 to 20 bits).
package hamming_pkg;

  localparam int unsigned DATA_BITS_DEFAULT = 12;
  localparam int unsigned HAM_BITS_DEFAULT  = 5;

  // Smallest n with 2^n >= m + n + 1.
  function automatic int unsigned min_ham_bits(input int unsigned m);
    int unsigned n;
    n = 1;
    while ((64'd1 << n) < 64'(m) + 64'(n) + 64'd1) n++;
    return n;
  endfunction

  // True when n Hamming bits can address every position of an (m+n)-bit stream.
  function automatic bit ham_bits_ok(input int unsigned m, input int unsigned n);
    return (64'd1 << n) >= 64'(m) + 64'(n) + 64'd1;
  endfunction

endpackage
