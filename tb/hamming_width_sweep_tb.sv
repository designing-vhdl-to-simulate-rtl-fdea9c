// hamming_width_sweep_tb: the position-XOR code at every word length from 4
// to 20 data bits.
//
// For each length m, one hamming_codec instance is built with the smallest
// number of Hamming bits n that satisfies 2^n >= m + n + 1 (3 bits for m = 4,
// 4 bits for m = 5..11, 5 bits for m = 12..20; the tb checks this count
// against its own table). For each instance, 300 random words are encoded,
// sent back clean and with every single data-bit error, and the decoded word
// and reported position are compared with the tb's own encoder and error
// model. The instances run one after another from a single process, through
// arrays indexed by m. Combinational design: 1 time unit per vector.
module hamming_width_sweep_tb;
  import hamming_pkg::*;

  localparam int MMIN = 4;
  localparam int MMAX = 20;
  localparam int LMAX = 25;     // 20 data bits + 5 Hamming bits
  localparam int WORDS = 300;

  logic [MMAX-1:0] enc_in   [MMIN:MMAX];
  logic [LMAX-1:0] enc_out  [MMIN:MMAX];
  logic [LMAX-1:0] dec_in   [MMIN:MMAX];
  logic [LMAX-1:0] dec_out  [MMIN:MMAX];
  logic [MMAX-1:0] dec_data [MMIN:MMAX];
  logic [4:0]      err_pos  [MMIN:MMAX];
  logic            err_flag [MMIN:MMAX];

  int checks = 0;
  int failures = 0;

  for (genvar m = MMIN; m <= MMAX; m++) begin : g_len
    localparam int unsigned N = min_ham_bits(m);
    logic [m+N-1:0] eo, dout;
    logic [m-1:0]   dd;
    logic [N-1:0]   ep;

    hamming_codec #(.DATA_BITS(m), .HAM_BITS(N)) dut (
      .enc_in  (enc_in[m][m-1:0]),
      .enc_out (eo),
      .dec_in  (dec_in[m][m+N-1:0]),
      .dec_out (dout),
      .dec_data(dd),
      .err_pos (ep),
      .err_flag(err_flag[m])
    );

    assign enc_out[m]  = LMAX'(eo);
    assign dec_out[m]  = LMAX'(dout);
    assign dec_data[m] = MMAX'(dd);
    assign err_pos[m]  = 5'(ep);
  end

  function automatic int ham_bits_for(input int m);
    if (m <= 4) return 3;
    if (m <= 11) return 4;
    return 5;
  endfunction

  function automatic logic [LMAX-1:0] ref_enc(input int m, input logic [MMAX-1:0] d);
    int n = ham_bits_for(m);
    logic [LMAX-1:0] s = '0;
    int h = 0;
    for (int k = 0; k < m; k++)
      if (d[k]) begin
        h ^= n + 1 + k;
        s[n+k] = 1'b1;
      end
    return s | LMAX'(h);
  endfunction

  task automatic fail(input string what, input int m);
    failures++;
    $display("FAIL m=%0d: %s", m, what);
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MMAX-1:0] d;
    logic [LMAX-1:0] s;
    int n;
    for (int m = MMIN; m <= MMAX; m++) begin
      enc_in[m] = '0;
      dec_in[m] = '0;
    end
    for (int m = MMIN; m <= MMAX; m++) begin
      n = ham_bits_for(m);
      checks++;
      if (min_ham_bits(m) != n) fail("Hamming bit count", m);
      for (int w = 0; w < WORDS; w++) begin
        d = MMAX'($urandom) & ((MMAX'(1) << m) - 1);
        s = ref_enc(m, d);
        enc_in[m] = d;
        for (int p = 0; p <= m; p++) begin
          // p = 0: clean; otherwise data bit p-1 (position n+p) is flipped.
          dec_in[m] = (p == 0) ? s : s ^ (LMAX'(1) << (n + p - 1));
          #1;
          checks++;
          if (enc_out[m] !== s) fail("encoded stream", m);
          if (dec_out[m] !== s || dec_data[m] !== d) fail("corrected stream", m);
          if (err_pos[m] !== 5'((p == 0) ? 0 : n + p) || err_flag[m] !== (p != 0))
            fail("error position", m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
