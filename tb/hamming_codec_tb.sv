// hamming_codec_tb: end-to-end test of the (17,12) codec at its default size.
//
// A free-running clock paces the stimulus: one vector per cycle, applied on
// the falling edge and checked on the rising edge (the codec itself is
// combinational). Three phases:
//   1. a walking one on enc_in and on dec_in (a ring generator, as in the
//      reference waveforms), checked against fixed expected streams;
//   2. loopback of every 12-bit word through enc_out -> dec_in with no error
//      and with each of the 17 single-bit errors;
//   3. 2000 random double-bit errors.
// Expected values come from the tb's own encoder and error model, not from
// the design. It counts how often each case occurred: clean stream, data bit
// corrected, Hamming bit corrected (H1, H2), Hamming bit that makes the
// decoder invert another bit (H3..H5), and a double error whose check points
// at an existing position (a wrong bit is inverted) or past the end of the
// stream or to 0 (nothing is inverted). A case that never occurs is a
// failure. Runs at the default parameters: no parameter is overridden.
module hamming_codec_tb;

  localparam int unsigned M = 12;
  localparam int unsigned N = 5;
  localparam int unsigned L = M + N;
  localparam int unsigned MAX_CYCLES = 200_000;

  logic clk;
  logic [M-1:0] enc_in = '0;
  logic [L-1:0] enc_out, dec_in = '0, dec_out;
  logic [M-1:0] dec_data;
  logic [N-1:0] err_pos;
  logic         err_flag;

  int checks = 0;
  int failures = 0;
  int cycles;
  int n_clean = 0, n_data_fix = 0, n_ham_fix = 0, n_ham_miss = 0;
  int n_double_in = 0, n_double_out = 0;

  hamming_codec dut (.*);

  initial begin : clock
    clk = 1'b0;
    cycles = 0;
    forever begin
      #5 clk = 1'b1;
      cycles++;
      #5 clk = 1'b0;
    end
  end

  function automatic logic [L-1:0] ref_enc(input logic [M-1:0] d);
    logic [N-1:0] h = '0;
    for (int pos = N + 1; pos <= L; pos++)
      if (d[pos-N-1]) h ^= N'(pos);
    return {d, h};
  endfunction

  // What a flipped bit at position p adds to the check: a data bit adds its
  // position number, Hamming bit Hj adds its own weight 2^(j-1).
  function automatic int contrib(input int p);
    return (p > N) ? p : (1 << (p - 1));
  endfunction

  // Apply one vector, wait for the checking edge, compare every output.
  task automatic step(input logic [M-1:0] d, input logic [L-1:0] r,
                      input logic [L-1:0] exp_enc, input logic [L-1:0] exp_dec,
                      input int exp_pos, input string what);
    @(negedge clk);
    enc_in = d;
    dec_in = r;
    @(posedge clk);
    checks++;
    if (enc_out !== exp_enc || dec_out !== exp_dec || dec_data !== exp_dec[L-1:N] ||
        err_pos !== N'(exp_pos) || err_flag !== (exp_pos != 0)) begin
      failures++;
      $display("FAIL %s: enc_in=%b enc_out=%b dec_in=%b dec_out=%b pos=%0d (exp enc %b dec %b pos %0d)",
               what, d, enc_out, r, dec_out, err_pos, exp_enc, exp_dec, exp_pos);
    end
  endtask

  task automatic need(input int count, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL case never exercised: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] s, r, e;
    int p1, p2, syn;

    // Phase 1: walking one. enc_in: D1..D12 gives Hamming bits = position.
    // dec_in: a lone one at position p gives err_pos p for data positions.
    for (int k = 0; k < M; k++) begin
      s = {M'(1) << k, N'(N + 1 + k)};
      r = L'(1) << (N + k);
      step(M'(1) << k, r, s, '0, N + 1 + k, "walking one");
    end

    // Phase 2: every word, clean and with each single-bit error.
    for (int w = 0; w < (1 << M); w++) begin
      s = ref_enc(M'(w));
      for (int p = 0; p <= L; p++) begin
        if (p == 0) begin
          step(M'(w), s, s, s, 0, "clean");
          n_clean++;
        end else begin
          r = s ^ (L'(1) << (p - 1));
          if (p > N) begin
            step(M'(w), r, s, s, p, "data bit error");
            n_data_fix++;
          end else begin
            syn = 1 << (p - 1);
            e = r ^ (L'(1) << (syn - 1));
            step(M'(w), r, s, e, syn, "Hamming bit error");
            if (syn == p) n_ham_fix++;
            else n_ham_miss++;
          end
        end
      end
    end

    // Phase 3: double errors; the decoder inverts the position the check
    // points at if that position exists. Data bit 8 with H4, or data bit 16
    // with H5, cancel out and go unnoticed.
    for (int i = 0; i < 2000; i++) begin
      s = ref_enc(M'($urandom));
      p1 = 1 + ($urandom % L);
      do p2 = 1 + ($urandom % L); while (p2 == p1);
      r = s ^ (L'(1) << (p1 - 1)) ^ (L'(1) << (p2 - 1));
      syn = contrib(p1) ^ contrib(p2);
      if (syn != 0 && syn <= L) begin
        e = r ^ (L'(1) << (syn - 1));
        n_double_in++;
      end else begin
        e = r;
        n_double_out++;
      end
      step(s[L-1:N], r, s, e, syn, "double error");
    end

    // The worked example: 1001_1001_1001, then position 6 flipped in transit.
    s = 17'b1001_1001_1001_10111;
    step(12'b1001_1001_1001, s, s, s, 0, "example clean");
    step(12'b1001_1001_1001, s ^ 17'd32, s, s, 6, "example bit 6");

    need(n_clean, "clean stream");
    need(n_data_fix, "data bit corrected");
    need(n_ham_fix, "Hamming bit corrected");
    need(n_ham_miss, "Hamming bit error moved to another position");
    need(n_double_in, "double error, position in range");
    need(n_double_out, "double error, position out of range or cancelled");
    $display("cases: clean=%0d data_fixed=%0d ham_fixed=%0d ham_moved=%0d double_in=%0d double_out=%0d cycles=%0d",
             n_clean, n_data_fix, n_ham_fix, n_ham_miss, n_double_in, n_double_out, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
