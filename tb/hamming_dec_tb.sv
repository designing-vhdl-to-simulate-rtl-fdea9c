// hamming_dec_tb: self-checking test of the (17,12) position-XOR decoder.
//
// Checks the worked examples (a clean stream gives position 0; position 6
// flipped gives position 6 and is restored), the single-one streams of the
// reference waveforms (including the miscorrection of H3, H4 and H5), and then
// every data word with no error and with each single-bit error. Expected
// values come from an error model: a data bit at position p yields p, and
// Hamming bit Hj yields 2^(j-1); the tb's own encoder builds the clean streams.
// The decoder is combinational; each vector is read 1 ns after it is applied.
module hamming_dec_tb;
  localparam int unsigned M = 12;
  localparam int unsigned N = 5;
  localparam int unsigned L = M + N;

  logic [L-1:0] din, dout;
  logic [N-1:0] epos;
  logic         eflag;

  int checks = 0;
  int failures = 0;

  hamming_dec dut (.decoder_in(din), .decoder_out(dout), .err_pos(epos), .err_flag(eflag));

  function automatic logic [L-1:0] enc(input logic [M-1:0] d);
    logic [N-1:0] h = '0;
    for (int pos = N + 1; pos <= L; pos++)
      if (d[pos-N-1]) h ^= N'(pos);
    return {d, h};
  endfunction

  task automatic check(input logic [L-1:0] s, input logic [L-1:0] exp_out,
                       input int exp_pos, input string what);
    din = s;
    #1;
    checks++;
    if (dout !== exp_out || epos !== N'(exp_pos) || eflag !== (exp_pos != 0)) begin
      failures++;
      $display("FAIL %s: in=%b out=%b pos=%0d flag=%b, expected out=%b pos=%0d",
               what, s, dout, epos, eflag, exp_out, exp_pos);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [L-1:0] s, r, e;
    int syn;
    // Worked examples.
    check(17'b1001_1001_1001_10111, 17'b1001_1001_1001_10111, 0, "clean example");
    check(17'b1001_1001_1000_10111, 17'b1001_1001_1001_10111, 6, "bit 6 flipped");
    // Single-one streams from the reference waveforms.
    check(17'b0000_0000_0000_00001, 17'b0, 1, "H1 only");
    check(17'b0000_0000_0000_00010, 17'b0, 2, "H2 only");
    check(17'b0000_0000_0000_00100, 17'b0000_0000_0000_01100, 4, "H3 only");
    check(17'b0000_0000_0000_01000, 17'b0000_0000_0100_01000, 8, "H4 only");
    check(17'b0000_0000_0000_10000, 17'b0100_0000_0000_10000, 16, "H5 only");
    // Every word, clean and with each single-bit error.
    for (int w = 0; w < (1 << M); w++) begin
      s = enc(M'(w));
      check(s, s, 0, "clean");
      for (int p = 1; p <= L; p++) begin
        r = s ^ (L'(1) << (p - 1));
        if (p > N) begin
          check(r, s, p, "data bit error");
        end else begin
          syn = 1 << (p - 1);
          e = r ^ (L'(1) << (syn - 1));   // the decoder inverts position syn
          check(r, e, syn, "Hamming bit error");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
