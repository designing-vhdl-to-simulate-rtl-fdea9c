// hamming_enc_tb: self-checking test of the (17,12) position-XOR encoder.
//
// Checks the worked example (data 1001_1001_1001 -> Hamming bits 10111),
// the walking-one words of the reference waveforms, and then all 4096 data
// words against a reference that builds each Hamming bit as the parity of the
// data bits whose position number has that bit set (a column-wise view of the
// same code, written independently of the encoder's row-wise XOR loop).
// The encoder is combinational; each vector is applied and read 1 ns later.
module hamming_enc_tb;
  localparam int unsigned M = 12;
  localparam int unsigned N = 5;

  logic [M-1:0]   din;
  logic [M+N-1:0] dout;

  int checks = 0;
  int failures = 0;

  hamming_enc dut (.encoder_in(din), .encoder_out(dout));

  function automatic logic [M+N-1:0] ref_stream(input logic [M-1:0] d);
    logic [N-1:0] h;
    for (int j = 0; j < N; j++) begin
      h[j] = 1'b0;
      for (int pos = N + 1; pos <= M + N; pos++)
        if (((pos >> j) & 1) == 1) h[j] ^= d[pos-N-1];
    end
    return {d, h};
  endfunction

  task automatic check(input logic [M-1:0] d, input logic [M+N-1:0] exp, input string what);
    din = d;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: data=%b got %b expected %b", what, d, dout, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: stream 1001_1001_1001_10111.
    check(12'b1001_1001_1001, 17'b1001_1001_1001_10111, "worked example");
    // Walking-one words from the reference waveforms.
    check(12'b0000_0000_0001, 17'b0000_0000_0001_00110, "D1");
    check(12'b0000_0000_0010, 17'b0000_0000_0010_00111, "D2");
    check(12'b0000_0000_0100, 17'b0000_0000_0100_01000, "D3");
    check(12'b0000_0000_1000, 17'b0000_0000_1000_01001, "D4");
    check(12'b0000_0001_0000, 17'b0000_0001_0000_01010, "D5");
    check(12'b1000_0000_0000, 17'b1000_0000_0000_10001, "D12");
    for (int w = 0; w < (1 << M); w++)
      check(M'(w), ref_stream(M'(w)), "exhaustive");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
