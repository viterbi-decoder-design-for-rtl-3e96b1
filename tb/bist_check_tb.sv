// bist_check_tb: the self-check circuit fed with bytes built here from the
// 1 + D^14 + D^15 sequence (same seed) and a zero padding byte, with random
// idle clocks and a chosen number of bit errors flipped in, up to all 8 bits of a byte; errors must equal
// the flipped bits, bytes the bytes sent, and done must rise on the last one
// and then ignore further bytes.
module bist_check_tb;
  logic clk = 0, rst_n = 0, start = 0, dec_valid = 0;
  logic [15:0] nbits = 0;
  logic [7:0] dec_bits = 0;
  logic [15:0] errors;
  logic [12:0] bytes;
  logic done;
  int checks = 0, failures = 0;

  bist_check dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int nb, int flip_every, int nflip = 1);
    logic [14:0] q;
    int flips;
    q = 15'h1D2B;
    flips = 0;
    @(negedge clk);
    nbits = 16'(nb); start = 1;
    @(negedge clk);
    start = 0;
    for (int k = 0; k <= nb / 8; k++) begin
      logic [7:0] b;
      for (int i = 0; i < 8; i++) begin
        if (k < nb / 8) begin b[i] = q[13] ^ q[14]; q = {q[13:0], b[i]}; end
        else b[i] = 0;
      end
      if (flip_every > 0 && k % flip_every == 0)
        for (int f = 0; f < nflip; f++) begin b[(k + f) % 8] = ~b[(k + f) % 8]; flips++; end
      while ($urandom_range(0, 2) == 0) @(negedge clk);
      dec_valid = 1; dec_bits = b;
      @(negedge clk);
      dec_valid = 0;
      checks++;
      if (done != (k == nb / 8)) begin failures++; $display("done wrong at byte %0d", k); end
    end
    dec_valid = 1; dec_bits = 8'hFF;
    @(negedge clk);
    dec_valid = 0;
    checks += 2;
    if (int'(errors) != flips) begin failures++; $display("errors %0d exp %0d", errors, flips); end
    if (int'(bytes) != nb / 8 + 1) begin failures++; $display("bytes %0d", bytes); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(64, 0);
    run(320, 3);
    run(800, 7);
    run(8, 1);
    run(160, 2, 3);
    run(64, 1, 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
