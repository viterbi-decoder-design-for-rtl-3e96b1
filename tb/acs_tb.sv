// acs_tb: the 64-state two-stage radix-4 ACS array against a behavioural
// model written here. The model enumerates, for each new state, its four
// predecessors, derives each branch label by running the encoder shift
// register over the two information bits, adds, keeps the first largest sum,
// applies the overflow rule, and repeats for the second step. Random branch
// metrics (some clocks idle) are driven for many clocks; metrics and both
// decision sets are compared every valid clock, and overflow prevention
// must have been exercised.
module acs_tb;
  import vit_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0;
  bm_t [63:0] bm1 = '0, bm2 = '0;
  logic out_valid, ovf_evt;
  logic [63:0][1:0] dec1, dec2;
  pm_t [63:0] pm;
  int checks = 0, failures = 0, n_ovf = 0;

  acs dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mpm [64];

  function automatic logic [2:0] enc(logic [6:0] d);
    return {d[0] ^ d[1] ^ d[2] ^ d[3] ^ d[4] ^ d[6],
            d[0] ^ d[1] ^ d[4] ^ d[5],
            d[0] ^ d[2] ^ d[3] ^ d[5] ^ d[6]};
  endfunction

  // Label of the branch pred -> s: bits of the first stage in [2:0].
  function automatic int label(int pred, int s);
    logic [7:0] h;   // h[7] oldest ... h[0] = u2
    h = {8'(pred) << 2} | 8'(s & 3);
    return int'({enc(h[6:0]), enc(h[7:1])});
  endfunction

  task automatic model_step(bm_t [63:0] b, ref int d [64]);
    int np [64];
    bit any;
    any = 0;
    for (int s = 0; s < 64; s++) begin
      int best;
      best = -1;
      for (int j = 0; j < 4; j++) begin
        int p, c;
        p = j * 16 + s / 4;
        c = mpm[p] + int'(b[label(p, s)]);
        if (c > best) begin best = c; d[s] = j; end
      end
      np[s] = best;
      if (best >= 128) any = 1;
    end
    for (int s = 0; s < 64; s++) mpm[s] = any ? ((np[s] >= 64) ? np[s] - 64 : 0) : np[s];
  endtask

  initial begin
    int d1 [64], d2 [64];
    logic v;
    for (int s = 0; s < 64; s++) mpm[s] = (s == 0) ? 127 : 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      for (int l = 0; l < 64; l++) begin bm1[l] = 5'($urandom); bm2[l] = 5'($urandom); end
      in_valid = ($urandom_range(0, 5) != 0);
      v = in_valid;
      if (v) begin model_step(bm1, d1); model_step(bm2, d2); end
      @(negedge clk);
      in_valid = 0;
      if (ovf_evt) n_ovf++;
      checks++;
      if (out_valid != v) failures++;
      for (int s = 0; s < 64; s++) begin
        checks++;
        if (int'(pm[s]) != mpm[s]) begin
          failures++;
          if (failures < 10) $display("t=%0d state %0d pm %0d exp %0d", t, s, pm[s], mpm[s]);
        end
        if (v) begin
          checks += 2;
          if (int'(dec1[s]) != d1[s]) failures++;
          if (int'(dec2[s]) != d2[s]) failures++;
        end
      end
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("overflow prevention never applied"); end
    $display("overflow events %0d", n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
