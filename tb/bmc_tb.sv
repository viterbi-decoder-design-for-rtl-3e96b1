// bmc_tb: random depunctured words into the branch metric unit; one clock
// later both metric sets must equal a model of the correlation metric with
// erasures and common-offset reduction, the first from slots 0..5 and the
// second from slots 6..11. out_valid must follow in_valid by one clock.
module bmc_tb;
  import vit_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0;
  dp_word_t in_word = '0;
  logic out_valid;
  bm_t [63:0] bm1, bm2;
  int checks = 0, failures = 0;

  bmc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_bm(dp_word_t w, int base, int l);
    int best, raw, off;
    best = 0; raw = 0;
    for (int i = 0; i < 6; i++) if (!w.erased[base + i]) begin
      int one, zero;
      one = int'(w.v[base + i]); zero = 7 - one;
      best += (one > zero) ? one : zero;
      raw  += ((l >> i) & 1) ? one : zero;
    end
    off = (best > 31) ? best - 31 : 0;
    return (raw > off) ? raw - off : 0;
  endfunction

  initial begin
    dp_word_t w;
    logic v;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int i = 0; i < 12; i++) begin
        in_word.v[i] = soft_t'($urandom);
        in_word.erased[i] = ($urandom_range(0, 3) == 0);
      end
      in_valid = ($urandom_range(0, 3) != 0);
      w = in_word; v = in_valid;
      @(negedge clk);
      checks++;
      if (out_valid != v) failures++;
      if (v) for (int l = 0; l < 64; l++) begin
        checks += 2;
        if (int'(bm1[l]) != ref_bm(w, 0, l)) failures++;
        if (int'(bm2[l]) != ref_bm(w, 6, l)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
