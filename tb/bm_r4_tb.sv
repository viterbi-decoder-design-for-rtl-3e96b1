// bm_r4_tb: random soft values and erasure patterns into the radix-4 branch
// metric element; all 64 label metrics are compared with a direct model of
// the correlation table, the erasure rule and the common-offset reduction to
// five bits. Includes the all-strong case where the offset is largest.
module bm_r4_tb;
  import vit_pkg::*;

  soft_t [5:0] v;
  logic  [5:0] erased;
  bm_t   [63:0] bm;
  int checks = 0, failures = 0;

  bm_r4 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int best, off;
      for (int i = 0; i < 6; i++) begin
        v[i] = (t < 10) ? ((t % 2) ? 3'd7 : 3'd0) : 3'($urandom);
        erased[i] = (t < 10) ? 1'b0 : ($urandom_range(0, 4) == 0);
      end
      #1;
      best = 0;
      for (int i = 0; i < 6; i++)
        if (!erased[i]) best += (v[i] >= 4) ? int'(v[i]) : 7 - int'(v[i]);
      off = (best > 31) ? best - 31 : 0;
      for (int l = 0; l < 64; l++) begin
        int raw, e;
        raw = 0;
        for (int i = 0; i < 6; i++)
          if (!erased[i]) raw += ((l >> i) & 1) ? int'(v[i]) : 7 - int'(v[i]);
        e = raw - off;
        if (e < 0) e = 0;
        checks++;
        if (int'(bm[l]) != e) begin
          failures++;
          if (failures < 10) $display("t=%0d label %0d got %0d exp %0d", t, l, bm[l], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
