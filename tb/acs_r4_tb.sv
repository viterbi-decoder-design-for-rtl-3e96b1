// acs_r4_tb: the radix-4 ACS unit with random metrics in the range the
// overflow prevention guarantees (path metrics 0..127, branch metrics 0..31)
// against a direct computation of the four sums and the first largest one.
module acs_r4_tb;
  import vit_pkg::*;
  pm_t [3:0] pm;
  bm_t [3:0] bm;
  pm_t pm_new;
  logic [1:0] dec;
  int checks = 0, failures = 0;
  int hit [4];

  acs_r4 dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int bs, bi;
      for (int j = 0; j < 4; j++) begin
        pm[j] = 8'($urandom_range(0, 127));
        bm[j] = 5'($urandom);
      end
      #1;
      bi = 0;
      bs = -1;
      for (int j = 0; j < 4; j++)
        if (int'(pm[j]) + int'(bm[j]) > bs) begin bs = int'(pm[j]) + int'(bm[j]); bi = j; end
      hit[bi]++;
      checks++;
      if (int'(pm_new) != bs || int'(dec) != bi) begin
        failures++;
        if (failures < 10) $display("pm=%p bm=%p got %0d/%0d exp %0d/%0d", pm, bm, pm_new, dec, bs, bi);
      end
    end
    for (int j = 0; j < 4; j++) begin checks++; if (hit[j] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
