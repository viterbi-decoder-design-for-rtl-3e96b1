// acs_r4: modified radix-4 add-compare-select unit. It adds each of the four
// predecessor path metrics to the branch metric of its radix-4 branch (the
// two radix-2 metrics were already summed in the branch metric unit, so only
// one adder sits in the loop) and keeps the largest sum through the
// arithmetic compare-select. Larger metrics are better: the branch metric is
// a correlation. The 2-bit decision is the number j of the surviving
// predecessor {j, s[5:2]}. Combinational.
//
// The adder count and the arithmetic CS follow the document. The sums are
// PMW bits wide with no carry out: the overflow prevention in the ACS array
// keeps every metric at or below 127 before the add, and 127 + 31 fits in
// the 8-bit default width.
module acs_r4
  import vit_pkg::*;
(
  input  pm_t [3:0] pm,
  input  bm_t [3:0] bm,
  output pm_t       pm_new,
  output logic [1:0] dec
);

  pm_t [3:0] sum;

  always_comb
    for (int j = 0; j < 4; j++) sum[j] = pm[j] + PMW'(bm[j]);

  arith_cs4 #(.W(PMW)) u_cs (.v(sum), .sel(dec), .vmax(pm_new));

endmodule
