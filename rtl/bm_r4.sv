// bm_r4: radix-4 branch metric element. From the six soft values of two
// radix-2 stages it forms the metric of all 64 possible 6-bit reference
// labels, the sum over both stages that a plain radix-4 ACS would add inside
// its loop.
//
// Per coded bit the correlation metric is the soft value itself when the
// reference bit is 1 and 7 minus it when it is 0; a stolen (erased) bit
// contributes 0 to both. The raw sum reaches 42, so the metric is reduced to
// five bits by a common offset: the best label's sum (the sum of the larger
// per-bit metrics) is pulled down to 31 and every label is lowered by the
// same amount, flooring at 0. A common offset changes no ACS decision, only
// labels far below the best one are clipped. Purely combinational.
//
// The metric table, the radix-4 sum moved out of the ACS loop and the 5-bit
// limit follow the document; reading the limit as one common offset per
// radix-4 step is this design's interpretation of it.
module bm_r4
  import vit_pkg::*;
(
  input  soft_t [5:0]          v,
  input  logic  [5:0]          erased,
  output bm_t   [NSTATE-1:0]   bm      // indexed by reference label
);

  localparam int SUMW = 6;

  logic [SUMW-1:0] m1 [6];
  logic [SUMW-1:0] m0 [6];
  logic [SUMW-1:0] best, offset;

  always_comb begin
    best = '0;
    for (int i = 0; i < 6; i++) begin
      m1[i] = erased[i] ? '0 : SUMW'(v[i]);
      m0[i] = erased[i] ? '0 : SUMW'(SOFT_MAX) - SUMW'(v[i]);
      best  = best + ((m1[i] > m0[i]) ? m1[i] : m0[i]);
    end
    offset = (best > SUMW'((1 << BMW) - 1)) ? best - SUMW'((1 << BMW) - 1) : '0;
    for (int l = 0; l < NSTATE; l++) begin
      logic [SUMW-1:0] raw;
      raw = '0;
      for (int i = 0; i < 6; i++) raw = raw + (l[i] ? m1[i] : m0[i]);
      bm[l] = (raw > offset) ? BMW'(raw - offset) : '0;
    end
  end

endmodule
