// ovf_prev: path metric overflow prevention element for the 64 states. When
// any metric has reached THRESH every metric is lowered by SUB, and metrics
// already below SUB become 0; otherwise the metrics pass unchanged.
// Combinational; ovf reports that the subtraction was applied.
//
// Applied after each radix-4 step, with the defaults (THRESH = 128, SUB = 64
// for 8-bit metrics) it keeps every metric at or below 127 before an add, and
// 127 + 31 still fits in 8 bits. SUB must be at least 31, the largest branch
// metric, so the metrics cannot run away.
//
// The rule (subtract when one metric overflows, clamp what falls below to
// zero; with THRESH = 64 and SUB = 32, 70,40,33,10 become 38,8,1,0) follows
// the document, which uses 7-bit metrics. The 8-bit default is this
// design's; see vit_pkg.
module ovf_prev
  import vit_pkg::*;
#(
  parameter int THRESH = 1 << (PMW - 1),
  parameter int SUB    = THRESH / 2
) (
  input  pm_t [NSTATE-1:0] pm_in,
  output pm_t [NSTATE-1:0] pm_out,
  output logic             ovf
);

  always_comb begin
    ovf = 1'b0;
    for (int s = 0; s < NSTATE; s++) ovf = ovf | (int'(pm_in[s]) >= THRESH);
    for (int s = 0; s < NSTATE; s++)
      pm_out[s] = !ovf ? pm_in[s] :
                  (pm_in[s] >= PMW'(SUB)) ? pm_in[s] - PMW'(SUB) : '0;
  end

endmodule
