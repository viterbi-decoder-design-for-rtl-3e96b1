// acs: two-stage radix-4 add-compare-select array for the 64-state trellis.
// Each clock it advances the path metrics by four radix-2 stages: 64 acs_r4
// units use the first step's branch metrics, an overflow prevention element
// renormalises, a second rank of 64 units uses the second step's metrics and
// a second element renormalises before the metrics are registered. The
// 2-bit decisions of both steps (128 + 128 bits) are registered with the
// metrics and go to the survivor registers.
//
// Interface: bm1/bm2 with in_valid each clock; dec1 (older step) and dec2
// come out one clock later with out_valid. On reset or clr state 0 starts at
// PM_INIT (127) and the other states at 0, because the encoder starts in
// state 0.
//
// The two-stage radix-4 structure and the overflow rule follow the document.
// The start metrics and renormalising after each radix-4 step are this
// design's choices.
module acs
  import vit_pkg::*;
#(
  parameter int PM_INIT = (1 << (PMW - 1)) - 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  input  logic                  in_valid,
  input  bm_t  [NSTATE-1:0]     bm1,
  input  bm_t  [NSTATE-1:0]     bm2,
  output logic                  out_valid,
  output logic [NSTATE-1:0][1:0] dec1,
  output logic [NSTATE-1:0][1:0] dec2,
  output logic                  ovf_evt,
  output pm_t  [NSTATE-1:0]     pm
);

  pm_t [NSTATE-1:0] pm_a, pm_a_n, pm_b, pm_b_n;
  logic [NSTATE-1:0][1:0] dec_a, dec_b;
  logic ovf_a, ovf_b;

  for (genvar s = 0; s < NSTATE; s++) begin : g_st
    pm_t [3:0] pa, pb;
    bm_t [3:0] ba, bb;
    for (genvar j = 0; j < 4; j++) begin : g_pred
      localparam int PRED = j * 16 + s / 4;
      localparam logic [5:0] LAB = r4_label(s, j);
      assign pa[j] = pm[PRED];
      assign ba[j] = bm1[LAB];
      assign pb[j] = pm_a_n[PRED];
      assign bb[j] = bm2[LAB];
    end
    acs_r4 u_a (.pm(pa), .bm(ba), .pm_new(pm_a[s]), .dec(dec_a[s]));
    acs_r4 u_b (.pm(pb), .bm(bb), .pm_new(pm_b[s]), .dec(dec_b[s]));
  end

  ovf_prev u_ovf_a (.pm_in(pm_a), .pm_out(pm_a_n), .ovf(ovf_a));
  ovf_prev u_ovf_b (.pm_in(pm_b), .pm_out(pm_b_n), .ovf(ovf_b));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSTATE; s++) pm[s] <= (s == 0) ? PMW'(PM_INIT) : '0;
      out_valid <= 1'b0;
      ovf_evt   <= 1'b0;
      dec1      <= '0;
      dec2      <= '0;
    end else if (clr) begin
      for (int s = 0; s < NSTATE; s++) pm[s] <= (s == 0) ? PMW'(PM_INIT) : '0;
      out_valid <= 1'b0;
      ovf_evt   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      ovf_evt   <= in_valid && (ovf_a || ovf_b);
      if (in_valid) begin
        pm   <= pm_b_n;
        dec1 <= dec_a;
        dec2 <= dec_b;
      end
    end
  end

endmodule
