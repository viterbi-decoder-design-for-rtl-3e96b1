// bmc: branch metric computation for one clock of the two-stage radix-4
// decoder. The depunctured 12-slot word holds two radix-4 steps; slots 0..5
// feed the first bm_r4 element and slots 6..11 the second. Both sets of 64
// label metrics are registered, so the unit adds one clock of latency and
// accepts a word every clock.
//
// Two radix-4 metric elements per clock follow from the document's
// two-stage radix-4 ACS; the register at the output is this design's
// pipeline choice.
module bmc
  import vit_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 in_valid,
  input  dp_word_t             in_word,
  output logic                 out_valid,
  output bm_t [NSTATE-1:0]     bm1,   // first radix-4 step
  output bm_t [NSTATE-1:0]     bm2    // second radix-4 step
);

  bm_t [NSTATE-1:0] bm1_d, bm2_d;

  bm_r4 u_bm1 (.v(in_word.v[5:0]),  .erased(in_word.erased[5:0]),  .bm(bm1_d));
  bm_r4 u_bm2 (.v(in_word.v[11:6]), .erased(in_word.erased[11:6]), .bm(bm2_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      bm1       <= '0;
      bm2       <= '0;
    end else begin
      out_valid <= in_valid && !clr;
      if (in_valid) begin
        bm1 <= bm1_d;
        bm2 <= bm2_d;
      end
    end
  end

endmodule
