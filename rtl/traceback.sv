// traceback: two-clock combinational traceback over the survivor registers,
// yielding 8 decoded bits per traceback, i.e. 4 bits per clock.
//
// The path starts in state 0 at the newest step. On do_a the first NA
// columns of traceback elements run from mem[0] and the one-hot path vector
// is registered. By do_b the bank has shifted two steps, so the second half
// continues from mem[NA+2]; after TB_LEN/2 steps in all the path is taken as
// merged and the next four steps are decoded: the two low bits of the state
// the path occupies after a step are that step's bits (state 4i+j decodes to
// j). out_bits is registered on do_b, bit 0 the oldest bit, and out_valid
// marks tracebacks whose window was filled (start_ok at do_a).
//
// Starting at state 0, traceback length 40, decoding length 8, the
// two-clock split and the decoding table follow the document; where the
// work is split between the clocks is this design's choice.
module traceback
  import vit_pkg::*;
#(
  parameter int TB_LEN    = 40,
  parameter int MEM_STEPS = 28
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clr,
  input  logic [MEM_STEPS-1:0][NSTATE-1:0][1:0] mem,
  input  logic                   do_a,
  input  logic                   do_b,
  input  logic                   start_ok,
  output logic                   out_valid,
  output logic [7:0]             out_bits
);

  localparam int TBS = TB_LEN / 2;   // traceback steps
  localparam int NA  = TBS / 2 + 2;  // columns in the first clock
  localparam int NB  = TBS - NA;     // columns in the second clock
  localparam int DS  = 4;            // decoded steps (8 bits)

  logic [NA:0][NSTATE-1:0]      pa;
  logic [NB+DS-1:0][NSTATE-1:0] pb;
  logic [NSTATE-1:0]            pa_q;
  logic                         ok_q;
  logic [7:0]                   bits_d;

  assign pa[0] = NSTATE'(1);
  for (genvar c = 0; c < NA; c++) begin : g_a
    tb_column u_col (.path_in(pa[c]), .dec(mem[c]), .path_out(pa[c+1]));
  end

  assign pb[0] = pa_q;
  for (genvar c = 0; c < NB + DS - 1; c++) begin : g_b
    tb_column u_col (.path_in(pb[c]), .dec(mem[NA + 2 + c]), .path_out(pb[c+1]));
  end

  // pb[NB + d] is the path after the d-th newest decoded step.
  always_comb
    for (int d = 0; d < DS; d++) begin
      logic [NSTATE-1:0] h;
      logic b1, b0;
      h  = pb[NB + d];
      b1 = 1'b0;
      b0 = 1'b0;
      for (int s = 0; s < NSTATE; s++) begin
        b1 = b1 | (h[s] & s[1]);
        b0 = b0 | (h[s] & s[0]);
      end
      bits_d[2 * (DS - 1 - d)]     = b1;
      bits_d[2 * (DS - 1 - d) + 1] = b0;
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pa_q      <= '0;
      ok_q      <= 1'b0;
      out_valid <= 1'b0;
      out_bits  <= '0;
    end else if (clr) begin
      ok_q      <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= do_b && ok_q;
      if (do_a) begin
        pa_q <= pa[NA];
        ok_q <= start_ok;
      end
      if (do_b) out_bits <= bits_d;
    end
  end

endmodule
