// viterbi_top: soft-decision Viterbi decoder for the multiband-OFDM UWB
// physical layer (rate-1/3, K = 7 mother code punctured to 11/32, 1/2, 5/8
// and 3/4). It decodes four information bits per clock, so a 120 MHz clock
// carries the 480 Mb/s top rate.
//
// Pipeline: depuncture (received chunks -> 12-slot words with erasures) ->
// bmc (two radix-4 branch metric elements, registered) -> acs (two ranks of
// radix-4 ACS units with arithmetic compare-select and overflow prevention,
// registered metrics and decisions) -> tb_control (56-stage survivor
// register bank) -> traceback (two-clock traceback from state 0 over 40
// stages, 8 bits out every second word).
//
// Interface: in_valid/in_ready/in_count/in_soft carry received 3-bit soft
// values in transmission order; rate selects the puncture pattern and may
// change only together with clr, which restarts the decoder for a new frame
// (pulse it after the last output of the old frame). out_bits (bit 0 oldest)
// is valid with out_valid; the stream starts at the frame's first bit and
// lags the input by the traceback window, so 48 stages more than the wanted
// bits must be fed (tail or padding). With words every clock the first byte
// appears 17 clocks after the first word is accepted and then every second
// clock.
//
// The block structure, 3-bit soft decision, traceback length 40 and the
// four-bits-per-clock rate follow the document; the handshake, clr, the
// restart metrics and the exact pipeline registers are this design's.
module viterbi_top
  import vit_pkg::*;
#(
  parameter int TB_LEN    = 40,
  parameter int MEM_STEPS = 28
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  rate_e                rate,
  input  logic                 in_valid,
  input  logic [3:0]           in_count,
  input  soft_t [NSLOT-1:0]    in_soft,
  output logic                 in_ready,
  output logic                 out_valid,
  output logic [7:0]           out_bits,
  output logic                 ovf_evt
);

  logic     dp_valid;
  dp_word_t dp_word;
  logic     bm_valid;
  bm_t [NSTATE-1:0] bm1, bm2;
  logic     acs_valid;
  logic [NSTATE-1:0][1:0] dec1, dec2;
  pm_t [NSTATE-1:0] pm;
  logic [MEM_STEPS-1:0][NSTATE-1:0][1:0] mem;
  logic     shift, do_a, do_b, start_ok;

  depuncture u_dp (
    .clk, .rst_n, .clr, .rate,
    .in_valid, .in_count, .in_soft, .in_ready,
    .out_valid(dp_valid), .out_word(dp_word)
  );

  bmc u_bmc (
    .clk, .rst_n, .clr,
    .in_valid(dp_valid), .in_word(dp_word),
    .out_valid(bm_valid), .bm1, .bm2
  );

  acs u_acs (
    .clk, .rst_n, .clr,
    .in_valid(bm_valid), .bm1, .bm2,
    .out_valid(acs_valid), .dec1, .dec2, .ovf_evt, .pm
  );

  tb_control #(.TB_LEN(TB_LEN), .MEM_STEPS(MEM_STEPS)) u_tbc (
    .clk, .rst_n, .clr,
    .in_valid(acs_valid), .dec1, .dec2,
    .mem, .shift, .do_a, .do_b, .start_ok
  );

  traceback #(.TB_LEN(TB_LEN), .MEM_STEPS(MEM_STEPS)) u_tb (
    .clk, .rst_n, .clr,
    .mem, .do_a, .do_b, .start_ok,
    .out_valid, .out_bits
  );

endmodule
