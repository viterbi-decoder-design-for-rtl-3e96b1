// viterbi_fpga_top: the decoder as prototyped on an FPGA, with its
// synthesizable built-in self-test. In normal mode (bist_mode = 0) the
// decoder's own interface is brought straight out. In self-test mode the
// decoder input comes from bist_gen and its output goes to bist_check; a
// bist_start pulse also restarts the decoder (its clr), and the generator
// begins sending one clock later. bist_done rises when the checker has seen
// the whole frame; bist_errors is then the number of wrong decoded bits.
// out_valid/out_bits stay visible in both modes, as a logic analyser would
// watch them.
//
// Pairing the decoder with a synthesizable pattern generator and self-check
// circuit follows the document's FPGA verification; the mode switch and the
// status ports are this design's.
module viterbi_fpga_top
  import vit_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  rate_e             rate,
  input  logic              in_valid,
  input  logic [3:0]        in_count,
  input  soft_t [NSLOT-1:0] in_soft,
  output logic              in_ready,
  output logic              out_valid,
  output logic [7:0]        out_bits,
  output logic              ovf_evt,
  input  logic              bist_mode,
  input  logic              bist_start,
  input  logic              bist_inject,
  input  logic [15:0]       bist_nbits,
  output logic              bist_done,
  output logic [15:0]       bist_errors,
  output logic [12:0]       bist_bytes
);

  logic              g_valid, g_done, c_done, d_ready;
  logic [3:0]        g_count;
  soft_t [NSLOT-1:0] g_soft;
  logic              d_clr, d_valid;
  logic [3:0]        d_count;
  soft_t [NSLOT-1:0] d_soft;

  assign d_clr    = bist_mode ? bist_start : clr;
  assign d_valid  = bist_mode ? g_valid : in_valid;
  assign d_count  = bist_mode ? g_count : in_count;
  assign d_soft   = bist_mode ? g_soft  : in_soft;
  assign in_ready = d_ready && !bist_mode;
  assign bist_done = g_done && c_done;

  bist_gen u_gen (
    .clk, .rst_n, .start(bist_start && bist_mode), .rate, .inject(bist_inject),
    .nbits(bist_nbits), .out_valid(g_valid), .out_count(g_count),
    .out_soft(g_soft), .out_ready(d_ready && bist_mode), .done(g_done)
  );

  viterbi_top u_dec (
    .clk, .rst_n, .clr(d_clr), .rate,
    .in_valid(d_valid), .in_count(d_count), .in_soft(d_soft), .in_ready(d_ready),
    .out_valid, .out_bits, .ovf_evt
  );

  bist_check u_chk (
    .clk, .rst_n, .start(bist_start && bist_mode), .nbits(bist_nbits),
    .dec_valid(out_valid && bist_mode), .dec_bits(out_bits),
    .errors(bist_errors), .bytes(bist_bytes), .done(c_done)
  );

endmodule
