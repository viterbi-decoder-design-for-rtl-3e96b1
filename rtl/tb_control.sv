// tb_control: survivor register bank and traceback scheduling. The survivor
// decisions are held in registers, not RAM, so the whole traceback window is
// visible to the combinational traceback at once. Every valid clock the bank
// shifts by two radix-4 steps (four trellis stages): mem[0] is always the
// newest step, mem[k] the step k older. The bank is MEM_STEPS steps deep.
//
// The traceback takes two clocks, so the unit starts one on every second
// shift (do_a) and lets it finish on the next (do_b). start_ok says the
// decode window of the traceback being started lies entirely in decoded
// data, which needs NFILL shifts after a reset or clr.
//
// Register storage, traceback length 40 with decoding length 8 over two
// clocks and the 56-stage bank (40 + 8 + 8 for the buffer) follow the
// document; the scheduling signals are this design's.
module tb_control
  import vit_pkg::*;
#(
  parameter int TB_LEN    = 40,  // traceback length in trellis stages
  parameter int MEM_STEPS = 28   // bank depth in radix-4 steps (56 stages)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clr,
  input  logic                         in_valid,
  input  logic [NSTATE-1:0][1:0]       dec1,   // older step
  input  logic [NSTATE-1:0][1:0]       dec2,   // newer step
  output logic [MEM_STEPS-1:0][NSTATE-1:0][1:0] mem,
  output logic                         shift,
  output logic                         do_a,
  output logic                         do_b,
  output logic                         start_ok
);

  localparam int NFILL = (TB_LEN / 2 + 4) / 2;

  logic [$clog2(NFILL+1)-1:0] nsh_q;
  logic                       par_q;

  assign shift    = in_valid && !clr;
  assign do_a     = shift && !par_q;
  assign do_b     = shift && par_q;
  assign start_ok = (int'(nsh_q) >= NFILL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem   <= '0;
      nsh_q <= '0;
      par_q <= 1'b0;
    end else if (clr) begin
      nsh_q <= '0;
      par_q <= 1'b0;
    end else if (shift) begin
      mem[0] <= dec2;
      mem[1] <= dec1;
      for (int k = 2; k < MEM_STEPS; k++) mem[k] <= mem[k-2];
      par_q <= ~par_q;
      if (int'(nsh_q) < NFILL) nsh_q <= nsh_q + 1'b1;
    end
  end

endmodule
