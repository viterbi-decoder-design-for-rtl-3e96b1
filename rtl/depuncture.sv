// depuncture: turns the received stream of punctured soft values into one
// full trellis word per clock, 12 slots (four radix-2 stages x coded bits
// A,B,C), with a dummy zero-metric flag on every slot whose bit was stolen.
//
// Received values arrive in chunks of 1..IN_W values with a valid/ready
// handshake and collect in a BUFN-entry shift buffer. Each clock the unit
// looks up, from the rate and the position in the puncture period, which of
// the next 12 slots were transmitted (KEEP of them); when the buffer holds at
// least KEEP values it writes the output word, taking buffered values in order
// into the kept slots and flagging the rest as erased, and advances the
// period position by four information bits. A chunk is accepted while the
// buffer has room for a full chunk. The output register is one clock behind
// the buffer; out_valid has no backpressure, the decoder behind it never
// stalls.
//
// Inserting dummy metrics for stolen bits, and doing it in front of the
// branch metric unit, follows the document. The chunked handshake, the
// buffer size and the puncture patterns (vit_pkg) are this design's choices.
module depuncture
  import vit_pkg::*;
#(
  parameter int IN_W = NSLOT,  // soft values per input chunk
  parameter int BUFN = 2 * NSLOT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  rate_e                   rate,
  input  logic                    in_valid,
  input  logic [$clog2(IN_W+1)-1:0] in_count,
  input  soft_t [IN_W-1:0]        in_soft,
  output logic                    in_ready,
  output logic                    out_valid,
  output dp_word_t                out_word
);

  localparam int CW = $clog2(BUFN + 1);

  soft_t          buf_q [BUFN];
  logic [CW-1:0]  cnt_q;
  logic [3:0]     phase_q;

  logic [NSLOT-1:0] keep;
  logic [CW-1:0]    pos [NSLOT];
  logic [CW-1:0]    nkeep;
  logic             fire;
  logic [3:0]       phase_nx;
  logic [CW-1:0]    base;

  function automatic logic [3:0] wrap(input int x, input int per);
    int y;
    y = x;
    for (int k = 0; k < 16; k++) if (y >= per) y = y - per;
    return 4'(y);
  endfunction

  always_comb begin
    int per;
    per   = punct_period(rate);
    nkeep = '0;
    for (int i = 0; i < NSLOT; i++) begin
      keep[i] = punct_keep(rate, int'(wrap(int'(phase_q) + i / 3, per)), i % 3);
      pos[i]  = nkeep;
      nkeep   = nkeep + CW'(keep[i]);
    end
    fire     = (cnt_q >= nkeep);
    phase_nx = wrap(int'(phase_q) + 4, per);
    base     = fire ? cnt_q - nkeep : cnt_q;
  end

  assign in_ready = (int'(cnt_q) <= BUFN - IN_W);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q     <= '0;
      phase_q   <= '0;
      out_valid <= 1'b0;
      out_word  <= '0;
      for (int i = 0; i < BUFN; i++) buf_q[i] <= '0;
    end else if (clr) begin
      cnt_q     <= '0;
      phase_q   <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= fire;
      if (fire) begin
        for (int i = 0; i < NSLOT; i++) begin
          out_word.erased[i] <= ~keep[i];
          out_word.v[i]      <= keep[i] ? buf_q[pos[i]] : '0;
        end
        phase_q <= phase_nx;
      end
      // Remove the consumed values, then append the new chunk behind the rest.
      for (int i = 0; i < BUFN; i++) begin
        if (fire) buf_q[i] <= (i + int'(nkeep) < BUFN) ? buf_q[i + int'(nkeep)] : '0;
      end
      for (int i = 0; i < IN_W; i++) begin
        if (in_valid && in_ready && i < int'(in_count))
          buf_q[int'(base) + i] <= in_soft[i];
      end
      cnt_q <= base + ((in_valid && in_ready) ? CW'(in_count) : '0);
    end
  end

  // A chunk never carries more values than the port has.
  a_count : assert property (@(posedge clk) disable iff (!rst_n)
                             in_valid |-> (in_count >= 1 && int'(in_count) <= IN_W));

endmodule
