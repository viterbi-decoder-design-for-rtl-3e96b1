// bist_gen: pattern generator of the built-in self-test. After start it
// sends a frame of nbits pseudo-random information bits followed by 56 zero
// bits (tail and traceback fill) to the decoder input, coded and punctured
// exactly as a transmitter would.
//
// Each clock it takes the next four information bits, runs them through the
// rate-1/3 encoder (vit_pkg::enc_out), keeps the coded bits that the
// puncture pattern of the selected rate transmits and packs them, as soft
// values 0 or 7, into one chunk of up to 12 values. A chunk is held until the
// decoder takes it (valid/ready). With inject set, every INJ_PERIOD-th
// value sent is replaced by a weak value of the wrong sign (3 for a one,
// 4 for a zero) so the decoder has something to correct. done rises when
// the last chunk has been accepted. nbits must be a multiple of 8.
//
// A synthesizable pattern source for the FPGA self-test follows the
// document; the frame format, noise injection and chunking are this
// design's.
module bist_gen
  import vit_pkg::*;
#(
  parameter int INJ_PERIOD = 97
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  rate_e             rate,
  input  logic              inject,
  input  logic [15:0]       nbits,
  output logic              out_valid,
  output logic [3:0]        out_count,
  output soft_t [NSLOT-1:0] out_soft,
  input  logic              out_ready,
  output logic              done
);

  localparam int PAD = 56;

  logic        run_q;
  logic [16:0] stage_q;      // information bits sent so far
  logic [5:0]  sr_q;         // encoder state, newest bit in bit 0
  logic [3:0]  phase_q;
  logic [6:0]  inj_q;
  logic        load, is_msg, last;
  logic [3:0]  u;
  logic [3:0]  prbs_bits;

  logic [5:0]        sr_nx;
  logic [3:0]        phase_nx;
  logic [6:0]        inj_nx;
  logic [3:0]        cnt_nx;
  soft_t [NSLOT-1:0] soft_nx;

  assign is_msg = (stage_q < {1'b0, nbits});
  assign last   = (stage_q + 17'd4 >= {1'b0, nbits} + 17'(PAD));
  assign load   = run_q && (!out_valid || out_ready);
  assign u      = is_msg ? prbs_bits : 4'b0;

  prbs15 #(.N(4)) u_prbs (
    .clk, .rst_n, .init(start), .adv(load && is_msg), .bits(prbs_bits)
  );

  function automatic logic [3:0] wrap(input int x, input int per);
    int y;
    y = x;
    for (int k = 0; k < 16; k++) if (y >= per) y = y - per;
    return 4'(y);
  endfunction

  always_comb begin
    logic [5:0] s;
    logic [2:0] c;
    int per;
    per     = punct_period(rate);
    s       = sr_q;
    inj_nx  = inj_q;
    cnt_nx  = '0;
    soft_nx = '0;
    for (int t = 0; t < 4; t++) begin
      c = enc_out(s, u[t]);
      s = {s[4:0], u[t]};
      for (int b = 0; b < 3; b++) begin
        if (punct_keep(rate, int'(wrap(int'(phase_q) + t, per)), b)) begin
          logic hit;
          hit = inject && (int'(inj_nx) == INJ_PERIOD - 1);
          inj_nx = (int'(inj_nx) == INJ_PERIOD - 1) ? '0 : inj_nx + 1'b1;
          soft_nx[cnt_nx] = hit ? (c[b] ? soft_t'(3) : soft_t'(4))
                                : (c[b] ? soft_t'(SOFT_MAX) : soft_t'(0));
          cnt_nx = cnt_nx + 1'b1;
        end
      end
    end
    sr_nx    = s;
    phase_nx = wrap(int'(phase_q) + 4, per);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q     <= 1'b0;
      stage_q   <= '0;
      sr_q      <= '0;
      phase_q   <= '0;
      inj_q     <= '0;
      out_valid <= 1'b0;
      out_count <= '0;
      out_soft  <= '0;
      done      <= 1'b0;
    end else if (start) begin
      run_q     <= 1'b1;
      stage_q   <= '0;
      sr_q      <= '0;
      phase_q   <= '0;
      inj_q     <= '0;
      out_valid <= 1'b0;
      done      <= 1'b0;
    end else begin
      if (out_valid && out_ready && !run_q) begin
        out_valid <= 1'b0;
        done      <= 1'b1;
      end
      if (load) begin
        out_valid <= 1'b1;
        out_count <= cnt_nx;
        out_soft  <= soft_nx;
        sr_q      <= sr_nx;
        phase_q   <= phase_nx;
        inj_q     <= inj_nx;
        stage_q   <= stage_q + 17'd4;
        if (last) run_q <= 1'b0;
      end
    end
  end

endmodule
