// viterbi_top_tb: end-to-end test of the decoder at its default size.
//
// For each frame the bench draws random information bits, appends 56 zero
// bits so that the traceback window of the last message byte is fed, encodes
// them with its own model of the (133, 146, 175 octal, D^0 first) K = 7
// encoder, punctures with its own copy of the puncture table and maps each
// coded bit to a 3-bit soft value with noise: values pulled towards the
// middle and, on the lower rates, isolated weak wrong-sign values. The
// received values are offered in chunks of random size with random idle
// clocks; a first frame drives full chunks every clock to measure latency
// and throughput. Every decoded byte is compared with the sent bits.
//
// Mechanisms counted, each must occur: all five rates, rate change with clr,
// input backpressure (valid while not ready), stolen-bit slots, metric
// overflow prevention, corrected wrong-sign values.
`timescale 1ns/1ps
module viterbi_top_tb;
  import vit_pkg::*;

  localparam int NMSG = 320;             // message bits per frame
  localparam int NTOT = NMSG + 56;       // stages fed per frame

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  rate_e rate = RATE_1_3;
  logic in_valid = 1'b0;
  logic [3:0] in_count = '0;
  soft_t [NSLOT-1:0] in_soft = '0;
  logic in_ready, out_valid, ovf_evt;
  logic [7:0] out_bits;

  viterbi_top dut (.*);

  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference encoder and puncturer ----------------
  logic msg [NTOT];
  int   nsoft;
  soft_t tx [NTOT * 3];
  int   n_flip = 0, n_era_ref = 0;

  function automatic bit keep_ref(rate_e r, int stage, int b);
    // b: 0=A 1=B 2=C
    case (r)
      RATE_1_3:   return 1;
      RATE_11_32: return !(b == 2 && (stage % 11) == 10);
      RATE_1_2:   return b != 2;
      RATE_5_8:   return b == 0 || (b == 1 && ((stage % 5) % 2) == 0);
      default:    return b == 0 || (b == 1 && (stage % 3) == 0);
    endcase
  endfunction

  task automatic build_frame(rate_e r, bit noisy_flips);
    logic [5:0] sr;
    int last_flip;
    sr = '0;
    nsoft = 0;
    last_flip = -1000;
    for (int t = 0; t < NTOT; t++) begin
      logic u;
      logic [2:0] c;
      u = (t < NMSG) ? 1'($urandom) : 1'b0;
      msg[t] = u;
      c[0] = u ^ sr[1] ^ sr[2] ^ sr[4] ^ sr[5];
      c[1] = u ^ sr[0] ^ sr[3] ^ sr[4];
      c[2] = u ^ sr[0] ^ sr[1] ^ sr[2] ^ sr[3] ^ sr[5];
      sr = {sr[4:0], u};
      for (int b = 0; b < 3; b++) begin
        if (keep_ref(r, t, b)) begin
          int v, k;
          v = c[b] ? 7 : 0;
          k = $urandom_range(0, 15);
          if (k < 4) v = c[b] ? 7 - $urandom_range(1, 3) : $urandom_range(1, 3);
          if (noisy_flips && t < NMSG && nsoft - last_flip > 60 && $urandom_range(0, 19) == 0) begin
            v = c[b] ? 3 : 4;
            last_flip = nsoft;
            n_flip++;
          end
          tx[nsoft] = soft_t'(v);
          nsoft++;
        end else n_era_ref++;
      end
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_era = 0, n_ovf = 0, n_clr = 0;
  int rate_seen [5];
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (ovf_evt) n_ovf++;
    if (dut.dp_valid && dut.dp_word.erased != '0) n_era++;
  end

  // ---------------- output checking ----------------
  int nbyte = 0;
  longint first_out = -1, last_out = -1;
  int gap_bad = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    logic [7:0] exp_b;
    for (int i = 0; i < 8; i++) exp_b[i] = msg[8 * nbyte + i];
    checks++;
    if (out_bits !== exp_b) begin
      failures++;
      if (failures < 10) $display("byte %0d: got %02h expected %02h (rate %s)", nbyte, out_bits, exp_b, rate.name());
    end
    if (first_out < 0) first_out = cyc;
    else if (cyc - last_out != 2) gap_bad++;
    last_out = cyc;
    nbyte++;
  end

  task automatic send_frame(bit full_rate);
    int idx;
    idx = 0;
    while (idx < nsoft) begin
      int n;
      @(negedge clk);
      if (!full_rate && $urandom_range(0, 3) == 0) begin
        in_valid = 1'b0;
        continue;
      end
      n = full_rate ? NSLOT : $urandom_range(1, NSLOT);
      if (n > nsoft - idx) n = nsoft - idx;
      in_valid = 1'b1;
      in_count = 4'(n);
      for (int i = 0; i < NSLOT; i++) in_soft[i] = (i < n) ? tx[idx + i] : '0;
      @(posedge clk);
      if (in_ready) idx += n;
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic run_frame(rate_e r, bit full_rate, bit flips);
    longint t_acc;
    @(negedge clk);
    rate = r;
    clr  = 1'b1;
    n_clr++;
    @(negedge clk);
    clr = 1'b0;
    nbyte = 0;
    first_out = -1;
    gap_bad = 0;
    build_frame(r, flips);
    t_acc = cyc + 1;       // the edge that accepts the first chunk
    send_frame(full_rate);
    repeat (60) @(posedge clk);
    rate_seen[int'(r)]++;
    checks++;
    if (nbyte != NMSG / 8 + 1) begin
      failures++;
      $display("rate %s: %0d bytes decoded, expected %0d", r.name(), nbyte, NMSG / 8 + 1);
    end
    if (full_rate) begin
      // Accept at edge 0; depuncture word edge 1, metrics 2, ACS 3; shift n
      // at edge 3+n; traceback start at shift 13, end and output register
      // at shift 14 = edge 17; the bench samples it on edge 18.
      checks += 2;
      if (first_out - t_acc != 18) begin
        failures++;
        $display("latency %0d edges, expected 18", first_out - t_acc);
      end
      if (gap_bad != 0) begin
        failures++;
        $display("%0d outputs not two clocks apart", gap_bad);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_frame(RATE_1_3,   1'b1, 1'b1);
    run_frame(RATE_11_32, 1'b0, 1'b1);
    run_frame(RATE_1_2,   1'b0, 1'b1);
    run_frame(RATE_5_8,   1'b0, 1'b0);
    run_frame(RATE_3_4,   1'b0, 1'b0);
    run_frame(RATE_3_4,   1'b1, 1'b0);
    run_frame(RATE_1_3,   1'b0, 1'b1);
    for (int r = 0; r < 5; r++) begin
      checks++;
      if (rate_seen[r] == 0) begin failures++; $display("rate %0d never run", r); end
    end
    checks += 5;
    if (n_stall == 0) begin failures++; $display("no backpressure seen"); end
    if (n_era == 0)   begin failures++; $display("no stolen-bit slot seen"); end
    if (n_ovf == 0)   begin failures++; $display("no overflow prevention seen"); end
    if (n_clr < 2)    begin failures++; $display("no rate change"); end
    if (n_flip == 0)  begin failures++; $display("no wrong-sign value sent"); end
    $display("stalls=%0d erased_words=%0d overflow=%0d restarts=%0d flips=%0d",
             n_stall, n_era, n_ovf, n_clr, n_flip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
