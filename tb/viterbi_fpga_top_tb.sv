// viterbi_fpga_top_tb: end-to-end test of the FPGA build at default size.
//
// Normal mode: frames of random bits (plus 56 padding zeros) are encoded by
// this bench's own encoder, punctured with its own table, given soft-value
// noise and offered in random chunks with idle clocks; each decoded byte is
// compared with the sent bits.
// Self-test mode: for every rate, with and without injected weak errors,
// the bench starts the built-in test and independently regenerates the
// 1 + D^14 + D^15 sequence to check every decoded byte itself. The
// self-test must report done, zero errors and nbits/8 + 1 bytes, and in
// self-test mode bytes must come every two clocks (480 Mb/s at 120 MHz).
//
// Mechanisms counted, each must occur: backpressure, stolen-bit slots,
// overflow prevention, every rate, restarts, injected errors corrected,
// switches between normal and self-test mode.
`timescale 1ns/1ps
module viterbi_fpga_top_tb;
  import vit_pkg::*;

  localparam int NMSG = 320;
  localparam int NTOT = NMSG + 56;

  logic clk = 0, rst_n = 0, clr = 0;
  rate_e rate = RATE_1_3;
  logic in_valid = 0;
  logic [3:0] in_count = 0;
  soft_t [NSLOT-1:0] in_soft = '0;
  logic in_ready, out_valid, ovf_evt;
  logic [7:0] out_bits;
  logic bist_mode = 0, bist_start = 0, bist_inject = 0;
  logic [15:0] bist_nbits = 0;
  logic bist_done;
  logic [15:0] bist_errors;
  logic [12:0] bist_bytes;

  viterbi_fpga_top dut (.*);
  always #4 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit keep_ref(rate_e r, int stage, int b);
    case (r)
      RATE_1_3:   return 1;
      RATE_11_32: return !(b == 2 && (stage % 11) == 10);
      RATE_1_2:   return b != 2;
      RATE_5_8:   return b == 0 || (b == 1 && ((stage % 5) % 2) == 0);
      default:    return b == 0 || (b == 1 && (stage % 3) == 0);
    endcase
  endfunction

  // Expected information bits of the running frame, either mode.
  logic msg [8192];
  int   nsoft;
  soft_t tx [NTOT * 3];

  task automatic build_frame(rate_e r);
    logic [5:0] sr;
    sr = '0;
    nsoft = 0;
    for (int t = 0; t < NTOT; t++) begin
      logic u;
      logic [2:0] c;
      u = (t < NMSG) ? 1'($urandom) : 1'b0;
      msg[t] = u;
      c[0] = u ^ sr[1] ^ sr[2] ^ sr[4] ^ sr[5];
      c[1] = u ^ sr[0] ^ sr[3] ^ sr[4];
      c[2] = u ^ sr[0] ^ sr[1] ^ sr[2] ^ sr[3] ^ sr[5];
      sr = {sr[4:0], u};
      for (int b = 0; b < 3; b++) if (keep_ref(r, t, b)) begin
        int v;
        v = c[b] ? 7 : 0;
        if ($urandom_range(0, 3) == 0) v = c[b] ? 7 - $urandom_range(1, 3) : $urandom_range(1, 3);
        tx[nsoft] = soft_t'(v);
        nsoft++;
      end
    end
  endtask

  int n_stall = 0, n_era = 0, n_ovf = 0, n_clr = 0, n_mode = 0;
  int rate_seen [5];
  logic mode_d = 0;
  always @(posedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (ovf_evt) n_ovf++;
    if (dut.u_dec.dp_valid && dut.u_dec.dp_word.erased != '0) n_era++;
    if (bist_mode != mode_d) n_mode++;
    mode_d <= bist_mode;
  end

  int nbyte = 0, gap_bad = 0;
  longint last_out = -1;
  always @(posedge clk) if (rst_n && out_valid) begin
    logic [7:0] e;
    for (int i = 0; i < 8; i++) e[i] = msg[8 * nbyte + i];
    checks++;
    if (out_bits !== e) begin
      failures++;
      if (failures < 10) $display("mode %0d byte %0d got %02h exp %02h", bist_mode, nbyte, out_bits, e);
    end
    if (bist_mode && last_out >= 0 && cyc - last_out != 2) gap_bad++;
    last_out = cyc;
    nbyte++;
  end

  task automatic normal_frame(rate_e r);
    int idx;
    @(negedge clk);
    bist_mode = 0; rate = r; clr = 1; n_clr++;
    @(negedge clk);
    clr = 0; nbyte = 0;
    build_frame(r);
    idx = 0;
    while (idx < nsoft) begin
      int n;
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin in_valid = 0; continue; end
      n = $urandom_range(1, NSLOT);
      if (n > nsoft - idx) n = nsoft - idx;
      in_valid = 1; in_count = 4'(n);
      for (int i = 0; i < NSLOT; i++) in_soft[i] = (i < n) ? tx[idx + i] : '0;
      @(posedge clk);
      if (in_ready) idx += n;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (60) @(posedge clk);
    rate_seen[int'(r)]++;
    checks++;
    if (nbyte != NMSG / 8 + 1) begin failures++; $display("normal %s: %0d bytes", r.name(), nbyte); end
  endtask

  task automatic bist_run(rate_e r, int nb, bit inj);
    logic [14:0] q;
    q = 15'h1D2B;
    for (int t = 0; t < nb + 64; t++) begin
      if (t < nb) begin msg[t] = q[13] ^ q[14]; q = {q[13:0], msg[t]}; end
      else msg[t] = 0;
    end
    @(negedge clk);
    bist_mode = 1; rate = r; bist_nbits = 16'(nb); bist_inject = inj; bist_start = 1;
    nbyte = 0; last_out = -1; gap_bad = 0;
    @(negedge clk);
    bist_start = 0;
    n_clr++;
    while (!bist_done) @(negedge clk);
    rate_seen[int'(r)]++;
    checks += 4;
    if (bist_errors != 0) begin failures++; $display("self-test %s: %0d errors", r.name(), bist_errors); end
    if (int'(bist_bytes) != nb / 8 + 1) begin failures++; $display("self-test %s: %0d bytes", r.name(), bist_bytes); end
    if (nbyte != nb / 8 + 1) begin failures++; $display("self-test %s: bench saw %0d bytes", r.name(), nbyte); end
    if (gap_bad != 0) begin failures++; $display("self-test %s: %0d byte gaps not 2 clocks", r.name(), gap_bad); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    normal_frame(RATE_1_2);
    bist_run(RATE_1_3, 800, 1);
    bist_run(RATE_11_32, 800, 1);
    normal_frame(RATE_5_8);
    bist_run(RATE_1_2, 800, 1);
    bist_run(RATE_5_8, 800, 1);
    bist_run(RATE_3_4, 800, 1);
    bist_run(RATE_3_4, 2000, 0);
    normal_frame(RATE_3_4);
    for (int r = 0; r < 5; r++) begin
      checks++;
      if (rate_seen[r] == 0) begin failures++; $display("rate %0d never run", r); end
    end
    checks += 5;
    if (n_stall == 0) begin failures++; $display("no backpressure"); end
    if (n_era == 0)   begin failures++; $display("no stolen-bit slot"); end
    if (n_ovf == 0)   begin failures++; $display("no overflow prevention"); end
    if (n_clr < 2)    begin failures++; $display("no restart"); end
    if (n_mode < 2)   begin failures++; $display("no mode switch"); end
    $display("stalls=%0d erased_words=%0d overflow=%0d restarts=%0d mode_switches=%0d",
             n_stall, n_era, n_ovf, n_clr, n_mode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
