// depuncture_tb: for each rate a random stream of soft values is offered in
// random-size chunks with idle clocks. A model here walks the trellis slots
// with its own copy of the puncture table and predicts every output word:
// kept slots take the next stream values in order, stolen slots are flagged
// and zero. Also checks that rate 1/3 sustains a word per clock when fed
// full chunks and that backpressure occurs with bursty large chunks.
module depuncture_tb;
  import vit_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0;
  rate_e rate = RATE_1_3;
  logic in_valid = 0;
  logic [3:0] in_count = 0;
  soft_t [11:0] in_soft = '0;
  logic in_ready, out_valid;
  dp_word_t out_word;
  int checks = 0, failures = 0, n_stall = 0;

  depuncture dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
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

  soft_t stream [4096];
  int nstream, rd, words, stage;

  always @(posedge clk) if (rst_n && !clr) begin
    if (in_valid && !in_ready) n_stall++;
    if (out_valid) begin
      dp_word_t e;
      for (int i = 0; i < 12; i++) begin
        if (keep_ref(rate, stage + i / 3, i % 3)) begin
          e.v[i] = stream[rd]; e.erased[i] = 0; rd++;
        end else begin
          e.v[i] = 0; e.erased[i] = 1;
        end
      end
      stage += 4;
      words++;
      checks++;
      if (out_word !== e) begin
        failures++;
        if (failures < 10) $display("word %0d rate %s got %h exp %h", words, rate.name(), out_word, e);
      end
    end
  end

  task automatic run(rate_e r, int nw, bit full);
    int idx, need, cyc0, cyc1;
    @(negedge clk);
    rate = r; clr = 1;
    @(negedge clk);
    clr = 0;
    rd = 0; words = 0; stage = 0;
    need = 0;
    for (int s = 0; s < nw * 4; s++) for (int b = 0; b < 3; b++) need += int'(keep_ref(r, s, b));
    nstream = need;
    for (int i = 0; i < need; i++) stream[i] = soft_t'($urandom);
    idx = 0;
    cyc0 = $time;
    while (idx < nstream) begin
      int n;
      @(negedge clk);
      if (!full && $urandom_range(0, 4) == 0) begin in_valid = 0; continue; end
      n = full ? 12 : $urandom_range(1, 12);
      if (n > nstream - idx) n = nstream - idx;
      in_valid = 1; in_count = 4'(n);
      for (int i = 0; i < 12; i++) in_soft[i] = (i < n) ? stream[idx + i] : '0;
      @(posedge clk);
      if (in_ready) idx += n;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (5) @(posedge clk);
    cyc1 = $time;
    checks++;
    if (words != nw) begin failures++; $display("rate %s: %0d words, exp %0d", r.name(), words, nw); end
    if (full && r == RATE_1_3) begin
      checks++;
      // nw chunks, one per clock, plus 6 idle clocks around them.
      if ((cyc1 - cyc0) / 10 > nw + 8) begin failures++; $display("rate 1/3 not one word per clock"); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(RATE_1_3, 40, 1);
    run(RATE_1_3, 40, 0);
    run(RATE_11_32, 60, 0);
    run(RATE_1_2, 60, 0);
    run(RATE_5_8, 60, 0);
    run(RATE_3_4, 60, 0);
    run(RATE_3_4, 60, 1);
    checks++;
    if (n_stall == 0) begin failures++; $display("no backpressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
