// traceback_tb: the two-clock traceback against a planted survivor path.
// For each trial the bench fills a 28-step bank with random decisions, then
// plants a path: starting in state 0 at the newest step it picks a random
// predecessor number per step, writes it as that state's decision and moves
// to the predecessor. Between the two clocks the bank is shifted by two new
// random steps, as the register bank does. The 8 bits out must be the low
// bit pairs of the planted states 20..23 steps back (oldest in bit 0), and
// out_valid must follow start_ok.
module traceback_tb;
  import vit_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0;
  logic [27:0][63:0][1:0] mem = '0;
  logic do_a = 0, do_b = 0, start_ok = 0;
  logic out_valid;
  logic [7:0] out_bits;
  int checks = 0, failures = 0;

  traceback dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int st [25];
      logic [7:0] e;
      bit ok;
      @(negedge clk);
      for (int k = 0; k < 28; k++) for (int s = 0; s < 64; s++) mem[k][s] = 2'($urandom);
      st[0] = 0;
      for (int k = 0; k < 24; k++) begin
        int j;
        j = $urandom_range(0, 3);
        mem[k][st[k]] = 2'(j);
        st[k + 1] = j * 16 + st[k] / 4;
      end
      for (int k = 20; k < 24; k++) begin
        e[2 * (23 - k)]     = 1'(st[k] >> 1);
        e[2 * (23 - k) + 1] = 1'(st[k]);
      end
      ok = ($urandom_range(0, 3) != 0);
      do_a = 1; start_ok = ok;
      @(negedge clk);
      do_a = 0; start_ok = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
      for (int k = 27; k >= 2; k--) mem[k] = mem[k - 2];
      mem[0] = {$urandom, $urandom, $urandom, $urandom};
      mem[1] = {$urandom, $urandom, $urandom, $urandom};
      do_b = 1;
      @(negedge clk);
      do_b = 0;
      checks++;
      if (out_valid != ok) failures++;
      if (ok) begin
        checks++;
        if (out_bits !== e) begin
          failures++;
          if (failures < 10) $display("t=%0d got %b exp %b", t, out_bits, e);
        end
      end
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
