// tb_control_tb: random decision pairs with random idle clocks into the
// survivor register bank. A queue here records every radix-4 step in
// arrival order; after each clock the bank row k must hold the k-th newest
// step. Also checks that tracebacks start on every second shift and finish
// on the shift after, and that start_ok rises after exactly 12 shifts
// (traceback 20 steps plus 4 decoded steps, two steps per shift).
module tb_control_tb;
  import vit_pkg::*;

  logic clk = 0, rst_n = 0, clr = 0, in_valid = 0;
  logic [63:0][1:0] dec1 = '0, dec2 = '0;
  logic [27:0][63:0][1:0] mem;
  logic shift, do_a, do_b, start_ok;
  int checks = 0, failures = 0;

  tb_control dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] hist [$];
  int nshift = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      if (t == 300) begin clr = 1; @(negedge clk); clr = 0; nshift = 0; end
      dec1 = {$urandom, $urandom, $urandom, $urandom};
      dec2 = {$urandom, $urandom, $urandom, $urandom};
      in_valid = ($urandom_range(0, 3) != 0);
      #1;
      checks += 4;
      if (shift != in_valid) failures++;
      if (do_a != (in_valid && nshift % 2 == 0)) failures++;
      if (do_b != (in_valid && nshift % 2 == 1)) failures++;
      if (start_ok != (nshift >= 12)) begin failures++; $display("start_ok at %0d shifts", nshift); end
      if (in_valid) begin
        hist.push_front(dec1);
        hist.push_front(dec2);
        nshift++;
      end
      @(posedge clk);
      #1;
      for (int k = 0; k < 28 && k < hist.size(); k++) begin
        checks++;
        if (mem[k] !== hist[k]) begin
          failures++;
          if (failures < 10) $display("t=%0d row %0d mismatch", t, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
