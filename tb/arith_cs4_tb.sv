// arith_cs4_tb: the four-input arithmetic compare-select against a linear
// scan (first index of the largest value). Exhaustive over 3-bit inputs at
// W = 3, then random 7-bit inputs with many ties at the default width.
module arith_cs4_tb;
  logic [3:0][2:0] v3;
  logic [1:0] s3;
  logic [2:0] m3;
  logic [3:0][6:0] v7;
  logic [1:0] s7;
  logic [6:0] m7;
  int checks = 0, failures = 0;

  arith_cs4 #(.W(3)) dut3 (.v(v3), .sel(s3), .vmax(m3));
  arith_cs4           dut7 (.v(v7), .sel(s7), .vmax(m7));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 4096; x++) begin
      int bi;
      v3 = 12'(x);
      #1;
      bi = 0;
      for (int i = 1; i < 4; i++) if (v3[i] > v3[bi]) bi = i;
      checks++;
      if (int'(s3) != bi || m3 != v3[bi]) begin
        failures++;
        if (failures < 10) $display("v=%p sel=%0d exp %0d", v3, s3, bi);
      end
    end
    for (int t = 0; t < 20000; t++) begin
      int bi;
      for (int i = 0; i < 4; i++) v7[i] = (t % 3 == 0) ? 7'($urandom_range(60, 63)) : 7'($urandom);
      #1;
      bi = 0;
      for (int i = 1; i < 4; i++) if (v7[i] > v7[bi]) bi = i;
      checks++;
      if (int'(s7) != bi || m7 != v7[bi]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
