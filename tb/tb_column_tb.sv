// tb_column_tb: one traceback column with random decisions and random one-
// hot or multi-hot path vectors; the predecessor vector is rebuilt here by
// shifting each marked state right by two and putting its decision on top.
module tb_column_tb;
  logic [63:0] path_in, path_out;
  logic [63:0][1:0] dec;
  int checks = 0, failures = 0;

  tb_column dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      logic [63:0] e;
      for (int s = 0; s < 64; s++) dec[s] = 2'($urandom);
      if (t % 2) path_in = 64'(1) << $urandom_range(0, 63);
      else path_in = {$urandom, $urandom};
      #1;
      e = '0;
      for (int s = 0; s < 64; s++) if (path_in[s]) e[(int'(dec[s]) << 4) | (s >> 2)] = 1'b1;
      checks++;
      if (path_out !== e) begin
        failures++;
        if (failures < 5) $display("in %h got %h exp %h", path_in, path_out, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
