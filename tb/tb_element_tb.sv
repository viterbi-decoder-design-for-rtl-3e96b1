// tb_element_tb: exhaustive check of the radix-4 traceback element: the path
// goes to output dec when present, nowhere when absent.
module tb_element_tb;
  logic path_in;
  logic [1:0] dec;
  logic [3:0] path_out;
  int checks = 0, failures = 0;

  tb_element dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 2; p++)
      for (int d = 0; d < 4; d++) begin
        path_in = 1'(p);
        dec = 2'(d);
        #1;
        checks++;
        if (path_out !== (p ? 4'(1 << d) : 4'b0)) begin
          failures++;
          $display("p=%0d d=%0d out=%b", p, d, path_out);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
