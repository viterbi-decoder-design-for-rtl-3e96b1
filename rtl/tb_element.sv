// tb_element: radix-4 traceback element for one trellis state. If the
// traceback path is present in this state (path_in) the element asserts the
// one of its four survivor outputs named by the state's 2-bit decision,
// i.e. it passes the path to predecessor {dec, s[5:2]}; with no path it
// asserts none. Combinational.
//
// Follows the document's radix-4 traceback element (survivor "00" drives
// survivor path 0, "01" path 1 and so on).
module tb_element (
  input  logic       path_in,
  input  logic [1:0] dec,
  output logic [3:0] path_out
);

  always_comb begin
    path_out = '0;
    path_out[dec] = path_in;
  end

endmodule
