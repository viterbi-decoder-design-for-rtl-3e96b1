// tb_column: one radix-4 step of the combinational traceback. Sixty-four
// traceback elements take the one-hot path vector after the step and that
// step's survivor decisions; predecessor p = {j, s[5:2]} collects output j of
// the elements of states s. The result is the one-hot path vector before the
// step. Combinational.
//
// The one-hot column of traceback elements follows the document.
module tb_column
  import vit_pkg::*;
(
  input  logic [NSTATE-1:0]      path_in,
  input  logic [NSTATE-1:0][1:0] dec,
  output logic [NSTATE-1:0]      path_out
);

  logic [NSTATE-1:0][3:0] po;

  for (genvar s = 0; s < NSTATE; s++) begin : g_te
    tb_element u_te (.path_in(path_in[s]), .dec(dec[s]), .path_out(po[s]));
  end

  always_comb
    for (int p = 0; p < NSTATE; p++) begin
      path_out[p] = 1'b0;
      for (int k = 0; k < 4; k++) path_out[p] = path_out[p] | po[(p % 16) * 4 + k][p / 16];
    end

endmodule
