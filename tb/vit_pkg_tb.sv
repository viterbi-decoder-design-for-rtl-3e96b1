// vit_pkg_tb: checks the package's trellis functions against a model built
// here from the generator polynomials written out as explicit delay taps:
// encoder outputs for every state and input, radix-4 labels for every state
// and predecessor, and the number of bits each puncture pattern keeps over
// its period (32 of 33, 2 of 3, 8 of 15 and 4 of 9).
module vit_pkg_tb;
  import vit_pkg::*;

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // d[k] = information bit k stages ago, d[0] = current.
  function automatic logic [2:0] ref_enc(logic [6:0] d);
    logic a, b, c;
    a = d[0] ^ d[2] ^ d[3] ^ d[5] ^ d[6];
    b = d[0] ^ d[1] ^ d[4] ^ d[5];
    c = d[0] ^ d[1] ^ d[2] ^ d[3] ^ d[4] ^ d[6];
    return {c, b, a};
  endfunction

  initial begin
    for (int s = 0; s < 64; s++)
      for (int u = 0; u < 2; u++) begin
        logic [6:0] d;
        d[0] = 1'(u);
        for (int k = 1; k < 7; k++) d[k] = 1'(s >> (k - 1));
        checks++;
        if (enc_out(6'(s), 1'(u)) !== ref_enc(d)) begin
          failures++;
          $display("enc_out s=%0d u=%0d", s, u);
        end
      end
    // Radix-4: history older..newer = predecessor bits then u1, u2.
    for (int s = 0; s < 64; s++)
      for (int j = 0; j < 4; j++) begin
        logic [7:0] h;       // h[0] = u2 (newest) ... h[7] = oldest
        logic [6:0] d1, d2;
        logic [5:0] exp_l;
        h = {2'(j), 6'(s)};   // predecessor {j, s[5:2]} then u1 = s[1], u2 = s[0]
        d2 = h[6:0];
        d1 = h[7:1];
        exp_l = {ref_enc(d2), ref_enc(d1)};
        checks++;
        if (r4_label(s, j) !== exp_l) begin
          failures++;
          $display("r4_label s=%0d j=%0d got %b exp %b", s, j, r4_label(s, j), exp_l);
        end
      end
    begin
      rate_e rs [5] = '{RATE_1_3, RATE_11_32, RATE_1_2, RATE_5_8, RATE_3_4};
      int per_e [5] = '{1, 11, 1, 5, 3};
      int num_e [5] = '{3, 32, 2, 8, 4};
      for (int r = 0; r < 5; r++) begin
        int n;
        n = 0;
        for (int ph = 0; ph < punct_period(rs[r]); ph++)
          for (int b = 0; b < 3; b++) n += int'(punct_keep(rs[r], ph, b));
        checks += 2;
        if (punct_period(rs[r]) != per_e[r]) failures++;
        if (n != num_e[r]) begin
          failures++;
          $display("rate %s keeps %0d per period", rs[r].name(), n);
        end
        checks++;
        if (!punct_keep(rs[r], 0, 0)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
