// ovf_prev_tb: overflow prevention element, in two configurations. With the
// 7-bit rule (THRESH 64, SUB 32) the worked example 70, 40, 33, 10 must
// become 38, 8, 1, 0. Both that instance and the default one (THRESH 128,
// SUB 64) are then given random metric sets with and without a metric at or
// above the threshold and compared with the rule: subtract SUB and floor at
// 0 when any metric has reached THRESH, otherwise unchanged.
module ovf_prev_tb;
  import vit_pkg::*;
  pm_t [63:0] pm_in, pm_out7, pm_out;
  logic ovf7, ovf;
  int checks = 0, failures = 0;

  ovf_prev #(.THRESH(64), .SUB(32)) dut7 (.pm_in(pm_in), .pm_out(pm_out7), .ovf(ovf7));
  ovf_prev                          dut  (.pm_in(pm_in), .pm_out(pm_out),  .ovf(ovf));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(int th, int sub, pm_t [63:0] o, logic f);
    bit any;
    any = 0;
    for (int s = 0; s < 64; s++) if (int'(pm_in[s]) >= th) any = 1;
    checks++;
    if (f != any) failures++;
    for (int s = 0; s < 64; s++) begin
      int e;
      e = any ? int'(pm_in[s]) - sub : int'(pm_in[s]);
      if (e < 0) e = 0;
      checks++;
      if (int'(o[s]) != e) begin
        failures++;
        if (failures < 10) $display("th %0d state %0d in %0d got %0d exp %0d", th, s, pm_in[s], o[s], e);
      end
    end
  endtask

  initial begin
    pm_in = '0;
    pm_in[0] = 70; pm_in[1] = 40; pm_in[2] = 33; pm_in[3] = 10;
    #1;
    checks++;
    if (pm_out7[0] != 38 || pm_out7[1] != 8 || pm_out7[2] != 1 || pm_out7[3] != 0) begin
      failures++;
      $display("example: %0d %0d %0d %0d", pm_out7[0], pm_out7[1], pm_out7[2], pm_out7[3]);
    end
    check_one(64, 32, pm_out7, ovf7);
    check_one(128, 64, pm_out, ovf);
    for (int t = 0; t < 2000; t++) begin
      for (int s = 0; s < 64; s++)
        case (t % 3)
          0: pm_in[s] = pm_t'($urandom_range(0, 63));
          1: pm_in[s] = pm_t'($urandom_range(0, 127));
          default: pm_in[s] = pm_t'($urandom_range(0, 158));
        endcase
      #1;
      check_one(64, 32, pm_out7, ovf7);
      check_one(128, 64, pm_out, ovf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
