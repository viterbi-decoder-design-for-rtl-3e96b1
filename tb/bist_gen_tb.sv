// bist_gen_tb: the self-test pattern generator against a transmitter model
// written here: a 1 + D^14 + D^15 sequence from the same seed, 56 padding
// zeros, an explicit-tap encoder, this bench's copy of the puncture table
// and the weak-wrong-value injection every 97th value. The chunk stream is
// taken with random backpressure and compared value by value, for every
// rate; the number of values and the done flag are checked.
module bist_gen_tb;
  import vit_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, inject = 0, out_ready = 0;
  rate_e rate = RATE_1_3;
  logic [15:0] nbits = 16'd64;
  logic out_valid, done;
  logic [3:0] out_count;
  soft_t [11:0] out_soft;
  int checks = 0, failures = 0;

  bist_gen dut (.*);
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

  int exp_v [$];

  task automatic build(rate_e r, int nb, bit inj);
    logic [14:0] q;
    logic [6:0] d;
    int nv;
    q = 15'h1D2B;
    d = '0;
    nv = 0;
    exp_v.delete();
    for (int t = 0; t < nb + 56; t++) begin
      logic u;
      logic [2:0] c;
      if (t < nb) begin u = q[13] ^ q[14]; q = {q[13:0], u}; end else u = 0;
      d = {d[5:0], u};   // d[0] = current bit, d[k] = k bits ago
      c[0] = d[0] ^ d[2] ^ d[3] ^ d[5] ^ d[6];
      c[1] = d[0] ^ d[1] ^ d[4] ^ d[5];
      c[2] = d[0] ^ d[1] ^ d[2] ^ d[3] ^ d[4] ^ d[6];
      for (int b = 0; b < 3; b++) if (keep_ref(r, t, b)) begin
        int v;
        v = c[b] ? 7 : 0;
        if (inj && nv % 97 == 96) v = c[b] ? 3 : 4;
        exp_v.push_back(v);
        nv++;
      end
    end
  endtask

  task automatic run(rate_e r, int nb, bit inj);
    int got;
    @(negedge clk);
    rate = r; nbits = 16'(nb); inject = inj; start = 1;
    build(r, nb, inj);
    @(negedge clk);
    start = 0;
    got = 0;
    while (!done) begin
      out_ready = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        for (int i = 0; i < int'(out_count); i++) begin
          checks++;
          if (got >= exp_v.size() || int'(out_soft[i]) != exp_v[got]) begin
            failures++;
            if (failures < 10) $display("rate %s value %0d got %0d", r.name(), got, out_soft[i]);
          end
          got++;
        end
      end
      @(negedge clk);
    end
    checks++;
    if (got != exp_v.size()) begin failures++; $display("rate %s: %0d values, exp %0d", r.name(), got, exp_v.size()); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(RATE_1_3, 64, 0);
    run(RATE_11_32, 200, 1);
    run(RATE_1_2, 96, 1);
    run(RATE_5_8, 160, 1);
    run(RATE_3_4, 120, 1);
    run(RATE_1_3, 64, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
