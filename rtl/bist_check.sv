// bist_check: self-check circuit of the built-in self-test. It regenerates
// the generator's pseudo-random sequence with its own prbs15 (same seed) and
// compares each decoded byte as it appears: the first nbits/8 bytes with the
// next eight sequence bits, the following byte (decoded padding) with zero.
// errors counts wrong bits (saturating), bytes counts compared bytes, done
// rises with the last expected byte. start clears everything.
//
// A cycle-accurate self-check circuit on the FPGA follows the document; the
// counters and the frame format are this design's.
module bist_check (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] nbits,
  input  logic        dec_valid,
  input  logic [7:0]  dec_bits,
  output logic [15:0] errors,
  output logic [12:0] bytes,
  output logic        done
);

  logic [7:0] ref_bits, exp_b, diff;
  logic       is_msg;
  logic [3:0] nerr;

  assign is_msg = (bytes < nbits[15:3]);
  assign exp_b  = is_msg ? ref_bits : 8'h00;
  assign diff   = dec_bits ^ exp_b;

  always_comb begin
    nerr = '0;
    for (int i = 0; i < 8; i++) nerr = nerr + 4'(diff[i]);
  end

  prbs15 #(.N(8)) u_prbs (
    .clk, .rst_n, .init(start), .adv(dec_valid && !done && is_msg), .bits(ref_bits)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      errors <= '0;
      bytes  <= '0;
      done   <= 1'b0;
    end else if (start) begin
      errors <= '0;
      bytes  <= '0;
      done   <= 1'b0;
    end else if (dec_valid && !done) begin
      bytes  <= bytes + 1'b1;
      errors <= (errors > 16'hFFF0) ? 16'hFFFF : errors + 16'(nerr);
      if (bytes == nbits[15:3]) done <= 1'b1;
    end
  end

endmodule
