// prbs15: pseudo-random bit source with the generator 1 + D^14 + D^15
// (x[n] = x[n-14] ^ x[n-15]), producing N bits per advance. bits[0] is the
// first bit of the group. init reloads SEED; adv moves on by N bits. The
// register holds the last 15 bits, q[0] the newest.
//
// The polynomial is the one of the UWB frame scrambler; using it as the test
// pattern source of the self-test is this design's choice.
module prbs15 #(
  parameter int          N    = 8,
  parameter logic [14:0] SEED = 15'h1D2B
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         adv,
  output logic [N-1:0] bits
);

  logic [14:0] q, q_nx;

  always_comb begin
    q_nx = q;
    for (int i = 0; i < N; i++) begin
      bits[i] = q_nx[13] ^ q_nx[14];
      q_nx    = {q_nx[13:0], bits[i]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= SEED;
    else if (init) q <= SEED;
    else if (adv)  q <= q_nx;
  end

endmodule
