// arith_cs4: four-input arithmetic compare-select. Instead of a tree of
// compare-then-mux stages it compares all six pairs at once and derives the
// index of the largest value from the six comparison bits with fixed logic,
// so the critical path is one subtractor, that logic and one 4:1 mux.
//
// r(i,j) = 1 means v[i] >= v[j] (i < j). Input i is the maximum when it beats
// all three others; because ties go to the lower index the six bits always
// describe a strict order and exactly one input qualifies. Combinational.
//
// The all-pairs comparison and the select-from-relations idea follow the
// document (relation r = 1 when the first value is the larger, as its
// relation table defines it); the select equations are derived here from
// those relations and the tie rule is this design's choice.
module arith_cs4 #(
  parameter int W = 7
) (
  input  logic [3:0][W-1:0] v,
  output logic [1:0]        sel,
  output logic [W-1:0]      vmax
);

  // ge(a, b): no borrow out of a - b.
  function automatic logic ge(input logic [W-1:0] a, input logic [W-1:0] b);
    logic [W:0] d;
    d = {1'b0, a} - {1'b0, b};
    return ~d[W];
  endfunction

  logic r1, r2, r3, r4, r5, r6;
  logic max0, max1, max2;

  always_comb begin
    r1 = ge(v[0], v[1]);
    r2 = ge(v[0], v[2]);
    r3 = ge(v[0], v[3]);
    r4 = ge(v[1], v[2]);
    r5 = ge(v[1], v[3]);
    r6 = ge(v[2], v[3]);
    max0 = r1 & r2 & r3;
    max1 = ~r1 & r4 & r5;
    max2 = ~r2 & ~r4 & r6;
    sel  = {~max0 & ~max1, ~max0 & ~max2};
    vmax = v[sel];
  end

endmodule
