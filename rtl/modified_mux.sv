// modified_mux: the simplified operand multiplexer MM3.
//
// A 4:1 multiplexer choosing the addend of one Montgomery iteration from
// (a, q): 0, N, B or D = B + N. Because one of the four inputs is zero it is
// built, as in the published design, from two 2:1 multiplexers and an AND: the first
// multiplexer picks B or D by q, the AND gives N & q, and the second
// multiplexer picks between those two by a.
//   a q : out
//   0 0 : 0      0 1 : n      1 0 : b      1 1 : d
// The published design draws an inversion on the output; here the true operand is
// produced, which is this design's choice. Purely combinational.
module modified_mux #(
  parameter int unsigned W = 7
) (
  input  logic         a,
  input  logic         q,
  input  logic [W-1:0] n,
  input  logic [W-1:0] b,
  input  logic [W-1:0] d,
  output logic [W-1:0] out
);

  logic [W-1:0] bd_sel, n_gated;

  always_comb begin
    bd_sel  = q ? d : b;
    n_gated = n & {W{q}};
    out     = a ? bd_sel : n_gated;
  end

endmodule
