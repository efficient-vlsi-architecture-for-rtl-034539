// skip_detector: chooses the quotient bit and multiplier bit of the next
// add-shift iteration and tells whether one iteration can be skipped.
//
// The stored carry-save sum T = SS + SC is the un-halved result of the last
// iteration; the next iteration works on T/2. Its quotient bit is bit 1 of T,
//   q_next = (ss1 ^ sc1) ^ (ss0 & sc0)
// and its multiplier bit is a1. When both are zero the iteration adds nothing
// and only halves, so it can be folded into the following one (shift by two).
// skip is raised conservatively when ss1 ^ sc1, ss0 & sc0 and a1 are all 0.
// The skipped-to iteration then uses multiplier bit a2 and quotient bit
//   q_skip = (ss2 ^ sc2) ^ (a & q1) ^ (ss1 & sc1)
// which is bit 2 of T (the carry from bit 1 is ss1 & sc1 under the skip
// condition) plus the product term a & q1. The multipliers drive a with a2,
// the multiplier bit of the skipped-to iteration, and q1 with bit 0 of the
// multiplicand operand they add; they add 2B, so that term is zero there.
//
// The gate network (five XOR, three AND, one NOR and two 2:1 multiplexers
// steered by skip) is the published one; the meaning given to each input is
// this design's reading of it. Purely combinational. The output published as
// A is a_out here.
module skip_detector (
  input  logic a,      // multiplier bit for the skipped-to iteration's product term
  input  logic q1,     // multiplicand bit 0 for that product term
  input  logic ss2, sc2,
  input  logic ss1, sc1,
  input  logic ss0, sc0,
  input  logic a1,     // multiplier bit of the next iteration
  input  logic a2,     // multiplier bit of the iteration after it
  output logic q,      // quotient bit to use
  output logic skip,   // 1: fold the next iteration, shift by two
  output logic a_out   // multiplier bit to use
);

  logic and_aq, xor_s2, and_s1, xor_s1, and_s0, xor_top;
  logic q_skip, q_noskip;

  always_comb begin
    and_aq   = a & q1;
    xor_s2   = ss2 ^ sc2;
    and_s1   = ss1 & sc1;
    xor_s1   = ss1 ^ sc1;
    and_s0   = ss0 & sc0;
    xor_top  = and_aq ^ xor_s2;
    q_skip   = xor_top ^ and_s1;
    q_noskip = xor_s1 ^ and_s0;
    skip     = ~(xor_s1 | and_s0 | a1);
    q        = skip ? q_skip : q_noskip;
    a_out    = skip ? a2 : a1;
  end

endmodule
