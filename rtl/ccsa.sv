// ccsa: configurable carry-save adder (CCSA).
//
// Every bit position is two half adders in series. The first adds x and y,
// the second adds z to that sum. With fa_mode = 1 the two half adders form a
// full adder and the block is an ordinary 3:2 carry-save adder:
//   s = x ^ y ^ z,  carry = majority(x, y, z)
// With fa_mode = 0 only the first half adder's result is used and z is ignored:
//   s = x ^ y,      carry = x & y
// The half-adder configuration is what collapses a carry-save pair into
// binary: applied repeatedly to (s, c) it ripples the carries one position per
// pass, and the pair is binary once c is zero. That is how the operand
// pre-computation and the final format conversion reuse this adder.
//
// The carry vector c is returned already weighted (shifted left by one), so
// x + y + z (or x + y) + cin == s + c exactly while the true sum stays below
// 2**W, in which case cout is zero. Bit 0 of c is free and carries cin, which
// the multipliers use to re-insert a carry lost when they shift s and c
// right separately.
// Purely combinational. Two serial half adders per bit follow the published design;
// the carry-in at bit 0 is this design's own.
module ccsa #(
  parameter int unsigned W = 7
) (
  input  logic         fa_mode,  // 1: 3:2 CSA, 0: half-adder pass
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  input  logic         cin,      // weight-1 carry-in, placed in c[0]
  output logic [W-1:0] s,        // sum vector
  output logic [W-1:0] c,        // carry vector, weight already applied
  output logic         cout      // carry out of the top position (dropped)
);

  logic [W-1:0] s1, c1;   // first half adder
  logic [W-1:0] s2, c2;   // second half adder
  logic [W-1:0] cy;       // carry out of each position

  always_comb begin
    s1 = x ^ y;
    c1 = x & y;
    s2 = s1 ^ (z & {W{fa_mode}});
    c2 = s1 & (z & {W{fa_mode}});
    cy = c1 | c2;
    s  = s2;
    c  = {cy[W-2:0], cin};
    cout = cy[W-1];
  end

endmodule
