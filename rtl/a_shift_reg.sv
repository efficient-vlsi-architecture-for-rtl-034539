// a_shift_reg: multiplier (A) shift register.
//
// Holds the multiplier bits still to be consumed, least significant first,
// with two zero bits appended above bit K-1 so that the iterations for bit
// indices K and K+1 read zero. a1 is the bit of the next iteration and a2 the
// one after it. Each clock the register shifts right by one (shift1) or by
// two (shift2, a skipped iteration); load has priority and takes a new
// operand. Synchronous, active-low reset clears it. The register itself is
// named in the published design; its width, the two padding bits and the two-bit
// shift are this design's.
module a_shift_reg #(
  parameter int unsigned K = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [K-1:0] a_in,
  input  logic         shift1,
  input  logic         shift2,
  output logic         a1,
  output logic         a2
);

  logic [K+1:0] sr;

  always_ff @(posedge clk) begin
    if (!rst_n)      sr <= '0;
    else if (load)   sr <= {2'b00, a_in};
    else if (shift2) sr <= {2'b00, sr[K+1:2]};
    else if (shift1) sr <= {1'b0, sr[K+1:1]};
  end

  assign a1 = sr[0];
  assign a2 = sr[1];

endmodule
