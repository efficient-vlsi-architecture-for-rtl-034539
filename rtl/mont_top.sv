// mont_top: the two Montgomery multiplier datapaths side by side.
//
// d1_* is the two-level CCSA multiplier (mont_mult_d1), d2_* the one-level
// one (mont_mult_d2). Both compute A * B * 2**-K mod N (result below 2N) for
// odd N < 2**K, A < 2**K and B < N, share clock and reset, and have their own
// start / done handshake: start is a one-cycle request while the unit is idle,
// done a one-cycle pulse when result is valid. skip_taken pulses whenever an
// iteration is folded into the next one. K defaults to 4, the operand width of
// the published simulations.
module mont_top
  import mont_pkg::*;
#(
  parameter int unsigned K = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  // two-level design
  input  logic         d1_start,
  input  logic [K-1:0] d1_a,
  input  logic [K-1:0] d1_b,
  input  logic [K-1:0] d1_n,
  output logic         d1_busy,
  output logic         d1_done,
  output logic [K:0]   d1_result,
  output logic         d1_skip_taken,
  output phase_e       d1_phase,
  // one-level design
  input  logic         d2_start,
  input  logic [K-1:0] d2_a,
  input  logic [K-1:0] d2_b,
  input  logic [K-1:0] d2_n,
  output logic         d2_busy,
  output logic         d2_done,
  output logic [K:0]   d2_result,
  output logic         d2_skip_taken,
  output phase_e       d2_phase
);

  mont_mult_d1 #(.K(K)) u_d1 (
    .clk, .rst_n,
    .start     (d1_start),
    .a         (d1_a),
    .b         (d1_b),
    .n         (d1_n),
    .busy      (d1_busy),
    .done      (d1_done),
    .result    (d1_result),
    .skip_taken(d1_skip_taken),
    .phase     (d1_phase)
  );

  mont_mult_d2 #(.K(K)) u_d2 (
    .clk, .rst_n,
    .start     (d2_start),
    .a         (d2_a),
    .b         (d2_b),
    .n         (d2_n),
    .busy      (d2_busy),
    .done      (d2_done),
    .result    (d2_result),
    .skip_taken(d2_skip_taken),
    .phase     (d2_phase)
  );

endmodule
