// mont_mult_d1: Montgomery modular multiplier with a two-level configurable
// carry-save adder and iteration skipping.
//
// Computes result = A * B * 2**-K mod N for odd N < 2**K, A < 2**K, B < N,
// with result below 2N, by the same recurrence as mont_mult_d2:
//   T_j = T_{j-1}/2 + q_j*N + A_j*2B,   q_j = bit 0 of T_{j-1}/2,  j = 0..K
// The datapath follows the published block diagram of the two-level design:
// an A shift register, a 2:1 multiplexer choosing 0 or the multiplicand, the
// modified multiplexer MM3 (0, N, 2B, D) steered by the skip detector, CCSA1
// and CCSA2 in series, and the SS / SC registers fed back to CCSA1.
// How the two levels are used is this design's reading of the diagram:
//   pre-computation  CCSA1 takes 2B from the 2:1 multiplexer, CCSA2 takes N
//                    from MM3, so D = 2B + N is loaded in one cycle; after
//                    that both levels run as half adders, so every conversion
//                    cycle ripples the carries two positions instead of one
//   loop             CCSA1 (half-adder mode) takes the shifted SS / SC and
//                    re-inserts a lost carry; CCSA2 (3:2 mode) adds MM3's operand
//   conversion       halve, then two half-adder passes per cycle until SC = 0
// The shift of SS / SC on the feedback path (none, by one, by two) is wiring
// selected by the controller; the diagram shows the feedback lines only.
// Interface and timing as mont_mult_d2: start in idle samples a, b, n; done
// pulses when result is valid; skip_taken pulses per folded iteration. The
// critical path is two adder levels deep, against one in mont_mult_d2.
module mont_mult_d1
  import mont_pkg::*;
#(
  parameter int unsigned K = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic [K-1:0] n,
  output logic         busy,
  output logic         done,
  output logic [K:0]   result,
  output logic         skip_taken,
  output phase_e       phase
);

  localparam int unsigned W = K + 3;

  fb_sel_e fb_sel;
  logic    fa_mode, use_det, pre_load, acc_we, acc_clr, load_ops, load_d;
  logic    sr_shift1, sr_shift2, skip, sc_zero;

  logic [K-1:0] b_q, n_q;
  logic [W-1:0] d_q, ss_q, sc_q;

  logic [W-1:0] b2, n_ext, fb_ss, fb_sc, bmux, mm3, s1, c1, s_new, c_new;
  logic         cin, cout1, cout2, a1, a2, det_q, det_a, mm_a, mm_q;

  assign b2    = W'({b_q, 1'b0});
  assign n_ext = W'(n_q);

  // feedback wiring: stored sum unshifted or shifted, with the lost carry
  always_comb begin
    unique case (fb_sel)
      FB_SHR1: begin fb_ss = ss_q >> 1; fb_sc = sc_q >> 1; cin = ss_q[0] & sc_q[0]; end
      FB_SHR2: begin fb_ss = ss_q >> 2; fb_sc = sc_q >> 2; cin = ss_q[1] & sc_q[1]; end
      default: begin fb_ss = ss_q;      fb_sc = sc_q;      cin = 1'b0;              end
    endcase
  end

  // 2:1 multiplexer: 0 or the (doubled) multiplicand
  assign bmux = pre_load ? b2 : '0;

  skip_detector u_skip (
    .a   (a2),
    .q1  (b2[0]),
    .ss2 (ss_q[2]), .sc2 (sc_q[2]),
    .ss1 (ss_q[1]), .sc1 (sc_q[1]),
    .ss0 (ss_q[0]), .sc0 (sc_q[0]),
    .a1  (a1),
    .a2  (a2),
    .q   (det_q),
    .skip(skip),
    .a_out(det_a)
  );

  // MM3 selects N during the pre-computation load (a = 0, q = 1)
  assign mm_a = use_det & det_a;
  assign mm_q = (use_det & det_q) | pre_load;

  modified_mux #(.W(W)) u_mm3 (
    .a  (mm_a),
    .q  (mm_q),
    .n  (n_ext),
    .b  (b2),
    .d  (d_q),
    .out(mm3)
  );

  ccsa #(.W(W)) u_ccsa1 (
    .fa_mode(pre_load),
    .x      (fb_ss),
    .y      (fb_sc),
    .z      (bmux),
    .cin    (cin),
    .s      (s1),
    .c      (c1),
    .cout   (cout1)
  );

  ccsa #(.W(W)) u_ccsa2 (
    .fa_mode(fa_mode | pre_load),
    .x      (s1),
    .y      (c1),
    .z      (mm3),
    .cin    (1'b0),
    .s      (s_new),
    .c      (c_new),
    .cout   (cout2)
  );

  a_shift_reg #(.K(K)) u_sr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (load_ops),
    .a_in  (a),
    .shift1(sr_shift1),
    .shift2(sr_shift2),
    .a1    (a1),
    .a2    (a2)
  );

  assign sc_zero = (sc_q == '0);

  mont_ctrl #(.K(K)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .skip      (skip),
    .sc_zero   (sc_zero),
    .phase     (phase),
    .fb_sel    (fb_sel),
    .fa_mode   (fa_mode),
    .use_det   (use_det),
    .pre_load  (pre_load),
    .acc_we    (acc_we),
    .acc_clr   (acc_clr),
    .load_ops  (load_ops),
    .load_d    (load_d),
    .sr_shift1 (sr_shift1),
    .sr_shift2 (sr_shift2),
    .busy      (busy),
    .done      (done),
    .skip_taken(skip_taken)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_q  <= '0;
      n_q  <= '0;
      d_q  <= '0;
      ss_q <= '0;
      sc_q <= '0;
    end else begin
      if (load_ops) begin
        b_q <= b;
        n_q <= n;
      end
      if (load_d) d_q <= ss_q;
      if (acc_clr) begin
        ss_q <= '0;
        sc_q <= '0;
      end else if (acc_we) begin
        ss_q <= s_new;
        sc_q <= c_new;
      end
    end
  end

  assign result = ss_q[K:0];

  property p_even_sum;
    @(posedge clk) disable iff (!rst_n) (phase == PH_MUL) |-> (ss_q[0] == sc_q[0]);
  endproperty
  a_even_sum: assert property (p_even_sum);

  // SS / SC are wide enough that neither level drops a carry (T < 6N < 2**W).
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) acc_we |-> !(cout1 | cout2));

endmodule
