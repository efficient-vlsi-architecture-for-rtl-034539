// mont_mult_d2: Montgomery modular multiplier with a one-level configurable
// carry-save adder and iteration skipping (the faster of the two proposed
// datapaths).
//
// Computes result = A * B * 2**-K mod N for odd N < 2**K, A < 2**K, B < N.
// The result is congruent to that value and below 2N (no final subtraction).
// Internally each iteration j forms, in carry-save form (SS, SC),
//   T_j = T_{j-1}/2 + q_j*N + A_j*2B,    q_j = bit 0 of T_{j-1}/2
// i.e. S_{j+1} = (S_j + q_j N)/2 + A_j B with S = T/2, for j = 0..K. Adding the
// multiplicand doubled makes q depend on the stored sum only, which is what
// lets the skip detector compute it from the three low bits of SS and SC.
// The datapath follows the published block diagram: registers B, N, D,
// multiplexers M1 (SS, SS>>1, SS>>2, 2B) and M2 (SC, SC>>1, SC>>2, N), the
// modified multiplexer MM3 (0, N, 2B, D) steered by the skip detector, one
// CCSA and the SS / SC registers.
// One multiplication runs:
//   pre-computation  D = 2B + N: one 3-input load, then CCSA half-adder passes
//                    until SC = 0 (at most about K passes)
//   loop             K+1 iterations less one per skip (shift by two)
//   conversion       halve, then half-adder passes until SC = 0
// Interface: start (one cycle, in idle) samples a, b, n; done pulses one cycle
// when result is valid; result holds until the next start. skip_taken pulses
// for every folded iteration; phase exposes the control state.
// The published design gives the block diagram, the skip detector and MM3; the
// doubled multiplicand (D = 2B + N rather than B + N), the widths (K+3 bits for
// SS/SC, enough for T < 6N) and the handshake are this design's choices.
module mont_mult_d2
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

  // control
  fb_sel_e fb_sel;
  logic    fa_mode, use_det, pre_load, acc_we, acc_clr, load_ops, load_d;
  logic    sr_shift1, sr_shift2, skip, sc_zero;

  // registers
  logic [K-1:0] b_q, n_q;
  logic [W-1:0] d_q, ss_q, sc_q;

  // datapath nets
  logic [W-1:0] b2, n_ext, m1, m2, mm3, s_new, c_new;
  logic         cin, cout, a1, a2, det_q, det_a, mm_a, mm_q;

  assign b2    = W'({b_q, 1'b0});
  assign n_ext = W'(n_q);

  // M1 / M2 feedback and operand multiplexers
  always_comb begin
    unique case (fb_sel)
      FB_HOLD: begin m1 = ss_q;      m2 = sc_q;      cin = 1'b0;              end
      FB_SHR1: begin m1 = ss_q >> 1; m2 = sc_q >> 1; cin = ss_q[0] & sc_q[0]; end
      FB_SHR2: begin m1 = ss_q >> 2; m2 = sc_q >> 2; cin = ss_q[1] & sc_q[1]; end
      default: begin m1 = b2;        m2 = n_ext;     cin = 1'b0;              end
    endcase
  end

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

  assign mm_a = use_det & det_a;
  assign mm_q = use_det & det_q;

  modified_mux #(.W(W)) u_mm3 (
    .a  (mm_a),
    .q  (mm_q),
    .n  (n_ext),
    .b  (b2),
    .d  (d_q),
    .out(mm3)
  );

  ccsa #(.W(W)) u_ccsa (
    .fa_mode(fa_mode),
    .x      (m1),
    .y      (m2),
    .z      (mm3),
    .cin    (cin),
    .s      (s_new),
    .c      (c_new),
    .cout   (cout)
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

  // Only the three low bits of the stored sum feed the skip detector, so a
  // shifted pair must never lose a carry the detector did not account for.
  property p_even_sum;
    @(posedge clk) disable iff (!rst_n) (phase == PH_MUL) |-> (ss_q[0] == sc_q[0]);
  endproperty
  a_even_sum: assert property (p_even_sum);

  // SS / SC are wide enough that the adder never drops a carry (T < 6N < 2**W).
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) acc_we |-> !cout);

  // pre_load is decoded by the controller for the two-level datapath; here the
  // operand load goes through M1 / M2 (fb_sel = FB_OPER).
  logic unused_pre_load;
  assign unused_pre_load = pre_load;

endmodule
