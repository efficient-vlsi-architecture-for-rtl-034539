// mont_ctrl: control part of the Montgomery multipliers.
//
// Sequences one multiplication S = A*B*2**-K mod N (result below 2N):
//   PRE_LOAD  : the adder receives 2B and N (D = 2B + N in carry-save form)
//   PRE_CONV  : half-adder passes until the carry vector is zero, then D is
//               stored and the accumulator cleared
//   MUL       : iterations for multiplier bit indices 0..K (bit K is zero).
//               Each cycle consumes one index, or two when the skip detector
//               says the first of them adds nothing. If a skip is signalled
//               for the last index K, that iteration is dropped without a
//               write and the result is the stored sum divided by four.
//   CONV_LOAD : the stored sum is halved (or quartered after a dropped last
//               iteration) into the adder in half-adder mode
//   CONV      : half-adder passes until the carry vector is zero
//   DONE      : one-cycle done pulse; the result stays in SS until the next start
// start is sampled in IDLE only. busy is high from the cycle after start until
// done. skip_taken pulses for each cycle that consumed two indices, so
// MUL cycles + skip_taken pulses = K + 1.
// The published design names the control part and the phases it implies
// (pre-computation, add-shift loop with skipping, format conversion); the state
// encoding, the handshake and the end-of-loop rule are this design's.
module mont_ctrl
  import mont_pkg::*;
#(
  parameter int unsigned K = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  logic    skip,       // from the skip detector
  input  logic    sc_zero,    // carry vector register is all zero
  output phase_e  phase,
  output fb_sel_e fb_sel,     // feedback / operand selection
  output logic    fa_mode,    // adder in 3:2 mode (else half-adder mode)
  output logic    use_det,    // MM3 steered by the skip detector
  output logic    pre_load,   // pre-computation load cycle
  output logic    acc_we,     // write SS / SC from the adder
  output logic    acc_clr,    // clear SS / SC
  output logic    load_ops,   // capture operands, load A shift register
  output logic    load_d,     // capture D from SS
  output logic    sr_shift1,
  output logic    sr_shift2,
  output logic    busy,
  output logic    done,
  output logic    skip_taken
);

  localparam int unsigned IW = $clog2(K + 3);
  localparam logic [IW-1:0] LAST = IW'(K);

  phase_e        ph_q, ph_d;
  logic [IW-1:0] idx_q, idx_d;      // next multiplier bit index
  logic          sh2_q, sh2_d;      // final conversion quarters instead of halving

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ph_q  <= PH_IDLE;
      idx_q <= '0;
      sh2_q <= 1'b0;
    end else begin
      ph_q  <= ph_d;
      idx_q <= idx_d;
      sh2_q <= sh2_d;
    end
  end

  always_comb begin
    ph_d       = ph_q;
    idx_d      = idx_q;
    sh2_d      = sh2_q;
    fb_sel     = FB_HOLD;
    fa_mode    = 1'b0;
    use_det    = 1'b0;
    pre_load   = 1'b0;
    acc_we     = 1'b0;
    acc_clr    = 1'b0;
    load_ops   = 1'b0;
    load_d     = 1'b0;
    sr_shift1  = 1'b0;
    sr_shift2  = 1'b0;
    done       = 1'b0;
    skip_taken = 1'b0;
    unique case (ph_q)
      PH_IDLE: begin
        if (start) begin
          load_ops = 1'b1;
          acc_clr  = 1'b1;
          ph_d     = PH_PRE_LOAD;
        end
      end
      PH_PRE_LOAD: begin
        fb_sel   = FB_OPER;
        pre_load = 1'b1;
        acc_we   = 1'b1;
        ph_d     = PH_PRE_CONV;
      end
      PH_PRE_CONV: begin
        if (sc_zero) begin
          load_d  = 1'b1;
          acc_clr = 1'b1;
          idx_d   = '0;
          ph_d    = PH_MUL;
        end else begin
          acc_we = 1'b1;
        end
      end
      PH_MUL: begin
        fa_mode = 1'b1;
        use_det = 1'b1;
        if (skip && idx_q == LAST) begin
          // last iteration adds nothing: drop it, quarter instead of halve
          sh2_d = 1'b1;
          ph_d  = PH_CONV_LOAD;
        end else if (skip) begin
          fb_sel     = FB_SHR2;
          acc_we     = 1'b1;
          sr_shift2  = 1'b1;
          skip_taken = 1'b1;
          idx_d      = idx_q + IW'(2);
          sh2_d      = 1'b0;
          if (idx_q + IW'(1) == LAST) ph_d = PH_CONV_LOAD;
        end else begin
          fb_sel    = FB_SHR1;
          acc_we    = 1'b1;
          sr_shift1 = 1'b1;
          idx_d     = idx_q + IW'(1);
          sh2_d     = 1'b0;
          if (idx_q == LAST) ph_d = PH_CONV_LOAD;
        end
      end
      PH_CONV_LOAD: begin
        fb_sel = sh2_q ? FB_SHR2 : FB_SHR1;
        acc_we = 1'b1;
        ph_d   = PH_CONV;
      end
      PH_CONV: begin
        if (sc_zero) ph_d = PH_DONE;
        else         acc_we = 1'b1;
      end
      PH_DONE: begin
        done = 1'b1;
        ph_d = PH_IDLE;
      end
      default: ph_d = PH_IDLE;
    endcase
  end

  assign phase = ph_q;
  assign busy  = (ph_q != PH_IDLE);

endmodule
