// mont_pkg: types shared by the Montgomery multiplier blocks.
//
// phase_e is the sequence one multiplication walks through: operand
// pre-computation (D = 2B + N, built in carry-save form and then collapsed to
// binary), the add-shift loop, and the final carry-save to binary conversion.
// fb_sel_e chooses what the feedback multiplexers (M1/M2 of the one-level
// datapath, the feedback wiring of the two-level one) present to the adder:
// the stored carry-save word unshifted, shifted right by one or by two, or an
// operand during pre-computation. These encodings are this design's own.
package mont_pkg;

  typedef enum logic [2:0] {
    PH_IDLE      = 3'd0,
    PH_PRE_LOAD  = 3'd1,   // load 2B and N into the adder
    PH_PRE_CONV  = 3'd2,   // collapse carry-save 2B+N into binary D
    PH_MUL       = 3'd3,   // Montgomery add-shift iterations
    PH_CONV_LOAD = 3'd4,   // final halving (or quartering) of the sum
    PH_CONV      = 3'd5,   // collapse carry-save result into binary
    PH_DONE      = 3'd6
  } phase_e;

  typedef enum logic [1:0] {
    FB_HOLD = 2'd0,        // SS / SC unshifted
    FB_SHR1 = 2'd1,        // SS >> 1, SC >> 1
    FB_SHR2 = 2'd2,        // SS >> 2, SC >> 2 (skipped iteration)
    FB_OPER = 2'd3         // operands 2B / N (pre-computation)
  } fb_sel_e;

endpackage
