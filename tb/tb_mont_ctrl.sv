// tb_mont_ctrl: drives the controller alone with random skip and
// carry-zero inputs and follows an independent model of the operation:
// pre-computation load, a random number of conversion passes, the loop over
// bit indices 0..K (advancing by two on a skip, dropping the last index when a
// skip is seen there), the final halving or quartering, conversion passes and
// the done pulse. Every cycle the phase and the control outputs of that step
// are compared with the model. Runs at K = 6.
module tb_mont_ctrl;
  import mont_pkg::*;
  localparam int K = 6;

  logic    clk, rst_n, start, skip, sc_zero;
  phase_e  phase;
  fb_sel_e fb_sel;
  logic    fa_mode, use_det, pre_load, acc_we, acc_clr, load_ops, load_d;
  logic    sr_shift1, sr_shift2, busy, done, skip_taken;
  int      checks = 0, failures = 0, n_skip = 0, n_drop = 0;

  mont_ctrl #(.K(K)) dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic expect_eq(input int got, input int want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (phase %s)", what, got, want, phase.name());
    end
  endtask

  initial begin
    int idx, passes;
    bit dropped;
    rst_n = 1'b0; start = 1'b0; skip = 1'b0; sc_zero = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      // idle, request
      expect_eq(phase, PH_IDLE, "idle phase");
      expect_eq(busy, 0, "idle busy");
      start = 1'b1;
      #1;
      expect_eq(load_ops, 1, "load_ops");
      expect_eq(acc_clr, 1, "start clears");
      @(negedge clk);
      start = 1'b0;
      // pre-computation load
      expect_eq(phase, PH_PRE_LOAD, "pre load phase");
      expect_eq(fb_sel, FB_OPER, "pre load operands");
      expect_eq(pre_load & acc_we, 1, "pre load write");
      @(negedge clk);
      // pre-computation conversion
      passes = $urandom % 4;
      for (int p = 0; p <= passes; p++) begin
        sc_zero = (p == passes);
        #1;
        expect_eq(phase, PH_PRE_CONV, "pre conv phase");
        expect_eq(fb_sel, FB_HOLD, "pre conv unshifted");
        expect_eq(fa_mode, 0, "pre conv half adders");
        expect_eq(acc_we, !sc_zero, "pre conv write");
        expect_eq(load_d, sc_zero, "load D");
        expect_eq(acc_clr, sc_zero, "clear before loop");
        @(negedge clk);
      end
      // loop
      idx = 0; dropped = 0;
      while (idx <= K) begin
        skip = ($urandom % 3) == 0;
        #1;
        expect_eq(phase, PH_MUL, "loop phase");
        expect_eq(fa_mode & use_det, 1, "loop 3:2 mode");
        if (skip && idx == K) begin
          expect_eq(acc_we, 0, "dropped last iteration");
          dropped = 1; n_drop++;
          idx++;
        end else if (skip) begin
          expect_eq(fb_sel, FB_SHR2, "fold shift");
          expect_eq(sr_shift2 & skip_taken & acc_we, 1, "fold strobes");
          n_skip++;
          idx += 2;
        end else begin
          expect_eq(fb_sel, FB_SHR1, "normal shift");
          expect_eq(sr_shift1 & acc_we, 1, "normal strobes");
          expect_eq(skip_taken, 0, "no fold");
          idx++;
        end
        @(negedge clk);
      end
      skip = 1'b0;
      // final conversion
      #1;
      expect_eq(phase, PH_CONV_LOAD, "conv load phase");
      expect_eq(fb_sel, dropped ? FB_SHR2 : FB_SHR1, "final shift");
      expect_eq(acc_we, 1, "conv load write");
      @(negedge clk);
      passes = $urandom % 4;
      for (int p = 0; p <= passes; p++) begin
        sc_zero = (p == passes);
        #1;
        expect_eq(phase, PH_CONV, "conv phase");
        expect_eq(acc_we, !sc_zero, "conv write");
        expect_eq(done, 0, "done early");
        @(negedge clk);
      end
      expect_eq(done, 1, "done pulse");
      expect_eq(busy, 1, "busy at done");
      @(negedge clk);
      sc_zero = 1'b0;
    end
    expect_eq(n_skip > 0, 1, "folds occurred");
    expect_eq(n_drop > 0, 1, "drops occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
