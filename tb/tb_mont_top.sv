// tb_mont_top: end-to-end test of both multipliers at the default operand
// width (K = 4, no parameter override).
// Every odd modulus N < 16, every A < 16 and every B < N is multiplied on the
// two-level and the one-level unit at the same time. Each result must be
// congruent to A*B*2**-4 mod N (computed here by modular halving) and below
// 2N, and the loop length must be K+1 less the number of folded iterations.
// The test also counts, per unit, how often each mechanism of the design
// occurred and fails if one never did: folded iterations (shift by two),
// dropped last iterations, carry re-insertion after a separate shift of SS
// and SC, pre-computation and final conversions that need more than one
// half-adder pass, and each of the four MM3 operands 0, N, 2B and D.
module tb_mont_top;
  import mont_pkg::*;
  localparam int K = 4;

  logic         clk, rst_n;
  logic         d1_start, d1_busy, d1_done, d1_skip_taken;
  logic         d2_start, d2_busy, d2_done, d2_skip_taken;
  logic [K-1:0] d1_a, d1_b, d1_n, d2_a, d2_b, d2_n;
  logic [K:0]   d1_result, d2_result;
  phase_e       d1_phase, d2_phase;

  mont_top dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, ops = 0;
  // mechanism counters, index 0: two-level unit, 1: one-level unit
  int folds[2], drops[2], cins[2], pre_multi[2], conv_multi[2], sel[2][4];
  int loop_cyc[2], fold_op[2], pre_pass[2], conv_pass[2];

  always_ff @(posedge clk) begin
    if (d1_phase == PH_MUL) loop_cyc[0] <= loop_cyc[0] + 1;
    if (d2_phase == PH_MUL) loop_cyc[1] <= loop_cyc[1] + 1;
    if (d1_skip_taken) begin fold_op[0] <= fold_op[0] + 1; folds[0] <= folds[0] + 1; end
    if (d2_skip_taken) begin fold_op[1] <= fold_op[1] + 1; folds[1] <= folds[1] + 1; end
    if (dut.u_d1.acc_we && dut.u_d1.cin) cins[0] <= cins[0] + 1;
    if (dut.u_d2.acc_we && dut.u_d2.cin) cins[1] <= cins[1] + 1;
    if (d1_phase == PH_PRE_CONV && dut.u_d1.acc_we) pre_pass[0] <= pre_pass[0] + 1;
    if (d2_phase == PH_PRE_CONV && dut.u_d2.acc_we) pre_pass[1] <= pre_pass[1] + 1;
    if (d1_phase == PH_CONV && dut.u_d1.acc_we) conv_pass[0] <= conv_pass[0] + 1;
    if (d2_phase == PH_CONV && dut.u_d2.acc_we) conv_pass[1] <= conv_pass[1] + 1;
    if (d1_phase == PH_MUL && dut.u_d1.acc_we) sel[0][{dut.u_d1.mm_a, dut.u_d1.mm_q}] <= sel[0][{dut.u_d1.mm_a, dut.u_d1.mm_q}] + 1;
    if (d2_phase == PH_MUL && dut.u_d2.acc_we) sel[1][{dut.u_d2.mm_a, dut.u_d2.mm_q}] <= sel[1][{dut.u_d2.mm_a, dut.u_d2.mm_q}] + 1;
  end

  function automatic int ref_mont(int aa, int bb, int nn);
    int x;
    x = (aa * bb) % nn;
    for (int i = 0; i < K; i++) x = (x % 2 == 1) ? (x + nn) / 2 : x / 2;
    return x;
  endfunction

  task automatic check(input bit cond, input string what, input int ta, input int tb_, input int tn);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d n=%0d d1=%0d d2=%0d", what, ta, tb_, tn, d1_result, d2_result);
    end
  endtask

  initial begin
    bit got1, got2;
    int exp_v, lat;
    rst_n = 1'b0; d1_start = 1'b0; d2_start = 1'b0;
    d1_a = '0; d1_b = '0; d1_n = '0; d2_a = '0; d2_b = '0; d2_n = '0;
    for (int u = 0; u < 2; u++) begin
      folds[u] = 0; drops[u] = 0; cins[u] = 0; pre_multi[u] = 0; conv_multi[u] = 0;
      loop_cyc[u] = 0; fold_op[u] = 0; pre_pass[u] = 0; conv_pass[u] = 0;
      for (int s = 0; s < 4; s++) sel[u][s] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int tn = 1; tn < 16; tn += 2)
      for (int ta = 0; ta < 16; ta++)
        for (int tb = 0; tb < tn; tb++) begin
          d1_a = K'(ta); d1_b = K'(tb); d1_n = K'(tn);
          d2_a = K'(ta); d2_b = K'(tb); d2_n = K'(tn);
          d1_start = 1'b1; d2_start = 1'b1;
          for (int u = 0; u < 2; u++) begin
            loop_cyc[u] = 0; fold_op[u] = 0; pre_pass[u] = 0; conv_pass[u] = 0;
          end
          @(negedge clk);
          d1_start = 1'b0; d2_start = 1'b0;
          got1 = 0; got2 = 0; lat = 1;
          while (!(got1 && got2) && lat < 60) begin
            if (d1_done) begin got1 = 1; check(d1_busy, "d1 busy", ta, tb, tn); end
            if (d2_done) begin got2 = 1; check(d2_busy, "d2 busy", ta, tb, tn); end
            @(negedge clk);
            lat++;
          end
          exp_v = ref_mont(ta, tb, tn);
          ops++;
          check(got1 && got2, "done within 60 cycles", ta, tb, tn);
          check(int'(d1_result) % tn == exp_v && int'(d1_result) < 2 * tn, "d1 result", ta, tb, tn);
          check(int'(d2_result) % tn == exp_v && int'(d2_result) < 2 * tn, "d2 result", ta, tb, tn);
          check(loop_cyc[0] + fold_op[0] == K + 1, "d1 loop length", ta, tb, tn);
          check(loop_cyc[1] + fold_op[1] == K + 1, "d2 loop length", ta, tb, tn);
          if (dut.u_d1.u_ctrl.sh2_q) drops[0]++;
          if (dut.u_d2.u_ctrl.sh2_q) drops[1]++;
          if (pre_pass[0] > 1) pre_multi[0]++;
          if (pre_pass[1] > 1) pre_multi[1]++;
          if (conv_pass[0] > 1) conv_multi[0]++;
          if (conv_pass[1] > 1) conv_multi[1]++;
          // let both units return to idle
          while (d1_phase != PH_IDLE || d2_phase != PH_IDLE) @(negedge clk);
        end
    for (int u = 0; u < 2; u++) begin
      $display("unit %0d: folds %0d drops %0d carry re-insertions %0d multi-pass pre %0d multi-pass conv %0d MM3 0/N/2B/D %0d/%0d/%0d/%0d",
               u + 1, folds[u], drops[u], cins[u], pre_multi[u], conv_multi[u],
               sel[u][0], sel[u][1], sel[u][2], sel[u][3]);
      check(folds[u] > 0, "folded iterations occurred", 0, 0, 0);
      check(drops[u] > 0, "dropped last iterations occurred", 0, 0, 0);
      check(cins[u] > 0, "carry re-insertion occurred", 0, 0, 0);
      check(pre_multi[u] > 0, "multi-pass pre-computation occurred", 0, 0, 0);
      check(conv_multi[u] > 0, "multi-pass conversion occurred", 0, 0, 0);
      for (int s = 0; s < 4; s++) check(sel[u][s] > 0, "MM3 operand used", s, 0, 0);
    end
    $display("%0d multiplications per unit", ops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
