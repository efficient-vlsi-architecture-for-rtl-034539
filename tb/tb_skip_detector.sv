// tb_skip_detector: exhaustive test of the skip detector.
// For every combination of its ten inputs the expected outputs are derived
// from integer arithmetic on the three low bits of SS and SC: skip when bit 1
// of SS+SC is certainly zero (ss1 == sc1, not both ss0 and sc0) and a1 is zero;
// q is then bit 2 of SS+SC xor (a & q1), otherwise bit 1 of SS+SC; a_out is a2
// on a skip, else a1.
module tb_skip_detector;
  logic a, q1, ss2, sc2, ss1, sc1, ss0, sc0, a1, a2;
  logic q, skip, a_out;
  int   checks = 0, failures = 0, nskip = 0;

  skip_detector dut (.*);

  initial begin
    for (int v = 0; v < 1024; v++) begin
      int unsigned ssv, scv, sum;
      logic exp_skip, exp_q, exp_a;
      {a, q1, ss2, sc2, ss1, sc1, ss0, sc0, a1, a2} = 10'(v);
      #1;
      ssv = 32'({ss2, ss1, ss0});
      scv = 32'({sc2, sc1, sc0});
      sum = ssv + scv;
      exp_skip = (ss1 == sc1) && !(ss0 && sc0) && !a1;
      exp_q    = exp_skip ? (sum[2] ^ (a & q1)) : sum[1];
      exp_a    = exp_skip ? a2 : a1;
      checks += 3;
      if (skip !== exp_skip) begin failures++; $display("FAIL skip v=%0d", v); end
      if (q !== exp_q)       begin failures++; $display("FAIL q v=%0d", v); end
      if (a_out !== exp_a)   begin failures++; $display("FAIL a_out v=%0d", v); end
      if (skip) nskip++;
    end
    checks++;
    if (nskip == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
