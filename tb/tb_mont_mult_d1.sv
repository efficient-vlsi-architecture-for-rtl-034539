// tb_mont_mult_d1: self-checking test of the two-level multiplier.
// Runs every operand combination at K = 4 (the default operand width) and
// random operands at K = 24 and at K = 128 (long-integer width). Checks
// results, loop length and latency, and demands that folded and dropped
// iterations both occurred.
module tb_mont_mult_d1;
  logic clk, rst_n;
  initial begin clk = 1'b0; rst_n = 1'b0; end
  always #5 clk = ~clk;

  logic f4, f24;
  int   c4, x4, o4, s4, d4, l4, c24, x24, o24, s24, d24, l24;
  logic f128;
  int   c128, x128, o128, s128, d128, l128;
  int   checks, failures;

  mont_bench #(.K(4),  .DESIGN(1), .EXHAUSTIVE(1'b1)) u4
    (.clk, .rst_n, .finished(f4), .checks(c4), .failures(x4), .ops(o4), .skips(s4),
     .drops(d4), .max_latency(l4));
  mont_bench #(.K(24), .DESIGN(1), .EXHAUSTIVE(1'b0), .NRAND(300)) u24
    (.clk, .rst_n, .finished(f24), .checks(c24), .failures(x24), .ops(o24), .skips(s24),
     .drops(d24), .max_latency(l24));
  mont_bench #(.K(128), .DESIGN(1), .EXHAUSTIVE(1'b0), .NRAND(60)) u128
    (.clk, .rst_n, .finished(f128), .checks(c128), .failures(x128), .ops(o128), .skips(s128),
     .drops(d128), .max_latency(l128));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (f4 && f24 && f128);
    checks   = c4 + c24 + c128 + 3;
    failures = x4 + x24 + x128;
    if (s4 + s24 + s128 == 0) begin failures++; $display("FAIL: no iteration was folded"); end
    if (d4 + d24 + d128 == 0) begin failures++; $display("FAIL: no last iteration was dropped"); end
    if (o4 == 0 || o24 == 0 || o128 == 0) begin failures++; $display("FAIL: no operations"); end
    $display("K=4: %0d ops, %0d folds, %0d drops, max latency %0d", o4, s4, d4, l4);
    $display("K=24: %0d ops, %0d folds, %0d drops, max latency %0d", o24, s24, d24, l24);
    $display("K=128: %0d ops, %0d folds, %0d drops, max latency %0d", o128, s128, d128, l128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c24 + c128, x4 + x24 + x128 + 1);
    $finish;
  end
endmodule
