// mont_bench: stimulus and checking for one Montgomery multiplier instance.
//
// Instantiates mont_mult_d1 (DESIGN = 1) or mont_mult_d2 (DESIGN = 2) with
// operand width K and runs multiplications on it: every odd modulus N below
// 2**K with every A < 2**K and B < N when EXHAUSTIVE is set, otherwise NRAND
// random odd N with random A and B < N. Each result is checked against
// A*B*2**-K mod N computed here by K modular halvings of A*B mod N, and must be
// below 2N. Per multiplication it also checks the loop length
// (loop cycles + folded iterations = K + 1) and that done comes within a
// latency bound (6K + 20 cycles). It counts folded and dropped last
// iterations so the caller can demand that each happened. finished rises when
// the run is over. The reference uses 2K+2-bit arithmetic, so any K works.
module mont_bench
  import mont_pkg::*;
#(
  parameter int unsigned K          = 4,
  parameter int unsigned DESIGN     = 2,
  parameter bit          EXHAUSTIVE = 1'b1,
  parameter int unsigned NRAND      = 100
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   ops,
  output int   skips,
  output int   drops,
  output int   max_latency
);

  logic         start, busy, done, skip_taken;
  logic [K-1:0] a, b, n;
  logic [K:0]   result;
  phase_e       phase;

  if (DESIGN == 1) begin : g_dut
    mont_mult_d1 #(.K(K)) dut (.*);
  end else begin : g_dut
    mont_mult_d2 #(.K(K)) dut (.*);
  end

  localparam int unsigned RW = 2 * K + 2;   // wide enough for A*B and N
  typedef logic [RW-1:0] wide_t;

  function automatic wide_t ref_mont(wide_t aa, wide_t bb, wide_t nn);
    wide_t x;
    x = (aa * bb) % nn;
    for (int i = 0; i < int'(K); i++) x = x[0] ? (x + nn) >> 1 : x >> 1;
    return x;
  endfunction

  function automatic logic [K-1:0] rand_k();
    logic [K-1:0] r;
    for (int i = 0; i < int'(K); i += 32) r = K'({r, $urandom});
    return r;
  endfunction

  // count loop cycles, folds and dropped last iterations
  int  mul_cycles, fold_cnt;
  always_ff @(posedge clk) begin
    if (phase == PH_MUL) mul_cycles <= mul_cycles + 1;
    if (skip_taken)      fold_cnt   <= fold_cnt + 1;
  end

  task automatic run_one(input logic [K-1:0] ta, input logic [K-1:0] tb,
                         input logic [K-1:0] tn);
    wide_t exp_v;
    int lat;
    int busy_low;
    busy_low = 0;
    @(negedge clk);
    a = ta; b = tb; n = tn; start = 1'b1;
    mul_cycles = 0; fold_cnt = 0;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      if (!busy) busy_low++;
      @(negedge clk);
      lat++;
      if (lat > 6 * int'(K) + 20) break;
    end
    exp_v = ref_mont(RW'(ta), RW'(tb), RW'(tn));
    ops++;
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL D%0d K=%0d: no done for a=%0d b=%0d n=%0d", DESIGN, K, ta, tb, tn);
    end
    if (lat > max_latency) max_latency = lat;
    checks++;
    if (busy_low != 0) begin
      failures++;
      $display("FAIL D%0d K=%0d: busy low during an operation", DESIGN, K);
    end
    checks++;
    if (RW'(result) % RW'(tn) != exp_v || RW'(result) >= 2 * RW'(tn)) begin
      failures++;
      $display("FAIL D%0d K=%0d: a=%0d b=%0d n=%0d result=%0d expected %0d (mod n, < 2n)",
               DESIGN, K, ta, tb, tn, result, exp_v);
    end
    checks++;
    if (mul_cycles + fold_cnt != int'(K) + 1) begin
      failures++;
      $display("FAIL D%0d K=%0d: loop cycles %0d + folds %0d != K+1", DESIGN, K,
               mul_cycles, fold_cnt);
    end
    skips += fold_cnt;
    if (g_dut.dut.u_ctrl.sh2_q) drops++;
  endtask

  initial begin
    logic [K-1:0] ra, rb, rn;
    finished = 1'b0;
    checks = 0; failures = 0; ops = 0; skips = 0; drops = 0; max_latency = 0;
    start = 1'b0; a = '0; b = '0; n = '0;
    @(posedge rst_n);
    if (EXHAUSTIVE) begin
      for (int tn = 1; tn < (1 << K); tn += 2)
        for (int ta = 0; ta < (1 << K); ta++)
          for (int tb = 0; tb < tn; tb++)
            run_one(K'(ta), K'(tb), K'(tn));
    end else begin
      for (int i = 0; i < int'(NRAND); i++) begin
        rn = rand_k() | K'(1);
        if (i % 2 == 0) rn[K-1] = 1'b1;          // full-width modulus half the time
        ra = rand_k();
        rb = K'({rand_k(), rand_k()} % RW'(rn));
        if (i % 8 == 0) ra = '1;                 // dense multiplier
        if (i % 8 == 1) ra = K'(1) << (K - 1);   // sparse multiplier, many folds
        run_one(ra, rb, rn);
      end
    end
    finished = 1'b1;
  end

endmodule
