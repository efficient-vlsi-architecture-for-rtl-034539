// tb_ccsa: random test of the configurable carry-save adder at W = 16.
// In 3:2 mode the sum vector must be x^y^z and s + c must equal x+y+z+cin
// modulo 2**W, with the carry out zero whenever the true sum fits in W bits;
// in half-adder mode s must be x^y and s + c must equal x+y+cin, z ignored.
// Bit 0 of c must always be cin.
module tb_ccsa;
  localparam int W = 16;
  logic         fa_mode, cin, cout;
  logic [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  ccsa #(.W(W)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: fa=%0b x=%h y=%h z=%h cin=%0b s=%h c=%h", what, fa_mode, x, y, z, cin, s, c);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      longint unsigned tot;
      fa_mode = i[0];
      cin     = i[1];
      x = W'($urandom); y = W'($urandom); z = W'($urandom);
      if (i % 4 >= 2 && i % 8 >= 4) begin x = x >> 2; y = y >> 2; z = z >> 2; end
      #1;
      tot = longint'(x) + longint'(y) + (fa_mode ? longint'(z) : 0) + longint'(cin);
      check(c[0] == cin, "carry-in position");
      check(W'(longint'(s) + longint'(c)) == W'(tot), "sum value");
      if (fa_mode) check(s == (x ^ y ^ z), "3:2 sum vector");
      else         check(s == (x ^ y), "half-adder sum vector");
      check((tot >= (64'd1 << W)) || !cout, "carry out");
      if (tot < (64'd1 << W)) check(longint'(s) + longint'(c) == tot, "exact sum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
