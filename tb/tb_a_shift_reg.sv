// tb_a_shift_reg: loads random multipliers (K = 8) and shifts them by random
// one- and two-bit steps, checking a1 / a2 against the bit index a software
// pointer says should be next (zero past bit K-1).
module tb_a_shift_reg;
  localparam int K = 8;
  logic clk, rst_n, load, shift1, shift2, a1, a2;
  logic [K-1:0] a_in, held;
  int checks = 0, failures = 0, pos;

  a_shift_reg #(.K(K)) dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  function automatic logic bit_at(int p);
    return (p < K) ? held[p] : 1'b0;
  endfunction

  initial begin
    rst_n = 1'b0; load = 1'b0; shift1 = 1'b0; shift2 = 1'b0; a_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      held = K'($urandom);
      a_in = held; load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      pos = 0;
      while (pos <= K + 1) begin
        checks += 2;
        if (a1 !== bit_at(pos))     begin failures++; $display("FAIL a1 pos=%0d", pos); end
        if (a2 !== bit_at(pos + 1)) begin failures++; $display("FAIL a2 pos=%0d", pos); end
        case ($urandom % 3)
          0: begin shift1 = 1'b1; pos += 1; end
          1: begin shift2 = 1'b1; pos += 2; end
          default: ;
        endcase
        @(negedge clk);
        shift1 = 1'b0; shift2 = 1'b0;
      end
    end
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
