// tb_modified_mux: MM3 must give 0, n, b or d for (a, q) = 00, 01, 10, 11.
// Every selection is tried with random operands at W = 12.
module tb_modified_mux;
  localparam int W = 12;
  logic         a, q;
  logic [W-1:0] n, b, d, out, exp_v;
  int checks = 0, failures = 0;

  modified_mux #(.W(W)) dut (.*);

  initial begin
    for (int i = 0; i < 400; i++) begin
      {a, q} = 2'(i);
      n = W'($urandom); b = W'($urandom); d = W'($urandom);
      #1;
      case ({a, q})
        2'b00: exp_v = '0;
        2'b01: exp_v = n;
        2'b10: exp_v = b;
        default: exp_v = d;
      endcase
      checks++;
      if (out !== exp_v) begin
        failures++;
        $display("FAIL a=%0b q=%0b out=%h expected %h", a, q, out, exp_v);
      end
    end
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
