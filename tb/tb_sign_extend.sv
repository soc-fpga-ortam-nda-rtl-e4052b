// tb_sign_extend: applies all 256 8-bit values to the 8 -> 32 extender and
// compares with the integer value of the input; also checks 8 -> 16.
`timescale 1ns/1ps
module tb_sign_extend;
  int checks = 0, failures = 0;
  logic [7:0]  d;
  logic [31:0] q;
  logic [15:0] q16;

  sign_extend #(.IN_W(8), .OUT_W(32)) dut  (.d, .q);
  sign_extend #(.IN_W(8), .OUT_W(16)) dut2 (.d, .q(q16));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    for (int i = 0; i < 256; i++) begin
      d = 8'(i);
      #1;
      v = (i >= 128) ? i - 256 : i;
      checks += 2;
      if ($signed(q) != v)   begin failures++; $display("FAIL d=%0d q=%h", i, q); end
      if ($signed(q16) != v) begin failures++; $display("FAIL16 d=%0d q=%h", i, q16); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
