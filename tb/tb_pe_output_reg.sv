// tb_pe_output_reg: random data with random load; q must hold the last
// loaded value and be zero after reset.
`timescale 1ns/1ps
module tb_pe_output_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  logic signed [7:0] d = '0, q, model = '0;

  pe_output_reg #(.WIDTH(8)) dut (.clk, .rst_n, .load, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++;
    if (q !== 8'sd0) failures++;
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      d    = 8'($urandom);
      load = $urandom % 2;
      @(posedge clk);
      if (load) model = d;
      #1 checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL q=%h exp=%h", q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
