// tb_pe_input_reg: random words with random load; after every clock the
// three operand outputs must equal the fields of the last loaded word
// (x = [7:0], y = [15:8], z = [23:16]), and zero after reset.
`timescale 1ns/1ps
module tb_pe_input_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0;
  logic [31:0] word = '0, model = '0;
  logic signed [7:0] x_in, y, z_in;

  pe_input_reg #(.WIDTH(8)) dut (.clk, .rst_n, .load, .word, .x_in, .y, .z_in);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (x_in !== model[7:0] || y !== model[15:8] || z_in !== model[23:16]) begin
      failures++;
      if (failures < 10) $display("FAIL got %h %h %h exp word %h", x_in, y, z_in, model);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check();
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      word = $urandom;
      load = ($urandom % 3) != 0;
      @(posedge clk);
      if (load) model = word;
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
