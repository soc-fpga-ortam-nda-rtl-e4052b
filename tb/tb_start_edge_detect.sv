// tb_start_edge_detect: drives start with random levels held for random
// lengths and checks that start_rising is high in exactly the first cycle
// of every high level, and counts the pulses against the rising edges.
`timescale 1ns/1ps
module tb_start_edge_detect;
  int checks = 0, failures = 0;
  int edges = 0, pulses = 0;
  logic clk = 0, rst_n = 0, start = 0, prev = 0, start_rising;

  start_edge_detect dut (.clk, .rst_n, .start, .start_rising);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int len;
      len = 1 + $urandom % 4;
      start = $urandom % 2;
      repeat (len) begin
        #1;
        checks++;
        if (start_rising !== (start && !prev)) begin
          failures++;
          if (failures < 10) $display("FAIL start=%b prev=%b rising=%b", start, prev, start_rising);
        end
        if (start && !prev) edges++;
        if (start_rising) pulses++;
        @(posedge clk);
        prev = start;
        #1;
      end
    end
    checks++;
    if (edges != pulses || edges < 10) failures++;
    $display("edges=%0d pulses=%0d", edges, pulses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
