// tb_bram_ctrl_fsm: runs the controller over NUM_WORDS = 100 words three
// times. Each cycle the strobes are compared with the expected sequence
// READ, LATCH, EXEC, WRITE per word (addresses 4*i); the run must take
// exactly 4*NUM_WORDS cycles from the start pulse to ready; a start pulse
// during a run must be ignored and ready must drop on the next start.
`timescale 1ns/1ps
module tb_bram_ctrl_fsm;
  localparam int N = 100;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start_rising = 0;
  logic rd_en, in_load, out_load, wr_en, busy, ready;
  logic [31:0] rd_addr, wr_addr;

  bram_ctrl_fsm #(.NUM_WORDS(N), .ADDR_W(32)) dut (
    .clk, .rst_n, .start_rising, .rd_en, .rd_addr, .in_load, .out_load,
    .wr_en, .wr_addr, .busy, .ready);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_cycle(input int phase, input int idx);
    logic [3:0] exp;
    exp = 4'b0001 << phase;
    checks++;
    if ({wr_en, out_load, in_load, rd_en} !== exp || !busy || ready ||
        (phase == 0 && rd_addr !== 32'(4*idx)) || (phase == 3 && wr_addr !== 32'(4*idx))) begin
      failures++;
      if (failures < 10) $display("FAIL idx=%0d phase=%0d strobes=%b rd=%h wr=%h",
                                  idx, phase, {wr_en, out_load, in_load, rd_en}, rd_addr, wr_addr);
    end
  endtask

  initial begin
    int cycles;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (ready || busy) failures++;
    for (int run = 0; run < 3; run++) begin
      start_rising = 1;
      @(posedge clk);
      #1 start_rising = 0;
      cycles = 0;
      for (int i = 0; i < N; i++) begin
        for (int p = 0; p < 4; p++) begin
          expect_cycle(p, i);
          // A stray start pulse in the middle of the run must be ignored.
          if (i == N/2 && p == 1) start_rising = 1;
          @(posedge clk);
          #1 start_rising = 0;
          cycles++;
        end
      end
      checks++;
      if (!ready || busy || cycles != 4*N) begin
        failures++;
        $display("FAIL end of run: ready=%b busy=%b cycles=%0d", ready, busy, cycles);
      end
      repeat (3) @(posedge clk);
      #1 checks++;
      if (!ready || busy || rd_en || wr_en) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
