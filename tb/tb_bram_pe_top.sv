// tb_bram_pe_top: the BRAM-side accelerator with two memories. For each of
// the four operations the testbench writes NUM_WORDS random operand words
// into the input memory (port A), pulses start (held high for several
// cycles, which must trigger once), waits for ready, counts the cycles
// (4*NUM_WORDS after the edge that samples start, one more counted from
// the cycle in which start is raised) and reads back every result word from the output
// memory (port A), comparing it with the reference model. op is changed
// during a run to check that it is sampled only at the start edge.
`timescale 1ns/1ps
module tb_bram_pe_top;
  import pe_ref_pkg::*;
  localparam int N = 100;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, ready;
  logic [1:0] op = 0;
  logic [31:0] addrb0, addrb1, dinb0, dinb1, doutb0, doutb1;
  logic clkb0, clkb1, enb0, enb1, rstb0, rstb1;
  logic [3:0] web0, web1;
  logic in_ena = 0, out_ena = 0;
  logic [3:0] in_wea = 0;
  logic [31:0] in_addra = 0, in_dina = 0, in_douta, out_addra = 0, out_douta;
  logic [31:0] words [N];

  bram_pe_top #(.WIDTH(8), .FRAC_BIT(0), .NUM_WORDS(N)) dut (
    .clk, .rst_n, .start, .op, .doutb0, .doutb1, .ready,
    .addrb0, .clkb0, .dinb0, .enb0, .rstb0, .web0,
    .addrb1, .clkb1, .dinb1, .enb1, .rstb1, .web1);

  dp_bram #(.DEPTH(1024)) mem_in (.clk,
    .ena(in_ena), .rsta(1'b0), .wea(in_wea), .addra(in_addra), .dina(in_dina), .douta(in_douta),
    .enb(enb0), .rstb(rstb0), .web(web0), .addrb(addrb0), .dinb(dinb0), .doutb(doutb0));
  dp_bram #(.DEPTH(1024)) mem_out (.clk,
    .ena(out_ena), .rsta(1'b0), .wea(4'h0), .addra(out_addra), .dina(32'h0), .douta(out_douta),
    .enb(enb1), .rstb(rstb1), .web(web1), .addrb(addrb1), .dinb(dinb1), .doutb(doutb1));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    logic [31:0] exp;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int o = 0; o < 4; o++) begin
      for (int i = 0; i < N; i++) begin
        words[i] = $urandom;
        in_ena = 1; in_wea = 4'hF; in_addra = 32'(4*i); in_dina = words[i];
        @(posedge clk); #1;
      end
      in_ena = 0; in_wea = 0;
      op = 2'(o);
      start = 1;
      @(posedge clk); #1;
      cycles = 1;
      op = 2'(o + 1);          // must not affect the run already started
      repeat (5) begin @(posedge clk); #1; cycles++; end
      start = 0;
      while (!ready && cycles < 10*N) begin @(posedge clk); #1; cycles++; end
      checks++;
      if (cycles != 4*N + 1) begin
        failures++;
        $display("FAIL op=%0d run took %0d cycles, expected %0d", o, cycles, 4*N + 1);
      end
      for (int i = 0; i < N; i++) begin
        out_ena = 1; out_addra = 32'(4*i);
        @(posedge clk); #1;
        exp = ref_word(o, words[i]);
        checks++;
        if (out_douta !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL op=%0d i=%0d word=%h got=%h exp=%h", o, i, words[i], out_douta, exp);
        end
      end
      out_ena = 0;
      checks++;
      if (!ready) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
