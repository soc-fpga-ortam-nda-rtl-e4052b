// tb_dp_bram: random reads and byte-masked writes on both ports of a
// 1024-word memory, checked against an array model: read-first data one
// cycle after the access, byte enables, port B winning a same-word write
// collision, and the port-B read register reset.
`timescale 1ns/1ps
module tb_dp_bram;
  localparam int DEPTH = 1024;
  int checks = 0, failures = 0, collisions = 0;
  logic clk = 0;
  logic ena = 0, enb = 0, rsta = 0, rstb = 0;
  logic [3:0] wea = 0, web = 0;
  logic [31:0] addra = 0, addrb = 0, dina = 0, dinb = 0, douta, doutb;
  logic [31:0] model [DEPTH];
  logic [31:0] expa, expb;
  logic chka, chkb;

  dp_bram #(.DEPTH(DEPTH)) dut (.clk, .ena, .rsta, .wea, .addra, .dina, .douta,
                                .enb, .rstb, .web, .addrb, .dinb, .doutb);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    chka = 0; chkb = 0;
    for (int t = 0; t < 20000; t++) begin
      int wa, wb;
      // Small address window so that collisions happen.
      wa = (t < 2000) ? t % DEPTH : $urandom % 16;
      wb = (t < 2000) ? (t + 7) % DEPTH : $urandom % 16;
      ena = (t < 2000) ? 1 : ($urandom % 4 != 0);
      enb = (t < 2000) ? 1 : ($urandom % 4 != 0);
      wea = (t < 1024) ? 4'hF : (t < 2000) ? 4'h0 : 4'($urandom);
      web = (t < 2000) ? 4'h0 : 4'($urandom);
      addra = {20'($urandom), wa[9:0], 2'($urandom)} & 32'h0000_0FFF;
      addrb = {20'h0, wb[9:0], 2'b00};
      dina = $urandom; dinb = $urandom;
      rstb = (t > 2000) && ($urandom % 50 == 0);
      @(posedge clk);
      expa = model[wa]; expb = model[wb];
      chka = ena; chkb = enb || rstb;
      if (rstb) expb = '0;
      for (int k = 0; k < 4; k++) begin
        if (ena && wea[k]) model[wa][8*k +: 8] = dina[8*k +: 8];
        if (enb && web[k]) model[wb][8*k +: 8] = dinb[8*k +: 8];
      end
      if (ena && enb && wa == wb && (wea & web) != 0) collisions++;
      #1;
      if (chka) begin
        checks++;
        if (douta !== expa) begin failures++; if (failures < 10) $display("FAIL A t=%0d %h exp %h", t, douta, expa); end
      end
      if (chkb) begin
        checks++;
        if (doutb !== expb) begin failures++; if (failures < 10) $display("FAIL B t=%0d %h exp %h", t, doutb, expb); end
      end
    end
    checks++;
    if (collisions == 0) failures++;
    $display("collisions=%0d", collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
