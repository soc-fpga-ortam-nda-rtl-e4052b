// tb_soc_pl_top: end-to-end test of both integrations at the top's default
// parameters (100 words per run, 1024-word memories, 8-bit PE).
//
// The testbench plays the processor and its vendor blocks:
//  - BRAM integration: for each operation (add, sub, mul, mac) it writes
//    100 random operand words into the input memory through port A (as the
//    AXI BRAM controller would), sets op and raises start through the
//    "GPIO" ports, polls ready, and reads the 100 results back through
//    port A of the output memory. A run must take 4*100 cycles after
//    the edge that samples start, 401 counted from the cycle start is raised. One start
//    is held high for many cycles and one extra start edge is raised while
//    a run is busy; each must cause no second run.
//  - AXI-Stream integration: it acts as the DMA, sending each 100-word
//    operand buffer as one packet with tlast on the last word and
//    collecting the result packet; one packet runs with the sink always
//    ready (one word per cycle is checked), the others with random
//    backpressure.
// Results are compared with an integer reference model. Each mechanism is
// counted (runs, held start, start while busy, each op in both designs,
// 8-bit wrap-around, negative sign-extended results, stream stalls, tlast)
// and one that never occurred counts as a failure.
`timescale 1ns/1ps
module tb_soc_pl_top;
  import pe_ref_pkg::*;
  localparam int N = 100;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_runs = 0, n_held_start = 0, n_busy_start = 0, n_wrap = 0, n_neg = 0;
  int n_stall = 0, n_tlast = 0, n_fullrate = 0;
  int n_op_bram [4] = '{0, 0, 0, 0};
  int n_op_axis [4] = '{0, 0, 0, 0};

  logic clk = 0, rst_n = 0;
  logic bram_start = 0, bram_ready;
  logic [1:0] bram_op = 0, axis_op = 0;
  logic in_ena = 0, out_ena = 0;
  logic [3:0] in_wea = 0, out_wea = 0;
  logic [31:0] in_addra = 0, in_dina = 0, in_douta, out_addra = 0, out_dina = 0, out_douta;
  logic [31:0] s_tdata = 0, m_tdata;
  logic s_tvalid = 0, s_tready, s_tlast = 0, m_tvalid, m_tready = 0, m_tlast;

  soc_pl_top dut (
    .clk, .rst_n,
    .bram_start, .bram_op, .bram_ready,
    .in_ena, .in_wea, .in_addra, .in_dina, .in_douta,
    .out_ena, .out_wea, .out_addra, .out_dina, .out_douta,
    .axis_op,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready), .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready), .m_axis_tlast(m_tlast));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] words [N];

  function automatic void note_result(input int op_i, input logic [31:0] w, input logic [31:0] r);
    if (overflows(op_i, w)) n_wrap++;
    if (r[31]) n_neg++;
  endfunction

  // ---------------- processor side of the BRAM integration ----------------
  task automatic bram_run(input int op_i, input bit hold_start, input bit busy_start);
    int cycles;
    logic [31:0] exp;
    for (int i = 0; i < N; i++) begin
      words[i] = $urandom;
      in_ena = 1; in_wea = 4'hF; in_addra = 32'(4*i); in_dina = words[i];
      @(posedge clk); #1;
    end
    in_ena = 0; in_wea = 0;
    bram_op = 2'(op_i);
    bram_start = 1;
    @(posedge clk); #1;
    cycles = 1;
    if (!hold_start) bram_start = 0;
    else n_held_start++;
    while (!bram_ready && cycles < 10*N) begin
      if (cycles == 20) bram_start = 0;
      if (busy_start && cycles == 50) begin bram_start = 1; n_busy_start++; end
      if (busy_start && cycles == 52) bram_start = 0;
      @(posedge clk); #1;
      cycles++;
    end
    bram_start = 0;
    n_runs++;
    checks++;
    if (cycles != 4*N + 1) begin
      failures++;
      $display("FAIL bram op=%0d run took %0d cycles, expected %0d", op_i, cycles, 4*N + 1);
    end
    // A held or repeated start must not have launched a second run.
    repeat (8) @(posedge clk);
    #1 checks++;
    if (!bram_ready) begin failures++; $display("FAIL bram: second run started"); end
    for (int i = 0; i < N; i++) begin
      out_ena = 1; out_addra = 32'(4*i);
      @(posedge clk); #1;
      exp = ref_word(op_i, words[i]);
      checks++;
      if (out_douta !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL bram op=%0d i=%0d w=%h got=%h exp=%h", op_i, i, words[i], out_douta, exp);
      end
      note_result(op_i, words[i], exp);
    end
    out_ena = 0;
    n_op_bram[op_i]++;
  endtask

  // ---------------- DMA side of the AXI-Stream integration ----------------
  logic [31:0] exp_q [$];
  logic        last_q [$];
  int rx_count = 0;
  bit backpressure = 0;

  // Sink (stream-to-memory channel): sampled at the falling edge, where the
  // signals hold the values the next rising edge sees.
  always @(negedge clk) begin
    if (rst_n && m_tvalid && m_tready) begin
      logic [31:0] e;
      logic        l;
      checks++;
      rx_count++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL axis: unexpected word %h", m_tdata);
      end else begin
        e = exp_q.pop_front();
        l = last_q.pop_front();
        if (m_tdata !== e || m_tlast !== l) begin
          failures++;
          if (failures < 10) $display("FAIL axis got %h/%b exp %h/%b", m_tdata, m_tlast, e, l);
        end
        if (m_tlast) n_tlast++;
      end
    end
    if (rst_n && s_tvalid && !s_tready) n_stall++;
  end

  always @(posedge clk) begin
    #1 m_tready = backpressure ? (($urandom % 3) != 0) : 1'b1;
  end

  task automatic axis_packet(input int op_i, input bit with_bp);
    int t0, c0;
    bit took;
    logic [31:0] w;
    backpressure = with_bp;
    axis_op = 2'(op_i);
    t0 = rx_count;
    c0 = 0;
    for (int i = 0; i < N; i++) begin
      w = $urandom;
      s_tdata = w; s_tlast = (i == N - 1); s_tvalid = 1;
      do begin
        #3;
        took = s_tready;
        if (took) begin
          exp_q.push_back(ref_word(op_i, w));
          last_q.push_back(i == N - 1);
          note_result(op_i, w, ref_word(op_i, w));
        end
        @(posedge clk); #1;
        c0++;
      end while (!took);
    end
    s_tvalid = 0; s_tlast = 0;
    while (exp_q.size() != 0 && c0 < 20*N) begin @(posedge clk); #1; c0++; end
    checks++;
    if (exp_q.size() != 0 || rx_count - t0 != N) begin
      failures++;
      $display("FAIL axis op=%0d: %0d of %0d results", op_i, rx_count - t0, N);
    end
    if (!with_bp) begin
      // One word per cycle: N words accepted in N cycles, drained one later.
      checks++;
      if (c0 != N + 1) begin
        failures++;
        $display("FAIL axis rate: %0d cycles for %0d words", c0, N);
      end else n_fullrate++;
    end
    n_op_axis[op_i]++;
    backpressure = 0;
  endtask

  task automatic require(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
    $display("  %-28s %0d", what, count);
  endtask

  initial begin
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);
    #1;
    // Published workload: add, sub and mul over 100 operand words each, on
    // both integrations; plus the multiply-accumulate code.
    for (int o = 0; o < 4; o++) bram_run(o, o == 1, o == 2);
    for (int o = 0; o < 4; o++) axis_packet(o, o != 0);
    // Both integrations once more, concurrently, with the same op.
    fork
      bram_run(2, 0, 0);
      axis_packet(3, 1);
    join
    $display("mechanisms:");
    require("bram runs", n_runs);
    require("start held high", n_held_start);
    require("start edge while busy", n_busy_start);
    for (int o = 0; o < 4; o++) require($sformatf("bram op %0d", o), n_op_bram[o]);
    for (int o = 0; o < 4; o++) require($sformatf("axis op %0d", o), n_op_axis[o]);
    require("8-bit wrap-around", n_wrap);
    require("negative (sign-extended)", n_neg);
    require("stream stall (backpressure)", n_stall);
    require("tlast packets", n_tlast);
    require("full-rate packet", n_fullrate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
