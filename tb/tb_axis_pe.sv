// tb_axis_pe: stream test of the AXI-Stream PE. Phase 1 sends a packet with
// the sink always ready and checks one word per cycle: N words leave in
// N+1 cycles. Phase 2 randomises source valid and sink ready (backpressure)
// and changes op between packets. Every output word and tlast is compared
// in order with the reference model; stalls are counted and must occur.
`timescale 1ns/1ps
module tb_axis_pe;
  import pe_ref_pkg::*;
  int checks = 0, failures = 0, stalls = 0, lasts = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] op = 0;
  logic [31:0] s_tdata = 0, m_tdata;
  logic s_tvalid = 0, s_tready, s_tlast = 0, m_tvalid, m_tready = 0, m_tlast;
  logic [31:0] exp_q [$];
  logic        last_q [$];
  int rx_count = 0;

  axis_pe #(.WIDTH(8), .FRAC_BIT(0)) dut (
    .aclk(clk), .aresetn(rst_n), .op,
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready), .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready), .m_axis_tlast(m_tlast));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sink: at the falling edge the signals hold the values the next rising
  // edge will see, so a handshake is sampled there without racing the DUT.
  always @(negedge clk) begin
    if (rst_n && m_tvalid && m_tready) begin
      checks++;
      rx_count++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %h", m_tdata);
      end else begin
        logic [31:0] e;
        logic        l;
        e = exp_q.pop_front();
        l = last_q.pop_front();
        if (m_tdata !== e || m_tlast !== l) begin
          failures++;
          if (failures < 10) $display("FAIL got %h/%b exp %h/%b", m_tdata, m_tlast, e, l);
        end
        if (m_tlast) lasts++;
      end
    end
    if (rst_n && s_tvalid && !s_tready) stalls++;
  end

  // Source: inputs change 1 ns after a rising edge; tready is sampled 4 ns
  // after it, when it has settled for the coming edge.
  task automatic send_word(input logic [31:0] data, input bit last, input int op_i);
    bit took;
    s_tdata = data; s_tlast = last; s_tvalid = 1;
    do begin
      #3;
      took = s_tready;
      if (took) begin
        exp_q.push_back(ref_word(op_i, data));
        last_q.push_back(last);
      end
      @(posedge clk); #1;
    end while (!took);
    s_tvalid = 0; s_tlast = 0;
  endtask

  task automatic send_packet(input int n, input int op_i, input bit random_gaps);
    op = 2'(op_i);
    for (int i = 0; i < n; i++) begin
      while (random_gaps && ($urandom % 3 == 0)) begin
        @(posedge clk); #1;
      end
      send_word($urandom, i == n - 1, op_i);
    end
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // Phase 1: full throughput.
    m_tready = 1;
    t0 = rx_count;
    op = 2'd2;
    for (int i = 0; i < 64; i++) begin
      s_tdata = $urandom; s_tlast = (i == 63); s_tvalid = 1;
      exp_q.push_back(ref_word(2, s_tdata));
      last_q.push_back(s_tlast);
      #3 checks++;
      if (!s_tready) failures++;
      @(posedge clk); #1;
    end
    s_tvalid = 0; s_tlast = 0;
    @(posedge clk); #1;
    checks++;
    if (rx_count - t0 != 64) begin
      failures++;
      $display("FAIL throughput: %0d words out in 65 cycles", rx_count - t0);
    end
    // Phase 2: random backpressure on the sink.
    fork
      begin
        for (int p = 0; p < 40; p++) send_packet(1 + $urandom % 20, $urandom % 4, 1);
      end
      begin
        repeat (4000) begin
          @(posedge clk); #1;
          m_tready = ($urandom % 3) != 0;
        end
      end
    join_any
    m_tready = 1;
    repeat (10) @(posedge clk);
    #1;
    checks++;
    if (exp_q.size() != 0 || stalls == 0 || lasts != 41) begin
      failures++;
      $display("FAIL left=%0d stalls=%0d lasts=%0d", exp_q.size(), stalls, lasts);
    end
    $display("stalls=%0d packets=%0d words=%0d", stalls, lasts, rx_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
