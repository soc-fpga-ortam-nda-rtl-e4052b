// axis_pe: the processing element wrapped for the AXI-DMA integration.
//
// Operand words arrive on the AXI4-Stream slave port from the DMA's
// memory-to-stream channel; results leave on the master port towards the
// stream-to-memory channel. An input word is taken when s_axis_tvalid and
// s_axis_tready are both high. Its x_in/y/z_in fields (same layout as in
// the BRAM integration, see pe_pkg) go through the PE in the same cycle and
// the 8-bit result, sign-extended to 32 bits, is stored in a one-entry
// output register together with s_axis_tlast. The register is offered on
// m_axis with m_axis_tvalid until m_axis_tready takes it.
//
// s_axis_tready = !m_axis_tvalid || m_axis_tready, so the single register
// absorbs backpressure without losing a word and the block moves one word
// per cycle with one cycle of latency when the sink is always ready. The
// operation is chosen by the op port (driven by a GPIO) and may change
// between words. The streaming handshake and op port follow the design;
// the one-register buffer and 32-bit sign-extended result word are this
// implementation's choices.
module axis_pe
  import pe_pkg::*;
#(
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned FRAC_BIT = 0
) (
  input  logic              aclk,
  input  logic              aresetn,
  input  logic [1:0]        op,
  // AXI4-Stream slave (operands)
  input  logic [WORD_W-1:0] s_axis_tdata,
  input  logic              s_axis_tvalid,
  output logic              s_axis_tready,
  input  logic              s_axis_tlast,
  // AXI4-Stream master (results)
  output logic [WORD_W-1:0] m_axis_tdata,
  output logic              m_axis_tvalid,
  input  logic              m_axis_tready,
  output logic              m_axis_tlast
);

  logic signed [WIDTH-1:0] x_in, y, z_in, x_out, z_out;
  logic [WORD_W-1:0]       result_word;
  logic                    accept;

  assign x_in = s_axis_tdata[X_LSB +: WIDTH];
  assign y    = s_axis_tdata[Y_LSB +: WIDTH];
  assign z_in = s_axis_tdata[Z_LSB +: WIDTH];

  pe_core #(.WIDTH(WIDTH), .FRAC_BIT(FRAC_BIT)) u_pe (
    .op(pe_op_e'(op)), .x_in, .y, .z_in, .x_out, .z_out
  );

  sign_extend #(.IN_W(WIDTH), .OUT_W(WORD_W)) u_sext (
    .d(z_out), .q(result_word)
  );

  assign s_axis_tready = !m_axis_tvalid || m_axis_tready;
  assign accept        = s_axis_tvalid && s_axis_tready;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      m_axis_tvalid <= 1'b0;
      m_axis_tdata  <= '0;
      m_axis_tlast  <= 1'b0;
    end else if (accept) begin
      m_axis_tvalid <= 1'b1;
      m_axis_tdata  <= result_word;
      m_axis_tlast  <= s_axis_tlast;
    end else if (m_axis_tready) begin
      m_axis_tvalid <= 1'b0;
    end
  end

  // AXI4-Stream rule: once offered, a result stays stable until taken.
  assert property (@(posedge aclk) disable iff (!aresetn)
    m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata)
                                        && $stable(m_axis_tlast));

  // The chaining output of the PE is not used in this integration.
  logic unused;
  assign unused = ^{x_out, s_axis_tdata[WORD_W-1:Z_LSB+WIDTH]};

endmodule
