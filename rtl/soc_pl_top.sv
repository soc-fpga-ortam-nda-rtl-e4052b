// soc_pl_top: programmable-logic side of the two processor-to-accelerator
// integrations, placed side by side on one clock and reset.
//
// BRAM-based integration: bram_pe_top reads operand words from the input
// memory (u_bram_in) and writes results to the output memory (u_bram_out),
// both through port B. Port A of each memory is brought out for the
// processor's AXI BRAM controller; start, op and ready are the GPIO signals
// that software uses to trigger a run and poll for its end.
//
// AXI-Stream integration: axis_pe sits between the DMA's memory-to-stream
// channel (s_axis_*) and its stream-to-memory channel (m_axis_*); its
// operation comes from a GPIO (axis_op).
//
// The processor, DMA engine, BRAM controllers, GPIOs, interconnects and
// reset generator are vendor blocks and are not part of this RTL; their
// connections are the ports below. Both integrations use the same PE
// (pe_core) with WIDTH = 8 and FRAC_BIT = 0.
module soc_pl_top
  import pe_pkg::*;
#(
  parameter int unsigned WIDTH     = 8,
  parameter int unsigned FRAC_BIT  = 0,
  parameter int unsigned NUM_WORDS = 100,
  parameter int unsigned DEPTH     = 1024
) (
  input  logic               clk,
  input  logic               rst_n,
  // BRAM integration: GPIO control
  input  logic               bram_start,
  input  logic [1:0]         bram_op,
  output logic               bram_ready,
  // BRAM integration: input memory port A (processor side)
  input  logic               in_ena,
  input  logic [BYTE_EN-1:0] in_wea,
  input  logic [31:0]        in_addra,
  input  logic [WORD_W-1:0]  in_dina,
  output logic [WORD_W-1:0]  in_douta,
  // BRAM integration: output memory port A (processor side)
  input  logic               out_ena,
  input  logic [BYTE_EN-1:0] out_wea,
  input  logic [31:0]        out_addra,
  input  logic [WORD_W-1:0]  out_dina,
  output logic [WORD_W-1:0]  out_douta,
  // AXI-Stream integration
  input  logic [1:0]         axis_op,
  input  logic [WORD_W-1:0]  s_axis_tdata,
  input  logic               s_axis_tvalid,
  output logic               s_axis_tready,
  input  logic               s_axis_tlast,
  output logic [WORD_W-1:0]  m_axis_tdata,
  output logic               m_axis_tvalid,
  input  logic               m_axis_tready,
  output logic               m_axis_tlast
);

  initial assert (NUM_WORDS <= DEPTH)
    else $error("soc_pl_top: NUM_WORDS exceeds memory DEPTH");

  // ---------------- BRAM-based integration ----------------
  logic [31:0]        addrb0, addrb1;
  logic [WORD_W-1:0]  dinb0, dinb1, doutb0, doutb1;
  logic               enb0, enb1, rstb0, rstb1, clkb0, clkb1;
  logic [BYTE_EN-1:0] web0, web1;

  bram_pe_top #(.WIDTH(WIDTH), .FRAC_BIT(FRAC_BIT), .NUM_WORDS(NUM_WORDS)) u_pe_top (
    .clk, .rst_n, .start(bram_start), .op(bram_op),
    .doutb0, .doutb1, .ready(bram_ready),
    .addrb0, .clkb0, .dinb0, .enb0, .rstb0, .web0,
    .addrb1, .clkb1, .dinb1, .enb1, .rstb1, .web1
  );

  dp_bram #(.DEPTH(DEPTH)) u_bram_in (
    .clk,
    .ena(in_ena), .rsta(1'b0), .wea(in_wea), .addra(in_addra), .dina(in_dina), .douta(in_douta),
    .enb(enb0), .rstb(rstb0), .web(web0), .addrb(addrb0), .dinb(dinb0), .doutb(doutb0)
  );

  dp_bram #(.DEPTH(DEPTH)) u_bram_out (
    .clk,
    .ena(out_ena), .rsta(1'b0), .wea(out_wea), .addra(out_addra), .dina(out_dina), .douta(out_douta),
    .enb(enb1), .rstb(rstb1), .web(web1), .addrb(addrb1), .dinb(dinb1), .doutb(doutb1)
  );

  // Both memories run on clk; the forwarded port-B clocks equal it.
  logic unused;
  assign unused = clkb0 ^ clkb1;

  // ---------------- AXI-Stream integration ----------------
  axis_pe #(.WIDTH(WIDTH), .FRAC_BIT(FRAC_BIT)) u_axis_pe (
    .aclk(clk), .aresetn(rst_n), .op(axis_op),
    .s_axis_tdata, .s_axis_tvalid, .s_axis_tready, .s_axis_tlast,
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast
  );

endmodule
