// bram_pe_top: the accelerator of the BRAM-based integration.
//
// Software fills the input memory (BRAM 0) through its port A, selects an
// operation on op and raises start. On the rising edge of start the block
// samples op, then for each of NUM_WORDS words reads word i from BRAM 0
// port B, splits it into x_in/y/z_in in the input register, runs the PE,
// captures the 8-bit signed result in the output register, sign-extends it
// to 32 bits and writes it to word i of the output memory (BRAM 1) port B.
// When the last word is written, ready goes high and stays high until the
// next start edge. Each word takes 4 cycles, a run 4*NUM_WORDS cycles.
//
// The port list mirrors the accelerator's published block symbol: a full
// Block Memory Generator port B bundle for each memory (addr, clk, din,
// en, rst, we). BRAM 0 is only read (web0 = 0) and BRAM 1 only written,
// so doutb1 and dinb0 carry nothing; they are kept for the pin-compatible
// symbol. clkb0/clkb1 forward clk and rstb0/rstb1 the inverted reset.
// Sampling op at the start edge is this implementation's choice.
module bram_pe_top
  import pe_pkg::*;
#(
  parameter int unsigned WIDTH     = 8,
  parameter int unsigned FRAC_BIT  = 0,
  parameter int unsigned NUM_WORDS = 100
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [1:0]         op,
  input  logic [WORD_W-1:0]  doutb0,
  input  logic [WORD_W-1:0]  doutb1,
  output logic               ready,
  // BRAM 0 (input operands), port B
  output logic [31:0]        addrb0,
  output logic               clkb0,
  output logic [WORD_W-1:0]  dinb0,
  output logic               enb0,
  output logic               rstb0,
  output logic [BYTE_EN-1:0] web0,
  // BRAM 1 (results), port B
  output logic [31:0]        addrb1,
  output logic               clkb1,
  output logic [WORD_W-1:0]  dinb1,
  output logic               enb1,
  output logic               rstb1,
  output logic [BYTE_EN-1:0] web1
);

  logic                    start_rising;
  logic                    rd_en, in_load, out_load, wr_en, busy;
  logic [31:0]             rd_addr, wr_addr;
  pe_op_e                  op_reg;
  logic signed [WIDTH-1:0] x_in, y, z_in, x_out, z_out, z_out_reg;
  logic [WORD_W-1:0]       din_y;

  start_edge_detect u_start (
    .clk, .rst_n, .start, .start_rising
  );

  bram_ctrl_fsm #(.NUM_WORDS(NUM_WORDS), .ADDR_W(32)) u_ctrl (
    .clk, .rst_n, .start_rising,
    .rd_en, .rd_addr, .in_load, .out_load, .wr_en, .wr_addr, .busy, .ready
  );

  // Operation is fixed for a whole run.
  always_ff @(posedge clk) begin
    if (!rst_n)                     op_reg <= OP_ADD;
    else if (start_rising && !busy) op_reg <= pe_op_e'(op);
  end

  pe_input_reg #(.WIDTH(WIDTH)) u_in_reg (
    .clk, .rst_n, .load(in_load), .word(doutb0), .x_in, .y, .z_in
  );

  pe_core #(.WIDTH(WIDTH), .FRAC_BIT(FRAC_BIT)) u_pe (
    .op(op_reg), .x_in, .y, .z_in, .x_out, .z_out
  );

  pe_output_reg #(.WIDTH(WIDTH)) u_out_reg (
    .clk, .rst_n, .load(out_load), .d(z_out), .q(z_out_reg)
  );

  sign_extend #(.IN_W(WIDTH), .OUT_W(WORD_W)) u_sext (
    .d(z_out_reg), .q(din_y)
  );

  // BRAM 0: read-only port.
  assign addrb0 = rd_addr;
  assign clkb0  = clk;
  assign dinb0  = '0;
  assign enb0   = rd_en;
  assign rstb0  = ~rst_n;
  assign web0   = '0;

  // BRAM 1: write-only port.
  assign addrb1 = wr_addr;
  assign clkb1  = clk;
  assign dinb1  = din_y;
  assign enb1   = wr_en;
  assign rstb1  = ~rst_n;
  assign web1   = {BYTE_EN{wr_en}};

  // Neither the chaining output of the PE nor the read data of the
  // write-only result port is used in this integration.
  logic unused;
  assign unused = ^{x_out, doutb1};

endmodule
