// dp_bram: true dual-port block memory, 32-bit words with byte write
// enables, one-cycle registered read on both ports.
//
// Port A is the processor side (reached through an AXI BRAM controller),
// port B the accelerator side. Addresses are byte addresses; bits [1:0]
// are ignored. Both ports are read-first: a read and a write of the same
// port in one cycle return the old word. If both ports write the same word
// in one cycle, port B's bytes win. rsta/rstb clear the port's read
// register. DEPTH defaults to 1024 words, one 36 Kb block RAM; the design
// gives the memory's role and its 32-bit width, the depth and the
// collision rule are this implementation's choices. Both ports share one
// clock, as the whole programmable logic runs on a single PS clock.
module dp_bram
  import pe_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic               clk,
  // port A (processor side)
  input  logic               ena,
  input  logic               rsta,
  input  logic [BYTE_EN-1:0] wea,
  input  logic [31:0]        addra,
  input  logic [WORD_W-1:0]  dina,
  output logic [WORD_W-1:0]  douta,
  // port B (accelerator side)
  input  logic               enb,
  input  logic               rstb,
  input  logic [BYTE_EN-1:0] web,
  input  logic [31:0]        addrb,
  input  logic [WORD_W-1:0]  dinb,
  output logic [WORD_W-1:0]  doutb
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WORD_W-1:0] mem [DEPTH];
  logic [AW-1:0]     wa, wb;

  assign wa = addra[2 +: AW];
  assign wb = addrb[2 +: AW];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (rsta)     douta <= '0;
    else if (ena) douta <= mem[wa];
    if (rstb)     doutb <= '0;
    else if (enb) doutb <= mem[wb];
    for (int k = 0; k < int'(BYTE_EN); k++) begin
      if (ena && wea[k]) mem[wa][8*k +: 8] <= dina[8*k +: 8];
      if (enb && web[k]) mem[wb][8*k +: 8] <= dinb[8*k +: 8];
    end
  end

endmodule
