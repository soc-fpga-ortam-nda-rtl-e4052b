// pe_core: the custom arithmetic processing element shared by both
// integrations.
//
// Purely combinational: the result is available in the same cycle as the
// operands, so the surrounding logic registers operands before it and the
// result after it. All values are WIDTH-bit two's complement. The operation
// is chosen by op (see pe_pkg):
//   add  z_out = x_in + y
//   sub  z_out = x_in - y
//   mul  z_out = (x_in * y) >>> FRAC_BIT
//   mac  z_out = z_in + ((x_in * y) >>> FRAC_BIT)
// Results wrap to WIDTH bits (no saturation). x_in is passed unchanged to
// x_out so that PEs could be chained; the integrations here leave it open.
//
// The three published operations, the 8-bit width, FRAC_BIT = 0 and the
// x_in/y/z_in/x_out/z_out names are the design's own. Wrap-around, the
// arithmetic shift by FRAC_BIT and the multiply-accumulate code 11 are
// choices of this implementation.
module pe_core
  import pe_pkg::*;
#(
  parameter int unsigned WIDTH    = 8,
  parameter int unsigned FRAC_BIT = 0
) (
  input  pe_op_e                   op,
  input  logic signed [WIDTH-1:0]  x_in,
  input  logic signed [WIDTH-1:0]  y,
  input  logic signed [WIDTH-1:0]  z_in,
  output logic signed [WIDTH-1:0]  x_out,
  output logic signed [WIDTH-1:0]  z_out
);

  logic signed [2*WIDTH-1:0] product;
  logic signed [2*WIDTH-1:0] scaled;

  always_comb begin
    product = x_in * y;
    scaled  = product >>> FRAC_BIT;
    unique case (op)
      OP_ADD:  z_out = x_in + y;
      OP_SUB:  z_out = x_in - y;
      OP_MUL:  z_out = scaled[WIDTH-1:0];
      OP_MAC:  z_out = z_in + scaled[WIDTH-1:0];
      default: z_out = '0;
    endcase
  end

  assign x_out = x_in;

endmodule
