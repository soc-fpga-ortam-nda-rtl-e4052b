// pe_pkg: types and constants shared by the arithmetic processing element
// and the two integrations around it (BRAM-based and AXI-Stream-based).
//
// Operation codes: 00 add, 01 subtract, 10 multiply follow the design's
// published pseudo-code. Code 11 is this design's choice: multiply-accumulate
// (z_in + x_in*y), which gives the PE's accumulate input z_in a use.
//
// Operand word (32 bits, same in both integrations):
//   [7:0]   x_in  (operand a)
//   [15:8]  y     (operand b)
//   [23:16] z_in  (accumulate input; the field is 16 bits wide, an 8-bit PE
//                  uses its low byte)
//   [31:24] unused
package pe_pkg;

  typedef enum logic [1:0] {
    OP_ADD = 2'b00,
    OP_SUB = 2'b01,
    OP_MUL = 2'b10,
    OP_MAC = 2'b11
  } pe_op_e;

  localparam int unsigned WORD_W  = 32;   // BRAM and stream data width
  localparam int unsigned X_LSB   = 0;
  localparam int unsigned Y_LSB   = 8;
  localparam int unsigned Z_LSB   = 16;
  localparam int unsigned BYTE_EN = WORD_W / 8;

endpackage
