// pe_input_reg: operand register in front of the processing element.
//
// When load is high the 32-bit word read from the input memory is captured
// and split into the three PE operands: x_in = word[7:0], y = word[15:8],
// z_in = word[23:16] (field positions follow the design; see pe_pkg). The
// outputs change one clock after load and hold until the next load.
// Synchronous active-low reset clears them (reset behaviour is this
// implementation's choice).
module pe_input_reg
  import pe_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic [WORD_W-1:0]       word,
  output logic signed [WIDTH-1:0] x_in,
  output logic signed [WIDTH-1:0] y,
  output logic signed [WIDTH-1:0] z_in
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_in <= '0;
      y    <= '0;
      z_in <= '0;
    end else if (load) begin
      x_in <= word[X_LSB +: WIDTH];
      y    <= word[Y_LSB +: WIDTH];
      z_in <= word[Z_LSB +: WIDTH];
    end
  end

endmodule
