// sign_extend: widens a two's-complement value from IN_W to OUT_W bits by
// replicating its sign bit. In the BRAM integration it turns the 8-bit
// signed result into the 32-bit word written to the output memory
// (8 -> 32 in this design). Combinational.
module sign_extend #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  d,
  output logic [OUT_W-1:0] q
);

  initial assert (OUT_W >= IN_W) else $error("sign_extend: OUT_W < IN_W");

  always_comb q = {{(OUT_W-IN_W){d[IN_W-1]}}, d};

endmodule
