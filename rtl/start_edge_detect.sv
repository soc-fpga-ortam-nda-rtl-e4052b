// start_edge_detect: turns the start level written by software through a
// GPIO into a single-cycle trigger.
//
// start_reg holds start delayed by one clock; start_rising = start &
// ~start_reg is high for exactly the first cycle in which start is seen
// high, so holding start high does not retrigger. start is assumed to be
// synchronous to clk (the GPIO runs on the same clock). Reset clears
// start_reg, so a start already high when reset ends gives one pulse.
module start_edge_detect (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic start_rising
);

  logic start_reg;

  always_ff @(posedge clk) begin
    if (!rst_n) start_reg <= 1'b0;
    else        start_reg <= start;
  end

  assign start_rising = start & ~start_reg;

endmodule
