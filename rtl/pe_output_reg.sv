// pe_output_reg: holds the signed WIDTH-bit result of the processing element
// ("z_out reg") between the compute step and the write to the output memory.
// Captures d on the clock edge where load is high; synchronous active-low
// reset clears it.
module pe_output_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic signed [WIDTH-1:0] d,
  output logic signed [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
