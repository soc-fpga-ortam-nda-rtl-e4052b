// tb_pe_core: exhaustive check of the processing element. Every op and every
// pair of 8-bit operands is applied, with a random accumulate input, and
// z_out is compared with the integer reference model; x_out must equal
// x_in. A second instance with FRAC_BIT = 2 checks the product scaling.
`timescale 1ns/1ps
module tb_pe_core;
  import pe_pkg::*;
  import pe_ref_pkg::*;

  int checks = 0, failures = 0;
  pe_op_e op;
  logic signed [7:0] x_in, y, z_in, x_out, z_out, x_out2, z_out2;

  pe_core #(.WIDTH(8), .FRAC_BIT(0)) dut  (.op, .x_in, .y, .z_in, .x_out, .z_out);
  pe_core #(.WIDTH(8), .FRAC_BIT(2)) dut2 (.op, .x_in, .y, .z_in, .x_out(x_out2), .z_out(z_out2));

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    for (int o = 0; o < 4; o++) begin
      for (int a = 0; a < 256; a++) begin
        for (int b = 0; b < 256; b++) begin
          op   = pe_op_e'(o);
          x_in = 8'(a);
          y    = 8'(b);
          z_in = 8'($urandom);
          #1;
          w = {8'h00, z_in, y, x_in};
          checks++;
          if (32'(z_out) !== ref_word(o, w) || x_out !== x_in) begin
            failures++;
            if (failures < 10) $display("FAIL op=%0d x=%0d y=%0d z=%0d got=%0d exp=%0d",
                                        o, x_in, y, z_in, z_out, $signed(ref_word(o, w)));
          end
          if (o >= 2) begin
            checks++;
            if (32'(z_out2) !== ref_word(o, w, 2)) begin
              failures++;
              if (failures < 10) $display("FAIL frac2 op=%0d x=%0d y=%0d", o, x_in, y);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
