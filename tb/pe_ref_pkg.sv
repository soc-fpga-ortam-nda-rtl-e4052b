// pe_ref_pkg: reference model of the processing element for testbenches.
// Computes the expected 32-bit result word for an operand word with plain
// integer arithmetic, independently of the RTL: fields x = w[7:0],
// y = w[15:8], z = w[23:16] (signed), op 0 add, 1 sub, 2 mul, 3 z + x*y,
// result wrapped to 8 bits and sign-extended to 32.
package pe_ref_pkg;

  function automatic int signed sx8(input int v);
    int t;
    t = v & 255;
    return (t >= 128) ? t - 256 : t;
  endfunction

  function automatic logic [31:0] ref_word(input int op, input logic [31:0] w,
                                           input int frac = 0);
    int x, y, z, r;
    x = sx8(int'(w[7:0]));
    y = sx8(int'(w[15:8]));
    z = sx8(int'(w[23:16]));
    case (op)
      0: r = x + y;
      1: r = x - y;
      2: r = (x * y) >>> frac;
      default: r = z + ((x * y) >>> frac);
    endcase
    return 32'(sx8(r));
  endfunction

  // True when the exact result does not fit in 8 signed bits.
  function automatic bit overflows(input int op, input logic [31:0] w);
    int x, y, z, r;
    x = sx8(int'(w[7:0]));
    y = sx8(int'(w[15:8]));
    z = sx8(int'(w[23:16]));
    case (op)
      0: r = x + y;
      1: r = x - y;
      2: r = x * y;
      default: r = z + x * y;
    endcase
    return (r > 127) || (r < -128);
  endfunction

endpackage
