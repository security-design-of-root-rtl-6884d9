// sm3_pkg: constants and round functions of the SM3 hash (GB/T 32905-2016).
// Shared by the SM3 core and by the testbenches' reference arithmetic.
package sm3_pkg;
  localparam logic [255:0] SM3_IV =
    256'h7380166f_4914b2b9_172442d7_da8a0600_a96f30bc_163138aa_e38dee4d_b0fb0e4e;
  localparam logic [31:0] SM3_T_LO = 32'h79cc4519;  // rounds 0..15
  localparam logic [31:0] SM3_T_HI = 32'h7a879d8a;  // rounds 16..63

  function automatic logic [31:0] rol32(input logic [31:0] x, input int unsigned n);
    logic [63:0] d;
    d = {x, x} << (n % 32);
    return d[63:32];
  endfunction

  function automatic logic [31:0] p0(input logic [31:0] x);
    return x ^ rol32(x, 9) ^ rol32(x, 17);
  endfunction

  function automatic logic [31:0] p1(input logic [31:0] x);
    return x ^ rol32(x, 15) ^ rol32(x, 23);
  endfunction
endpackage
