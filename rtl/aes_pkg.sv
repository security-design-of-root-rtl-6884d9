// aes_pkg: AES (FIPS-197) helpers shared by the AES core and its testbenches.
// The S-box is not typed in as a table: gen_sbox() computes it at elaboration
// time as the affine transform of the multiplicative inverse in GF(2^8)
// (polynomial x^8+x^4+x^3+x+1), the inverse taken from exp/log tables of
// the generator 3, and SBOX is the resulting constant ROM.
package aes_pkg;
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction


  function automatic logic [2047:0] gen_sbox();
    logic [2047:0] t;
    logic [7:0] exp_t [256];
    logic [7:0] log_t [256];
    logic [7:0] x, inv, s;
    // powers of the generator 3 give exp and log tables; the inverse of
    // a = 3^k is 3^(255-k), and 0 maps to 0
    x = 8'h01;
    for (int k = 0; k < 255; k++) begin
      exp_t[k] = x;
      log_t[x] = 8'(k);
      x = x ^ xtime(x);
    end
    for (int a = 0; a < 256; a++) begin
      inv = (a == 0) ? 8'h00 : exp_t[(255 - int'(log_t[a])) % 255];
      s = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]}
              ^ {inv[3:0], inv[7:4]} ^ 8'h63;
      t[8 * a +: 8] = s;
    end
    return t;
  endfunction

  localparam logic [2047:0] SBOX = gen_sbox();

  function automatic logic [7:0] sbox(input logic [7:0] a);
    return SBOX[8 * a +: 8];
  endfunction

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  // State byte k (k = 4*column + row) sits at bits [127-8k -: 8].
  function automatic logic [127:0] sub_bytes(input logic [127:0] s);
    logic [127:0] r;
    for (int k = 0; k < 16; k++) r[8 * k +: 8] = sbox(s[8 * k +: 8]);
    return r;
  endfunction

  function automatic logic [127:0] shift_rows(input logic [127:0] s);
    logic [127:0] r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127 - 8 * (4 * c + row) -: 8] = s[127 - 8 * (4 * ((c + row) % 4) + row) -: 8];
    return r;
  endfunction

  function automatic logic [127:0] mix_columns(input logic [127:0] s);
    logic [127:0] r;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = s[127 - 32 * c -: 8];
      a1 = s[119 - 32 * c -: 8];
      a2 = s[111 - 32 * c -: 8];
      a3 = s[103 - 32 * c -: 8];
      r[127 - 32 * c -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      r[119 - 32 * c -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      r[111 - 32 * c -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      r[103 - 32 * c -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
  endfunction
endpackage
