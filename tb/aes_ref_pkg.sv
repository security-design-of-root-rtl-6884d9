// aes_ref_pkg: textbook AES-256 reference model for testbenches: full key
// expansion into 60 words, byte-array state, and an S-box built by walking
// the multiplicative group with generator 3 (a different construction from
// the hardware's). aes_ctr_xor encrypts or decrypts a 256-bit value as two
// CTR blocks starting at the given counter.
package aes_ref_pkg;
  function automatic logic [7:0] xt(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic void make_sbox(output logic [7:0] sb[256]);
    logic [7:0] p, q, x;
    p = 1; q = 1;
    do begin
      p = p ^ xt(p);                         // p * 3
      q = q ^ (q << 1); q = q ^ (q << 2); q = q ^ (q << 4);
      if (q[7]) q = q ^ 8'h09;               // q / 3
      x = q ^ {q[6:0], q[7]} ^ {q[5:0], q[7:6]} ^ {q[4:0], q[7:5]} ^ {q[3:0], q[7:4]};
      sb[p] = x ^ 8'h63;
    end while (p != 1);
    sb[0] = 8'h63;
  endfunction

  function automatic logic [127:0] aes256_enc(input logic [255:0] key, input logic [127:0] pt);
    logic [7:0]  sb[256];
    logic [31:0] w[60], t;
    logic [7:0]  s[16], u[16];
    logic [7:0]  rc;
    logic [127:0] r;
    make_sbox(sb);
    for (int i = 0; i < 8; i++) w[i] = key[255 - 32 * i -: 32];
    rc = 8'h01;
    for (int i = 8; i < 60; i++) begin
      t = w[i - 1];
      if (i % 8 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]} ^ {rc, 24'h0};
        rc = xt(rc);
      end else if (i % 8 == 4) begin
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]};
      end
      w[i] = w[i - 8] ^ t;
    end
    for (int k = 0; k < 16; k++) s[k] = pt[127 - 8 * k -: 8] ^ w[k / 4][31 - 8 * (k % 4) -: 8];
    for (int rnd = 1; rnd <= 14; rnd++) begin
      for (int k = 0; k < 16; k++) s[k] = sb[s[k]];
      for (int c = 0; c < 4; c++) for (int row = 0; row < 4; row++) u[4 * c + row] = s[4 * ((c + row) % 4) + row];
      if (rnd != 14)
        for (int c = 0; c < 4; c++) begin
          s[4 * c]     = xt(u[4 * c]) ^ xt(u[4 * c + 1]) ^ u[4 * c + 1] ^ u[4 * c + 2] ^ u[4 * c + 3];
          s[4 * c + 1] = u[4 * c] ^ xt(u[4 * c + 1]) ^ xt(u[4 * c + 2]) ^ u[4 * c + 2] ^ u[4 * c + 3];
          s[4 * c + 2] = u[4 * c] ^ u[4 * c + 1] ^ xt(u[4 * c + 2]) ^ xt(u[4 * c + 3]) ^ u[4 * c + 3];
          s[4 * c + 3] = xt(u[4 * c]) ^ u[4 * c] ^ u[4 * c + 1] ^ u[4 * c + 2] ^ xt(u[4 * c + 3]);
        end
      else s = u;
      for (int k = 0; k < 16; k++) s[k] ^= w[4 * rnd + k / 4][31 - 8 * (k % 4) -: 8];
    end
    for (int k = 0; k < 16; k++) r[127 - 8 * k -: 8] = s[k];
    return r;
  endfunction

  function automatic logic [255:0] aes_ctr_xor(input logic [255:0] key, input logic [127:0] ctr,
                                               input logic [255:0] d);
    return d ^ {aes256_enc(key, ctr), aes256_enc(key, ctr + 128'd1)};
  endfunction
endpackage
