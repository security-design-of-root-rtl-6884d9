// sm3_ref_pkg: plain reference model of SM3 for testbenches. It pads the
// whole message in memory and expands all 68+64 words of each group before
// compressing, the textbook way, so it shares no structure with the
// streaming hardware core it is used to check.
package sm3_ref_pkg;
  function automatic logic [31:0] rl(input logic [31:0] x, input int n);
    n = n % 32;
    return (n == 0) ? x : ((x << n) | (x >> (32 - n)));
  endfunction

  function automatic logic [255:0] sm3_hash(input byte unsigned m[$]);
    byte unsigned p[$];
    logic [63:0] len;
    logic [31:0] v[8], w[68], w1[64];
    logic [31:0] a, b, c, d, e, f, g, h, ss1, ss2, tt1, tt2, t;
    logic [255:0] r;
    p = m;
    len = 64'(m.size()) * 8;
    p.push_back(8'h80);
    while (p.size() % 64 != 56) p.push_back(8'h00);
    for (int i = 7; i >= 0; i--) p.push_back(len[8 * i +: 8]);
    v = '{32'h7380166f, 32'h4914b2b9, 32'h172442d7, 32'hda8a0600,
          32'ha96f30bc, 32'h163138aa, 32'he38dee4d, 32'hb0fb0e4e};
    for (int blk = 0; blk < p.size() / 64; blk++) begin
      for (int j = 0; j < 16; j++)
        w[j] = {p[64 * blk + 4 * j], p[64 * blk + 4 * j + 1], p[64 * blk + 4 * j + 2], p[64 * blk + 4 * j + 3]};
      for (int j = 16; j < 68; j++) begin
        t = w[j - 16] ^ w[j - 9] ^ rl(w[j - 3], 15);
        w[j] = (t ^ rl(t, 15) ^ rl(t, 23)) ^ rl(w[j - 13], 7) ^ w[j - 6];
      end
      for (int j = 0; j < 64; j++) w1[j] = w[j] ^ w[j + 4];
      {a, b, c, d, e, f, g, h} = {v[0], v[1], v[2], v[3], v[4], v[5], v[6], v[7]};
      for (int j = 0; j < 64; j++) begin
        t   = (j < 16) ? 32'h79cc4519 : 32'h7a879d8a;
        ss1 = rl(rl(a, 12) + e + rl(t, j), 7);
        ss2 = ss1 ^ rl(a, 12);
        tt1 = ((j < 16) ? (a ^ b ^ c) : ((a & b) | (a & c) | (b & c))) + d + ss2 + w1[j];
        tt2 = ((j < 16) ? (e ^ f ^ g) : ((e & f) | (~e & g))) + h + ss1 + w[j];
        d = c; c = rl(b, 9); b = a; a = tt1;
        h = g; g = rl(f, 19); f = e; e = tt2 ^ rl(tt2, 9) ^ rl(tt2, 17);
      end
      v[0] ^= a; v[1] ^= b; v[2] ^= c; v[3] ^= d;
      v[4] ^= e; v[5] ^= f; v[6] ^= g; v[7] ^= h;
    end
    r = {v[0], v[1], v[2], v[3], v[4], v[5], v[6], v[7]};
    return r;
  endfunction
endpackage
