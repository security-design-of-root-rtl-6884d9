// aes256_core: AES-256 forward cipher, one round per clock.
//
// Start with start=1 for one cycle while key_i and pt_i are valid (both are
// captured). Round 0 (the initial AddRoundKey) is done on capture, then rounds
// 1..14 take one clock each; the last round loads ct_o and pulses ct_valid on
// the 14th clock edge after the start cycle, so a block costs 15 cycles. ct_o
// holds the result until the next block; busy is high in between.
// Round keys are expanded on the fly: an 8-word (256-bit) window of the key
// schedule gives the keys of two consecutive rounds and is advanced by eight
// words every second round, so no round-key storage is needed.
// Only encryption is built because CTR mode, which this core serves, decrypts
// by encrypting the counter. The document names AES and CTR mode but not the
// key length; 256 bits is chosen here because the key derivation circuit
// delivers a 256-bit key.
module aes256_core
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [255:0] key_i,
  input  logic [127:0] pt_i,
  output logic         busy,
  output logic [127:0] ct_o,
  output logic         ct_valid
);
  logic [127:0] st;
  logic [255:0] kw;        // key schedule window w[8i .. 8i+7]
  logic [3:0]   rnd;       // next round to perform, 1..14
  logic [7:0]   rcon;

  // Next eight key-schedule words from the current window.
  function automatic logic [255:0] next_window(input logic [255:0] k, input logic [7:0] rc);
    logic [31:0] w [8];
    logic [31:0] n [8];
    for (int i = 0; i < 8; i++) w[i] = k[255 - 32 * i -: 32];
    n[0] = w[0] ^ sub_word({w[7][23:0], w[7][31:24]}) ^ {rc, 24'h0};
    for (int i = 1; i < 8; i++)
      n[i] = w[i] ^ ((i == 4) ? sub_word(n[3]) : n[i - 1]);
    return {n[0], n[1], n[2], n[3], n[4], n[5], n[6], n[7]};
  endfunction

  logic [127:0] rk, sr, mixed;
  always_comb begin
    // odd rounds use the upper half of the window, even rounds the lower half
    // of the window advanced at the previous odd round
    rk    = rnd[0] ? kw[127:0] : kw[255:128];
    sr    = shift_rows(sub_bytes(st));
    mixed = (rnd == 4'd14) ? sr : mix_columns(sr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= '0;
      kw       <= '0;
      rnd      <= '0;
      rcon     <= 8'h01;
      busy     <= 1'b0;
      ct_o     <= '0;
      ct_valid <= 1'b0;
    end else begin
      ct_valid <= 1'b0;
      if (start && !busy) begin
        st   <= pt_i ^ key_i[255:128];
        kw   <= key_i;
        rnd  <= 4'd1;
        rcon <= 8'h01;
        busy <= 1'b1;
      end else if (busy) begin
        st <= mixed ^ rk;
        if (rnd[0]) begin
          kw   <= next_window(kw, rcon);
          rcon <= xtime(rcon);
        end
        if (rnd == 4'd14) begin
          busy     <= 1'b0;
          ct_o     <= mixed ^ rk;
          ct_valid <= 1'b1;
        end
        rnd <= rnd + 4'd1;
      end
    end
  end
endmodule
