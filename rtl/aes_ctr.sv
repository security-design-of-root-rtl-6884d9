// aes_ctr: AES-CTR mode around aes256_core.
//
// load=1 for one cycle sets the 128-bit counter block to ctr_i and captures the
// key. Each block then accepted on the in_valid/in_ready handshake is XORed with
// AES_K(counter) and the counter is incremented by one (modulo 2^128) for the
// next block. Encryption and decryption are the same operation. out_valid
// pulses on the 16th clock edge after the acceptance edge (one cycle to start
// the cipher, 14 rounds, one output register); a new block is accepted after. CTR mode follows the document; the counter
// layout and the increment over the whole 128 bits are this design's choice.
module aes_ctr (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [255:0] key_i,
  input  logic [127:0] ctr_i,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [127:0] in_data,
  output logic         out_valid,
  output logic [127:0] out_data
);
  logic [255:0] key_q;
  logic [127:0] ctr_q, data_q, ks;
  logic         pending, start, busy, ks_valid;

  aes256_core u_aes (
    .clk, .rst_n, .start, .key_i(key_q), .pt_i(ctr_q),
    .busy, .ct_o(ks), .ct_valid(ks_valid)
  );

  assign in_ready = !pending && !load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      key_q     <= '0;
      ctr_q     <= '0;
      data_q    <= '0;
      pending   <= 1'b0;
      start     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      start     <= 1'b0;
      out_valid <= 1'b0;
      if (load) begin
        key_q <= key_i;
        ctr_q <= ctr_i;
      end else if (in_valid && in_ready) begin
        data_q  <= in_data;
        pending <= 1'b1;
        start   <= 1'b1;
      end else if (pending && ks_valid) begin
        out_data  <= data_q ^ ks;
        out_valid <= 1'b1;
        pending   <= 1'b0;
        ctr_q     <= ctr_q + 128'd1;
      end
    end
  end
endmodule
