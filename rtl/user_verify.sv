// user_verify: device-side authentication of the user instructions (ITCM)
// and user data (DTCM) before the processor runs them.
//
// The host hashes both images with SM3 and encrypts the two digests with
// AES-CTR; the two 256-bit ciphertexts (enc_itcm, enc_dtcm) and the initial
// counter block ctr0 are handed to this block with the images. On start:
//  1. DECRYPT: the four 128-bit ciphertext blocks (enc_itcm high, low, then
//     enc_dtcm high, low) go through AES-CTR with the derived key, counter
//     ctr0 .. ctr0+3, giving the reference digests Hash_value.
//  2. HASH: the first itcm_words words of ITCM, then the first dtcm_words
//     words of DTCM, are read through mem_* and hashed, giving Hash_run.
//  3. COMPARE: each Hash_run is compared with its Hash_value. pass rises
//     with done when both match; otherwise halt rises and stays high, which
//     stops the processor.
// mem_sel picks the memory (0 ITCM, 1 DTCM); mem_rdata must return the word
// one cycle after mem_addr. The flow (decrypt the digests, hash the loaded
// images, compare, continue or stop) follows the document, where the boot
// code drives it with the SM3 and AES hardware; gathering it into one
// hardware sequencer, the block order and the counter use are this design's
// choices. Lengths must be at least one word.
module user_verify #(
  parameter int unsigned ITCM_WORDS = 8192,
  parameter int unsigned DTCM_WORDS = 8192,
  localparam int unsigned AW = $clog2((ITCM_WORDS > DTCM_WORDS) ? ITCM_WORDS : DTCM_WORDS),
  localparam int unsigned LW = AW + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [255:0]  key,
  input  logic [127:0]  ctr0,
  input  logic [255:0]  enc_itcm,
  input  logic [255:0]  enc_dtcm,
  input  logic [LW-1:0] itcm_words,
  input  logic [LW-1:0] dtcm_words,
  output logic          mem_sel,
  output logic [AW-1:0] mem_addr,
  input  logic [31:0]   mem_rdata,
  output logic          busy,
  output logic          done,
  output logic          pass,
  output logic          halt,
  output logic          itcm_ok,
  output logic          dtcm_ok,
  output logic [255:0]  hash_value_itcm,
  output logic [255:0]  hash_value_dtcm,
  output logic [255:0]  hash_run_itcm,
  output logic [255:0]  hash_run_dtcm
);
  typedef enum logic [2:0] {U_IDLE, U_LOAD, U_DEC, U_READ, U_FEED, U_WAIT, U_CMP} ustate_t;
  ustate_t state;

  // AES-CTR
  logic         ctr_load, ctr_in_valid, ctr_in_ready, ctr_out_valid;
  logic [127:0] ctr_in, ctr_out;
  logic [1:0]   sent, rcvd;
  logic         all_sent;

  aes_ctr u_ctr (
    .clk, .rst_n, .load(ctr_load), .key_i(key), .ctr_i(ctr0),
    .in_valid(ctr_in_valid), .in_ready(ctr_in_ready), .in_data(ctr_in),
    .out_valid(ctr_out_valid), .out_data(ctr_out));

  assign ctr_load     = (state == U_LOAD);
  assign ctr_in_valid = (state == U_DEC) && !all_sent;
  always_comb begin
    unique case (sent)
      2'd0: ctr_in = enc_itcm[255:128];
      2'd1: ctr_in = enc_itcm[127:0];
      2'd2: ctr_in = enc_dtcm[255:128];
      default: ctr_in = enc_dtcm[127:0];
    endcase
  end

  // SM3 over the images
  logic          sm3_ready, sm3_done, last;
  logic [255:0]  digest;
  logic [AW-1:0] idx;
  logic [LW-1:0] len;

  assign len      = mem_sel ? dtcm_words : itcm_words;
  assign last     = ({1'b0, idx} == len - 1'b1);
  assign mem_addr = idx;

  sm3_core u_sm3 (
    .clk, .rst_n, .in_valid(state == U_FEED), .in_ready(sm3_ready), .in_data(mem_rdata),
    .in_last(last), .in_vbytes(2'b11), .hash_o(digest), .hash_valid(sm3_done));

  assign busy = (state != U_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state           <= U_IDLE;
      sent            <= '0;
      rcvd            <= '0;
      all_sent        <= 1'b0;
      idx             <= '0;
      mem_sel         <= 1'b0;
      done            <= 1'b0;
      pass            <= 1'b0;
      halt            <= 1'b0;
      itcm_ok         <= 1'b0;
      dtcm_ok         <= 1'b0;
      hash_value_itcm <= '0;
      hash_value_dtcm <= '0;
      hash_run_itcm   <= '0;
      hash_run_dtcm   <= '0;
    end else begin
      unique case (state)
        U_IDLE: if (start) begin
          done     <= 1'b0;
          pass     <= 1'b0;
          itcm_ok  <= 1'b0;
          dtcm_ok  <= 1'b0;
          sent     <= '0;
          rcvd     <= '0;
          all_sent <= 1'b0;
          state    <= U_LOAD;
        end
        U_LOAD: state <= U_DEC;
        U_DEC: begin
          if (ctr_in_valid && ctr_in_ready) begin
            sent <= sent + 1'b1;
            if (sent == 2'd3) all_sent <= 1'b1;
          end
          if (ctr_out_valid) begin
            unique case (rcvd)
              2'd0: hash_value_itcm[255:128] <= ctr_out;
              2'd1: hash_value_itcm[127:0]   <= ctr_out;
              2'd2: hash_value_dtcm[255:128] <= ctr_out;
              default: hash_value_dtcm[127:0] <= ctr_out;
            endcase
            rcvd <= rcvd + 1'b1;
            if (rcvd == 2'd3) begin
              idx     <= '0;
              mem_sel <= 1'b0;
              state   <= U_READ;
            end
          end
        end
        U_READ: state <= U_FEED;
        U_FEED: if (sm3_ready) begin
          if (last) state <= U_WAIT;
          else begin
            idx   <= idx + 1'b1;
            state <= U_READ;
          end
        end
        U_WAIT: if (sm3_done) begin
          if (!mem_sel) begin
            hash_run_itcm <= digest;
            mem_sel       <= 1'b1;
            idx           <= '0;
            state         <= U_READ;
          end else begin
            hash_run_dtcm <= digest;
            state         <= U_CMP;
          end
        end
        U_CMP: begin
          itcm_ok <= (hash_run_itcm == hash_value_itcm);
          dtcm_ok <= (hash_run_dtcm == hash_value_dtcm);
          pass    <= (hash_run_itcm == hash_value_itcm) && (hash_run_dtcm == hash_value_dtcm);
          halt    <= halt || !((hash_run_itcm == hash_value_itcm) && (hash_run_dtcm == hash_value_dtcm));
          done    <= 1'b1;
          mem_sel <= 1'b0;
          state   <= U_IDLE;
        end
        default: state <= U_IDLE;
      endcase
    end
  end
endmodule
