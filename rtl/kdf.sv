// kdf: key derivation circuit. The 256-bit key is SM3(PUF_ID xor TRNG).
//
// On start the circuit reads the device ID from the RO-PUF (once; the ID is
// latched and reused by later derivations) and a fresh 96-bit random number
// from the RO-TRNG, XORs the two, hashes the 96-bit result as a 12-byte SM3
// message and publishes the digest on key_o with a key_valid pulse; key_o
// holds the key until the next derivation. state_o shows the controller
// state (0 idle, 1 collecting PUF and TRNG, 2 feeding SM3, 3 hashing).
// Intermediate values are brought out for observation. Each derivation gives
// a new key because the TRNG input changes, while the PUF term ties the key
// to the chip. The TRNG xor PUF then digest structure and the 96-bit widths
// follow the document; the sequencing and the latching of the ID are this
// design's choices.
module kdf #(
  parameter int unsigned NBITS       = 96,
  parameter int unsigned PUF_WINDOW  = 64,
  parameter int unsigned TRNG_DIV    = 8,
  parameter int unsigned DEVICE_SEED = 32'h1234_5678
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic [255:0]     key_o,
  output logic             key_valid,
  output logic             busy,
  output logic [NBITS-1:0] puf_id_o,
  output logic [NBITS-1:0] trng_o,
  output logic [NBITS-1:0] xor_o,
  output logic [2:0]       state_o
);
  localparam int unsigned NW = NBITS / 32;

  typedef enum logic [2:0] {K_IDLE = 3'd0, K_COLLECT = 3'd1, K_FEED = 3'd2, K_HASH = 3'd3} kstate_t;
  kstate_t state;

  logic puf_start, puf_valid, trng_start, trng_valid, have_id;
  logic [NBITS-1:0] puf_id, trng;

  ro_puf #(.NBITS(NBITS), .WINDOW(PUF_WINDOW), .DEVICE_SEED(DEVICE_SEED)) u_puf (
    .clk, .rst_n, .start(puf_start), .id_o(puf_id), .id_valid(puf_valid));
  ro_trng #(.NBITS(NBITS), .SAMPLE_DIV(TRNG_DIV)) u_trng (
    .clk, .rst_n, .start(trng_start), .rnd_o(trng), .rnd_valid(trng_valid));

  logic        sm3_valid, sm3_ready, sm3_last, sm3_done;
  logic [31:0] sm3_data;
  logic [255:0] digest;
  logic [$clog2(NW+1)-1:0] widx;

  sm3_core u_sm3 (
    .clk, .rst_n, .in_valid(sm3_valid), .in_ready(sm3_ready), .in_data(sm3_data),
    .in_last(sm3_last), .in_vbytes(2'b11), .hash_o(digest), .hash_valid(sm3_done));

  assign sm3_valid = (state == K_FEED);
  assign sm3_data  = xor_o[NBITS - 1 - 32 * widx -: 32];
  assign sm3_last  = (widx == $bits(widx)'(NW - 1));
  assign busy      = (state != K_IDLE);
  assign state_o   = state;
  assign puf_id_o  = puf_id;
  assign trng_o    = trng;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= K_IDLE;
      puf_start  <= 1'b0;
      trng_start <= 1'b0;
      have_id    <= 1'b0;
      xor_o      <= '0;
      widx       <= '0;
      key_o      <= '0;
      key_valid  <= 1'b0;
    end else begin
      puf_start  <= 1'b0;
      trng_start <= 1'b0;
      key_valid  <= 1'b0;
      unique case (state)
        K_IDLE: if (start) begin
          trng_start <= 1'b1;
          puf_start  <= !have_id;
          state      <= K_COLLECT;
        end
        K_COLLECT: begin
          if (puf_valid) have_id <= 1'b1;
          if (trng_valid && (puf_valid || have_id) && !trng_start && !puf_start) begin
            xor_o <= puf_id ^ trng;
            widx  <= '0;
            state <= K_FEED;
          end
        end
        K_FEED: if (sm3_ready) begin
          widx <= widx + 1'b1;
          if (sm3_last) state <= K_HASH;
        end
        K_HASH: if (sm3_done) begin
          key_o     <= digest;
          key_valid <= 1'b1;
          state     <= K_IDLE;
        end
        default: state <= K_IDLE;
      endcase
    end
  end
endmodule
