// sm3_core: SM3 hash engine with built-in message padding.
//
// The message arrives as 32-bit big-endian words on a valid/ready stream. The
// last word is flagged with in_last and in_vbytes tells how many of its bytes
// count (2'b00 = 1 byte ... 2'b11 = 4 bytes, the most significant bytes first).
// Words fill a 16-word (512-bit) group buffer; a full group is compressed in 64
// rounds, one round per clock, before the next group is accepted, so a group
// costs 16 load cycles plus 64 compression cycles plus one finish cycle. After
// the last word the core appends the 0x80 marker, zero words and the 64-bit
// bit length itself, adding a group when the length does not fit.
// The 16-word buffer doubles as the message-expansion window during
// compression: each round consumes W[j] (and W[j]^W[j+4]) and shifts in W[j+16].
// The digest appears on hash_o with a one-cycle hash_valid pulse and stays on
// hash_o until the next digest. Feeding message groups of 512 bits and
// compressing each 64 times follows the document; the stream interface,
// internal padding and one-round-per-cycle schedule are this design's choice.
module sm3_core
  import sm3_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [31:0]  in_data,
  input  logic         in_last,
  input  logic [1:0]   in_vbytes,
  output logic [255:0] hash_o,
  output logic         hash_valid
);
  typedef enum logic [1:0] {S_LOAD, S_PAD, S_COMP, S_FIN} state_t;
  state_t state;

  logic [31:0]  w [16];
  logic [3:0]   wcnt;          // next free slot of the group buffer
  logic [5:0]   rnd;           // compression round
  logic [63:0]  bitlen;        // message length in bits
  logic [255:0] v;             // chaining value
  logic [31:0]  ra, rb, rc, rd, re, rf, rg, rh;
  logic         pend80;        // marker still to be written as a full word
  logic         marker_done;   // marker byte written
  logic         lenhi_done;    // high length word written in this group
  logic         final_grp;     // group holding the length is in the buffer

  assign in_ready = (state == S_LOAD);

  // Last-word masking and marker insertion.
  logic [31:0] last_word;
  always_comb begin
    unique case (in_vbytes)
      2'd0: last_word = {in_data[31:24], 8'h80, 16'h0};
      2'd1: last_word = {in_data[31:16], 8'h80, 8'h0};
      2'd2: last_word = {in_data[31:8], 8'h80};
      default: last_word = in_data;
    endcase
  end

  // One compression round.
  logic [31:0] tj, ss1, ss2, tt1, tt2, ff, gg, wnew;
  always_comb begin
    tj   = (rnd < 6'd16) ? SM3_T_LO : SM3_T_HI;
    ss1  = rol32(rol32(ra, 12) + re + rol32(tj, 32'(rnd)), 7);
    ss2  = ss1 ^ rol32(ra, 12);
    ff   = (rnd < 6'd16) ? (ra ^ rb ^ rc) : ((ra & rb) | (ra & rc) | (rb & rc));
    gg   = (rnd < 6'd16) ? (re ^ rf ^ rg) : ((re & rf) | (~re & rg));
    tt1  = ff + rd + ss2 + (w[0] ^ w[4]);
    tt2  = gg + rh + ss1 + w[0];
    wnew = p1(w[0] ^ w[7] ^ rol32(w[13], 15)) ^ rol32(w[3], 7) ^ w[10];
  end

  logic [255:0] v_next;
  assign v_next = v ^ {ra, rb, rc, rd, re, rf, rg, rh};

  // Word written into the buffer while padding.
  logic [31:0] pad_word;
  always_comb begin
    if (pend80)                                pad_word = 32'h8000_0000;
    else if (wcnt == 4'd14 && marker_done)     pad_word = bitlen[63:32];
    else if (wcnt == 4'd15 && lenhi_done)      pad_word = bitlen[31:0];
    else                                       pad_word = 32'h0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_LOAD;
      wcnt        <= '0;
      rnd         <= '0;
      bitlen      <= '0;
      v           <= SM3_IV;
      {ra, rb, rc, rd, re, rf, rg, rh} <= SM3_IV;
      pend80      <= 1'b0;
      marker_done <= 1'b0;
      lenhi_done  <= 1'b0;
      final_grp   <= 1'b0;
      hash_o      <= '0;
      hash_valid  <= 1'b0;
      for (int i = 0; i < 16; i++) w[i] <= '0;
    end else begin
      hash_valid <= 1'b0;
      unique case (state)
        S_LOAD: if (in_valid) begin
          w[wcnt] <= in_last ? last_word : in_data;
          bitlen  <= bitlen + 64'({in_vbytes, 3'b000} + 5'd8);
          wcnt    <= wcnt + 4'd1;
          if (in_last) begin
            pend80      <= (in_vbytes == 2'd3);
            marker_done <= (in_vbytes != 2'd3);
          end
          if (wcnt == 4'd15) begin
            state <= S_COMP;
            {ra, rb, rc, rd, re, rf, rg, rh} <= v;
            rnd   <= '0;
          end else if (in_last) begin
            state <= S_PAD;
          end
        end
        S_PAD: begin
          w[wcnt] <= pad_word;
          wcnt    <= wcnt + 4'd1;
          if (pend80) begin
            pend80      <= 1'b0;
            marker_done <= 1'b1;
          end
          if (wcnt == 4'd14 && marker_done && !pend80) lenhi_done <= 1'b1;
          if (wcnt == 4'd15 && lenhi_done) final_grp <= 1'b1;
          if (wcnt == 4'd15) begin
            state <= S_COMP;
            {ra, rb, rc, rd, re, rf, rg, rh} <= v;
            rnd   <= '0;
          end
        end
        S_COMP: begin
          ra <= tt1;
          rb <= ra;
          rc <= rol32(rb, 9);
          rd <= rc;
          re <= p0(tt2);
          rf <= re;
          rg <= rol32(rf, 19);
          rh <= rg;
          for (int i = 0; i < 15; i++) w[i] <= w[i + 1];
          w[15] <= wnew;
          rnd   <= rnd + 6'd1;
          if (rnd == 6'd63) state <= S_FIN;
        end
        S_FIN: begin
          if (final_grp) begin
            // digest complete: publish and restart for the next message
            hash_o      <= v_next;
            hash_valid  <= 1'b1;
            v           <= SM3_IV;
            bitlen      <= '0;
            marker_done <= 1'b0;
            lenhi_done  <= 1'b0;
            final_grp   <= 1'b0;
            state       <= S_LOAD;
          end else begin
            v     <= v_next;
            state <= (marker_done || pend80) ? S_PAD : S_LOAD;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end
endmodule
