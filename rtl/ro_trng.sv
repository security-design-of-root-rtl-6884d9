// ro_trng: ring-oscillator true random number generator.
//
// NUM_RO free-running ring oscillators of different lengths are XORed; the
// system clock samples the XOR through a two-flop synchroniser. Because the
// oscillators' phase jitter accumulates between samples, the sampled bit is
// unpredictable when the sampling interval is long against the jitter. One
// bit is taken every SAMPLE_DIV clocks and shifted into an NBITS register;
// after NBITS bits rnd_valid rises and rnd_o holds the number until the next
// start pulse. A number therefore takes NBITS*SAMPLE_DIV clocks (+2).
// The oscillators run only while a number is being collected.
// The jitter principle, the ring-oscillator base cell and the 96-bit width
// follow the document; the oscillator count and lengths, the XOR combining and
// the sampling divider are this design's choices (no post-processing is
// described, so none is built).
module ro_trng #(
  parameter int unsigned NBITS      = 96,
  parameter int unsigned NUM_RO     = 3,
  parameter int unsigned SAMPLE_DIV = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic [NBITS-1:0] rnd_o,
  output logic             rnd_valid
);
  logic [NUM_RO-1:0] ro;
  logic              run;

  for (genvar i = 0; i < NUM_RO; i++) begin : g_ro
    ring_osc #(.STAGES(3 + 2 * i), .STAGE_DELAY(3 + i), .JITTER(3)) u_ro (.en(run), .ro_out(ro[i]));
  end

  logic sync1, sync2;
  logic [$clog2(SAMPLE_DIV+1)-1:0] div;
  logic [$clog2(NBITS+1)-1:0]      nbit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1     <= 1'b0;
      sync2     <= 1'b0;
      div       <= '0;
      nbit      <= '0;
      run       <= 1'b0;
      rnd_o     <= '0;
      rnd_valid <= 1'b0;
    end else begin
      sync1 <= ^ro;
      sync2 <= sync1;
      if (start) begin
        run       <= 1'b1;
        rnd_valid <= 1'b0;
        nbit      <= '0;
        div       <= '0;
      end else if (run) begin
        if (div == $bits(div)'(SAMPLE_DIV - 1)) begin
          div   <= '0;
          rnd_o <= {rnd_o[NBITS-2:0], sync2};
          nbit  <= nbit + 1'b1;
          if (nbit == $bits(nbit)'(NBITS - 1)) begin
            run       <= 1'b0;
            rnd_valid <= 1'b1;
          end
        end else begin
          div <= div + 1'b1;
        end
      end
    end
  end
endmodule
