// ro_puf: ring-oscillator physical unclonable function giving an NBITS ID.
//
// Bit i compares two nominally identical ring oscillators, 2i and 2i+1. The
// pair is enabled for WINDOW clocks; two counters, each clocked by one of the
// selected oscillators, count their edges; after the pair is stopped and has
// settled, the bit is 1 when the first oscillator counted more edges. The
// bits are evaluated one after another through one pair of counters, so an ID
// takes NBITS*(WINDOW+3) clocks after start; id_valid then rises and id_o
// holds the ID. Only the selected pair runs, which saves power and keeps the
// other oscillators from coupling into it.
// Frequency differences between copies of the same oscillator come from
// manufacturing; in the models they come from per-oscillator delays drawn
// from DEVICE_SEED, so different seeds behave like different chips.
// Comparing ring-oscillator frequencies and the 96-bit ID follow the
// document; the pairing, sequential evaluation, window and counter widths are
// this design's choices.
module ro_puf #(
  parameter int unsigned NBITS       = 96,
  parameter int unsigned WINDOW      = 64,
  parameter int unsigned CNT_W       = 16,
  parameter int unsigned DEVICE_SEED = 32'h1234_5678
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic [NBITS-1:0] id_o,
  output logic             id_valid
);
  // Mismatch of oscillator idx in the models, from a hash of the seed: the
  // first of a pair gets 4..11 units, the second differs from it by 1..4
  // units in a random direction, so no pair ties.
  function automatic logic [31:0] mix(input int unsigned pair);
    logic [31:0] h;
    h = DEVICE_SEED ^ (pair * 32'h9e37_79b9);
    h = h ^ (h >> 15);
    h = h * 32'h2c1b_3c6d;
    h = h ^ (h >> 12);
    return h;
  endfunction
  function automatic int unsigned osc_mismatch(input int unsigned idx);
    logic [31:0] h;
    int unsigned base;
    h    = mix(idx / 2);
    base = 4 + int'(h[18:16]);
    if (idx % 2 == 0) return base;
    return h[24] ? base + 1 + int'(h[21:20]) : base - 1 - int'(h[21:20]);
  endfunction

  logic [2*NBITS-1:0] en, ro;
  for (genvar i = 0; i < 2 * NBITS; i++) begin : g_ro
    ring_osc #(.STAGES(5), .STAGE_DELAY(4), .MISMATCH(osc_mismatch(i)), .JITTER(1)) u_ro (.en(en[i]), .ro_out(ro[i]));
  end

  typedef enum logic [2:0] {P_IDLE, P_CLR, P_RUN, P_SETTLE, P_CMP} pstate_t;
  pstate_t state;
  logic [$clog2(NBITS)-1:0]  sel;
  logic [$clog2(WINDOW+1)-1:0] tcnt;
  logic clr, run;
  logic [CNT_W-1:0] cnt_a, cnt_b;
  logic ro_a, ro_b;

  assign ro_a = ro[2 * sel];
  assign ro_b = ro[2 * sel + 1];
  always_comb begin
    en = '0;
    en[2 * sel]     = run;
    en[2 * sel + 1] = run;
  end

  always_ff @(posedge ro_a or posedge clr) begin
    if (clr) cnt_a <= '0;
    else     cnt_a <= cnt_a + 1'b1;
  end
  always_ff @(posedge ro_b or posedge clr) begin
    if (clr) cnt_b <= '0;
    else     cnt_b <= cnt_b + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= P_IDLE;
      sel      <= '0;
      tcnt     <= '0;
      clr      <= 1'b1;
      run      <= 1'b0;
      id_o     <= '0;
      id_valid <= 1'b0;
    end else begin
      unique case (state)
        P_IDLE: begin
          clr <= 1'b1;
          if (start) begin
            id_valid <= 1'b0;
            sel      <= '0;
            state    <= P_CLR;
          end
        end
        P_CLR: begin
          clr   <= 1'b0;
          run   <= 1'b1;
          tcnt  <= '0;
          state <= P_RUN;
        end
        P_RUN: begin
          tcnt <= tcnt + 1'b1;
          if (tcnt == $bits(tcnt)'(WINDOW - 1)) begin
            run   <= 1'b0;
            tcnt  <= '0;
            state <= P_SETTLE;
          end
        end
        P_SETTLE: state <= P_CMP;
        P_CMP: begin
          id_o[sel] <= (cnt_a > cnt_b);
          clr       <= 1'b1;
          if (sel == $bits(sel)'(NBITS - 1)) begin
            id_valid <= 1'b1;
            state    <= P_IDLE;
          end else begin
            sel   <= sel + 1'b1;
            state <= P_CLR;
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end
endmodule
