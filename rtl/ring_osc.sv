// ring_osc: BEHAVIOURAL MODEL of a ring oscillator (an odd chain of inverters
// closed through a NAND enable). It is the base cell of the TRNG and the PUF.
// A real ring oscillator is an analog timing loop and cannot be written as
// synthesizable logic; on silicon or FPGA it is a hand-placed cell chain.
//
// While en is high, ro_out toggles every STAGES*STAGE_DELAY + MISMATCH time
// units plus a random jitter of 0..JITTER units drawn afresh for each half
// period (the phase jitter the TRNG harvests). MISMATCH stands for the extra
// delay that manufacturing variation gives one particular oscillator, which
// the PUF turns into an ID. While en is low the output rests at 0. Delays are in the
// simulator's time unit; the testbenches use a 100-unit clock period. The
// jitter is waited out in single-unit steps so that every delay is a fixed,
// non-zero amount.
module ring_osc #(
  parameter int unsigned STAGES      = 5,
  parameter int unsigned STAGE_DELAY = 5,
  parameter int unsigned MISMATCH    = 0,
  parameter int unsigned JITTER      = 2
) (
  input  logic en,
  output logic ro_out
);
  initial ro_out = 1'b0;

  always begin
    if (en) begin
      #(STAGES * STAGE_DELAY + MISMATCH);
      repeat ($urandom_range(JITTER, 0)) #1;
      ro_out = en ? ~ro_out : 1'b0;
    end else begin
      ro_out = 1'b0;
      @(posedge en);
    end
  end
endmodule
