// tb_ring_osc: checks the ring-oscillator model: no edges while disabled,
// and, while enabled, an edge count over a fixed time that fits the nominal
// half period (STAGES*STAGE_DELAY + MISMATCH, plus 0..JITTER).
module tb_ring_osc;
  logic en, ro_out;
  int checks = 0, failures = 0, edges;
  ring_osc #(.STAGES(5), .STAGE_DELAY(4), .MISMATCH(3), .JITTER(2)) dut (.*);
  always @(posedge ro_out) edges++;

  initial begin
    en = 0; edges = 0;
    #2000;
    checks++;
    if (edges != 0 || ro_out) begin failures++; $display("FAIL toggles while disabled"); end
    en = 1;
    #10000;
    en = 0;
    // half period 23..25 units: 10000 units give 200..218 rising edges
    checks++;
    if (edges < 199 || edges > 218) begin failures++; $display("FAIL edges %0d", edges); end
    #200;
    edges = 0;
    #2000;
    checks++;
    if (edges != 0 || ro_out) begin failures++; $display("FAIL did not stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
