// tb_ro_puf: two PUF instances with different seeds stand for two chips.
// Checks: the evaluation time NBITS*(WINDOW+3); each ID bit against the
// prediction from the modelled oscillator mismatches (the faster oscillator
// of a pair wins); a repeated read gives the same ID (reliability); the two
// chips' IDs differ in roughly half their bits (uniqueness).
module tb_ro_puf;
  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;
  localparam int unsigned SEED_A = 32'h1234_5678, SEED_B = 32'h0bad_cafe;
  logic start, va, vb;
  logic [95:0] ida, idb, first;
  int checks = 0, failures = 0;

  ro_puf #(.DEVICE_SEED(SEED_A)) dut_a (.clk, .rst_n, .start, .id_o(ida), .id_valid(va));
  ro_puf #(.DEVICE_SEED(SEED_B)) dut_b (.clk, .rst_n, .start, .id_o(idb), .id_valid(vb));

  // Independent model of the mismatch pattern: bit i is 1 when the second
  // oscillator of pair i is the slower one.
  function automatic logic predict(input int unsigned seed, input int unsigned pair);
    logic [31:0] h;
    h = seed ^ (pair * 32'h9e37_79b9);
    h = h ^ (h >> 15);
    h = h * 32'h2c1b_3c6d;
    h = h ^ (h >> 12);
    return h[24];
  endfunction

  initial begin
    int cyc, bad;
    start = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int rd = 0; rd < 2; rd++) begin
      start <= 1; @(posedge clk); start <= 0;
      cyc = 0;
      do begin @(posedge clk); cyc++; end while (!va);
      checks++;
      if (cyc != 96 * 67 + 1) begin failures++; $display("FAIL time %0d", cyc); end
      if (rd == 0) first = ida;
    end
    bad = 0;
    for (int i = 0; i < 96; i++) if (ida[i] != predict(SEED_A, i)) bad++;
    checks++;
    if (bad > 1) begin failures++; $display("FAIL %0d bits differ from prediction", bad); end
    bad = 0;
    for (int i = 0; i < 96; i++) if (idb[i] != predict(SEED_B, i)) bad++;
    checks++;
    if (bad > 1) begin failures++; $display("FAIL chip B: %0d bits differ from prediction", bad); end
    checks++;
    if ($countones(first ^ ida) > 1) begin failures++; $display("FAIL unstable ID"); end
    checks++;
    if ($countones(ida ^ idb) < 28 || $countones(ida ^ idb) > 68) begin
      failures++; $display("FAIL inter-chip distance %0d", $countones(ida ^ idb));
    end
    $display("inter-chip Hamming distance %0d of 96", $countones(ida ^ idb));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
