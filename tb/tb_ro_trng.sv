// tb_ro_trng: draws several 96-bit numbers and checks the collection time
// (NBITS*SAMPLE_DIV clocks), that the numbers differ from each other, and
// that the share of ones over all bits is near one half.
module tb_ro_trng;
  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;
  logic start, rnd_valid;
  logic [95:0] rnd_o;
  logic [95:0] got [6];
  int checks = 0, failures = 0, ones = 0;

  ro_trng dut (.*);

  initial begin
    int cyc;
    start = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 6; n++) begin
      start <= 1; @(posedge clk); start <= 0;
      cyc = 0;
      do begin @(posedge clk); cyc++; end while (!rnd_valid);
      checks++;
      if (cyc != 96 * 8 + 1) begin failures++; $display("FAIL time %0d", cyc); end
      got[n] = rnd_o;
      ones += $countones(rnd_o);
      for (int k = 0; k < n; k++) begin
        checks++;
        if (got[k] == got[n]) begin failures++; $display("FAIL repeated number"); end
      end
    end
    checks++;
    if (ones < 230 || ones > 346) begin failures++; $display("FAIL ones %0d of 576", ones); end
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
