// tb_boot_rom: reads every word of the boot ROM and compares it with the
// generating formula of the example image (32-bit LCG from 0x297), and
// checks the one-cycle read latency.
module tb_boot_rom;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [8:0]  addr;
  logic [31:0] rdata, x;
  int checks = 0, failures = 0;

  boot_rom dut (.*);

  initial begin
    x = 32'h297;
    for (int i = 0; i < 512; i++) begin
      addr <= 9'(i);
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== x) begin failures++; $display("FAIL word %0d %h exp %h", i, rdata, x); end
      x = x * 32'd1664525 + 32'd1013904223;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
