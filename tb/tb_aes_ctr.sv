// tb_aes_ctr: checks AES-256 CTR mode against the SP 800-38A F.5.5 vectors
// (two consecutive blocks, so the counter increment is exercised), checks
// that decryption restores the plaintext, the carry of the 128-bit counter
// and the 16-cycle block latency.
module tb_aes_ctr;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load, in_valid, in_ready, out_valid;
  logic [255:0] key_i;
  logic [127:0] ctr_i, in_data, out_data;
  int checks = 0, failures = 0;

  aes_ctr dut (.*);

  localparam logic [255:0] K = 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4;

  task automatic do_load(input logic [127:0] c);
    load <= 1'b1; key_i <= K; ctr_i <= c;
    @(posedge clk);
    load <= 1'b0;
  endtask

  task automatic block(input logic [127:0] d, input logic [127:0] exp);
    int cyc;
    in_valid <= 1'b1; in_data <= d;
    do @(posedge clk); while (!in_ready);
    in_valid <= 1'b0;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!out_valid);
    checks += 2;
    if (out_data !== exp) begin failures++; $display("FAIL out %h exp %h", out_data, exp); end
    if (cyc != 17) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    load = 0; in_valid = 0; key_i = 0; ctr_i = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    do_load(128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff);
    block(128'h6bc1bee22e409f96e93d7e117393172a, 128'h601ec313775789a5b7a7f504bbf3d228);
    block(128'hae2d8a571e03ac9c9eb76fac45af8e51, 128'hf443e3ca4d62b59aca84e990cacaf5c5);
    do_load(128'hf0f1f2f3f4f5f6f7f8f9fafbfcfdfeff);
    block(128'h601ec313775789a5b7a7f504bbf3d228, 128'h6bc1bee22e409f96e93d7e117393172a);
    do_load('1);
    block(128'h0, 128'h3b3c2921c85a24de9ac606ce6d1d60cc);
    block(128'h0, 128'he568f68194cf76d6174d4cc04310a854);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
