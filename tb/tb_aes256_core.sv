// tb_aes256_core: checks the AES-256 cipher against published FIPS-197 and
// SP 800-38A vectors, checks the latency (result seen 15 cycles after the start cycle) and that a second block
// started back to back gives the right result.
module tb_aes256_core;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, ct_valid;
  logic [255:0] key_i;
  logic [127:0] pt_i, ct_o;
  int checks = 0, failures = 0;

  aes256_core dut (.*);

  task automatic enc(input logic [255:0] k, input logic [127:0] p, input logic [127:0] exp);
    int cyc;
    key_i <= k; pt_i <= p; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    cyc = 0;
    do begin @(posedge clk); cyc++; end while (!ct_valid);
    checks += 2;
    if (ct_o !== exp) begin failures++; $display("FAIL ct %h exp %h", ct_o, exp); end
    if (cyc != 15) begin failures++; $display("FAIL latency %0d", cyc); end
  endtask

  initial begin
    start = 0; key_i = 0; pt_i = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    enc(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f,
        128'h00112233445566778899aabbccddeeff, 128'h8ea2b7ca516745bfeafc49904b496089);
    enc(256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4,
        128'h6bc1bee22e409f96e93d7e117393172a, 128'hf3eed1bdb5d2a03c064b5a7e3db181f8);
    enc(256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4,
        128'h00112233445566778899aabbccddeeff, 128'hd83414223d20a0c928b136c884d07ea2);
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
