// tb_boot_verify: two secure-boot checkers read the same boot ROM image; one
// holds the correct reference hash in its security register, the other a
// reference with one bit flipped. The first must raise pipeline_en and not
// boot_fail, the second the opposite; both must report the true digest of
// the image (from an independent SM3 model of the LCG-generated words), and
// the check must finish in the expected number of clocks.
module tb_boot_verify;
  import sm3_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [8:0] addr_g, addr_b;
  logic [31:0] rd_g, rd_b;
  logic busy_g, done_g, en_g, fail_g, busy_b, done_b, en_b, fail_b;
  logic [255:0] hash_g, hash_b, ref_good;
  int checks = 0, failures = 0, cyc = 0;

  boot_rom rom_g (.clk, .addr(addr_g), .rdata(rd_g));
  boot_rom rom_b (.clk, .addr(addr_b), .rdata(rd_b));
  boot_verify good (.clk, .rst_n, .ref_hash(ref_good), .rom_addr(addr_g), .rom_rdata(rd_g),
                    .busy(busy_g), .done(done_g), .pipeline_en(en_g), .boot_fail(fail_g), .hash_o(hash_g));
  boot_verify bad  (.clk, .rst_n, .ref_hash(ref_good ^ 256'h1), .rom_addr(addr_b), .rom_rdata(rd_b),
                    .busy(busy_b), .done(done_b), .pipeline_en(en_b), .boot_fail(fail_b), .hash_o(hash_b));

  initial begin
    byte unsigned m[$];
    logic [31:0] x;
    x = 32'h297;
    for (int i = 0; i < 512; i++) begin
      for (int b = 3; b >= 0; b--) m.push_back(x[8 * b +: 8]);
      x = x * 32'd1664525 + 32'd1013904223;
    end
    ref_good = sm3_hash(m);
    checks++;
    if (ref_good !== 256'h6169147cfae1e2a47858d33c3f1bca775d8002030ca16e79db50b1666fea1465) begin
      failures++; $display("FAIL reference model");
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    checks++;
    if (en_g || en_b) begin failures++; $display("FAIL pipeline enabled before check"); end
    while (!(done_g && done_b)) begin @(posedge clk); cyc++; end
    checks += 6;
    if (!en_g || fail_g) begin failures++; $display("FAIL good image rejected"); end
    if (en_b || !fail_b) begin failures++; $display("FAIL wrong reference accepted"); end
    if (hash_g !== ref_good) begin failures++; $display("FAIL digest %h", hash_g); end
    if (hash_b !== ref_good) begin failures++; $display("FAIL digest (bad) %h", hash_b); end
    // 32 data groups: 16 words at 2 cycles each, plus 64 cycles of
    // compression the next read overlaps; then one padding group (16 + 65)
    if (cyc != 32 * (16 * 2 + 64) + 16 + 65 + 2) begin
      failures++; $display("FAIL check took %0d cycles", cyc);
    end
    $display("boot check took %0d cycles", cyc);
    repeat (20) @(posedge clk);
    if (!en_g || busy_g) begin failures++; $display("FAIL pipeline_en not held"); end
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
