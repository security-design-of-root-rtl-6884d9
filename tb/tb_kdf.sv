// tb_kdf: runs two key derivations and checks that each key equals
// SM3(PUF ID xor TRNG number) by an independent SM3 model, that the XOR is
// right, that the PUF ID is read once and kept, and that the two keys differ.
module tb_kdf;
  import sm3_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;
  logic start, key_valid, busy;
  logic [255:0] key_o, key1;
  logic [95:0] puf_id_o, trng_o, xor_o, id1;
  logic [2:0] state_o;
  int checks = 0, failures = 0;
  logic seen_hash_state;

  kdf dut (.*);
  always @(posedge clk) if (state_o == 3'd3) seen_hash_state <= 1'b1;

  task automatic derive();
    byte unsigned m[$];
    start <= 1; @(posedge clk); start <= 0;
    do @(posedge clk); while (!key_valid);
    m.delete();
    for (int i = 0; i < 12; i++) m.push_back(puf_id_o[95 - 8 * i -: 8] ^ trng_o[95 - 8 * i -: 8]);
    checks += 2;
    if (key_o !== sm3_hash(m)) begin failures++; $display("FAIL key %h", key_o); end
    if (xor_o !== (puf_id_o ^ trng_o)) begin failures++; $display("FAIL xor"); end
  endtask

  initial begin
    start = 0; seen_hash_state = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    derive();
    key1 = key_o; id1 = puf_id_o;
    derive();
    checks += 3;
    if (key1 == key_o) begin failures++; $display("FAIL same key twice"); end
    if (id1 != puf_id_o) begin failures++; $display("FAIL PUF ID changed"); end
    if (!seen_hash_state) begin failures++; $display("FAIL state 3 never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
