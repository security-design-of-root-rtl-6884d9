// tb_user_verify: acts as the host: fills small ITCM and DTCM images, hashes
// them with an independent SM3 model and encrypts the digests with an
// independent AES-CTR model, then lets the verifier run. Three runs: both
// images intact (pass), one ITCM word tampered (ITCM mismatch, halt), and a
// wrong ciphertext for the DTCM digest (DTCM mismatch). Decrypted digests
// and computed digests are compared with the model too.
module tb_user_verify;
  import sm3_ref_pkg::*;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int IW = 64, DW = 64;
  logic start, mem_sel, busy, done, pass, halt, itcm_ok, dtcm_ok;
  logic [255:0] key, enc_itcm, enc_dtcm, hash_value_itcm, hash_value_dtcm, hash_run_itcm, hash_run_dtcm;
  logic [127:0] ctr0;
  logic [6:0] itcm_words, dtcm_words;
  logic [5:0] mem_addr;
  logic [31:0] mem_rdata;
  logic [31:0] itcm [IW], dtcm [DW];
  int checks = 0, failures = 0;

  user_verify #(.ITCM_WORDS(IW), .DTCM_WORDS(DW)) dut (.*);
  always_ff @(posedge clk) mem_rdata <= mem_sel ? dtcm[mem_addr] : itcm[mem_addr];

  function automatic logic [255:0] img_hash(input bit sel, input int n);
    byte unsigned m[$];
    for (int i = 0; i < n; i++)
      for (int b = 3; b >= 0; b--) m.push_back(sel ? dtcm[i][8 * b +: 8] : itcm[i][8 * b +: 8]);
    return sm3_hash(m);
  endfunction

  task automatic run(input bit exp_i, input bit exp_d);
    start <= 1; @(posedge clk); start <= 0;
    do @(posedge clk); while (!done);
    checks += 4;
    if (itcm_ok !== exp_i) begin failures++; $display("FAIL itcm_ok %b", itcm_ok); end
    if (dtcm_ok !== exp_d) begin failures++; $display("FAIL dtcm_ok %b", dtcm_ok); end
    if (pass !== (exp_i && exp_d)) begin failures++; $display("FAIL pass"); end
    if (hash_run_itcm !== img_hash(0, int'(itcm_words)) || hash_run_dtcm !== img_hash(1, int'(dtcm_words))) begin
      failures++; $display("FAIL Hash_run");
    end
  endtask

  initial begin
    logic [255:0] hi, hd;
    start = 0;
    key  = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    ctr0 = {$urandom, $urandom, $urandom, 32'hffff_fffe};   // counter carry inside the run
    for (int i = 0; i < IW; i++) itcm[i] = $urandom;
    for (int i = 0; i < DW; i++) dtcm[i] = $urandom;
    itcm_words = 7'd40;
    dtcm_words = 7'd13;
    hi = img_hash(0, 40);
    hd = img_hash(1, 13);
    enc_itcm = aes_ctr_xor(key, ctr0, hi);
    enc_dtcm = aes_ctr_xor(key, ctr0 + 128'd2, hd);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(1, 1);
    checks += 3;
    if (hash_value_itcm !== hi || hash_value_dtcm !== hd) begin failures++; $display("FAIL Hash_value"); end
    if (halt) begin failures++; $display("FAIL halted on good images"); end
    if (busy) begin failures++; $display("FAIL busy after done"); end
    itcm[5] = itcm[5] ^ 32'h0000_0100;
    run(0, 1);
    checks++;
    if (!halt) begin failures++; $display("FAIL no halt on tampered ITCM"); end
    itcm[5] = itcm[5] ^ 32'h0000_0100;
    enc_dtcm[0] = ~enc_dtcm[0];
    run(1, 0);
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
