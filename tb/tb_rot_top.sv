// tb_rot_top: end-to-end run of the whole root of trust at its default
// sizes (512-word boot ROM, 32 KiB ITCM and DTCM, 96-bit PUF/TRNG).
// A second copy holds a wrong boot reference hash. The testbench plays the
// processor, the boot loader and the host:
//  1. secure boot: the good copy must start its pipeline with the right
//     ROM digest, the other must raise boot_fail and never start;
//  2. key derivation runs on pipeline start; the key must equal
//     SM3(PUF ID xor TRNG) by an independent model;
//  3. the full ITCM and DTCM are loaded, the host model hashes them and
//     encrypts the digests under the derived key; authentication must pass;
//     then one DTCM byte is tampered with and it must fail and halt;
//  4. a call / return-address save / overflow trace must trip mechanism 1,
//     and a Guard / strcpy byte loop past the Guard size must trip
//     mechanism 2, each with a stall and killed stores.
// Every mechanism is counted and a mechanism that never occurred fails.
module tb_rot_top;
  import sm3_ref_pkg::*;
  import aes_ref_pkg::*;
  import rv_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;

  localparam int IW = 8192, DW = 8192;

  logic [255:0] boot_ref_hash, boot_hash, kdf_key, uv_enc_itcm, uv_enc_dtcm, bad_hash, bad_key;
  logic [8:0]   core_rom_addr;
  logic [31:0]  core_rom_rdata, bad_rom_rdata;
  logic boot_done, boot_fail, fetch_en, kdf_start, kdf_busy, kdf_key_valid;
  logic bad_done, bad_fail, bad_fetch, bad_kbusy, bad_kvalid;
  logic [95:0] puf_id, bad_puf;
  logic itcm_en, dtcm_en;
  logic [3:0] itcm_we, dtcm_we;
  logic [12:0] itcm_addr, dtcm_addr;
  logic [31:0] itcm_wdata, itcm_rdata, dtcm_wdata, dtcm_rdata;
  logic uv_start, uv_busy, uv_done, uv_pass, uv_halt;
  logic [127:0] uv_ctr0;
  logic [13:0] uv_itcm_words, uv_dtcm_words;
  logic id_valid, wb_store_valid, core_stall, store_kill, mp1_attack, mp2_attack;
  logic [31:0] id_instr, reg_x1, reg_x2, wb_store_addr, guard_ref_bs, guard_rt_bs;
  logic [31:0] itcm_img [IW], dtcm_img [DW];
  int checks = 0, failures = 0;
  int n_boot_pass = 0, n_boot_fail = 0, n_key = 0, n_uv_pass = 0, n_uv_fail = 0;
  int n_mp1 = 0, n_mp2 = 0, n_stall = 0, n_kill = 0;

  rot_top dut (.*);

  rot_top bad (
    .clk, .rst_n, .boot_ref_hash(boot_ref_hash ^ {255'h0, 1'b1}), .core_rom_addr, .core_rom_rdata(bad_rom_rdata),
    .boot_done(bad_done), .boot_fail(bad_fail), .boot_hash(bad_hash), .fetch_en(bad_fetch),
    .kdf_start(1'b0), .kdf_busy(bad_kbusy), .kdf_key_valid(bad_kvalid), .kdf_key(bad_key), .puf_id(bad_puf),
    .itcm_en(1'b0), .itcm_we(4'h0), .itcm_addr('0), .itcm_wdata('0), .itcm_rdata(),
    .dtcm_en(1'b0), .dtcm_we(4'h0), .dtcm_addr('0), .dtcm_wdata('0), .dtcm_rdata(),
    .uv_start(1'b0), .uv_ctr0('0), .uv_enc_itcm('0), .uv_enc_dtcm('0), .uv_itcm_words('0), .uv_dtcm_words('0),
    .uv_busy(), .uv_done(), .uv_pass(), .uv_halt(),
    .id_valid(1'b0), .id_instr('0), .reg_x1('0), .reg_x2('0), .wb_store_valid(1'b0), .wb_store_addr('0),
    .core_stall(), .store_kill(), .mp1_attack(), .mp2_attack(), .guard_ref_bs(), .guard_rt_bs());

  always @(posedge clk) begin
    if (kdf_key_valid) n_key++;
    if (mp1_attack) n_mp1++;
    if (mp2_attack) n_mp2++;
    if (core_stall) n_stall++;
    if (store_kill) n_kill++;
  end

  task automatic check(input logic c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic logic [255:0] img_hash(input bit sel, input int n);
    byte unsigned m[$];
    for (int i = 0; i < n; i++)
      for (int b = 3; b >= 0; b--) m.push_back(sel ? dtcm_img[i][8 * b +: 8] : itcm_img[i][8 * b +: 8]);
    return sm3_hash(m);
  endfunction

  task automatic id(input logic [31:0] ins);
    id_valid <= 1; id_instr <= ins;
    @(posedge clk);
    id_valid <= 0; id_instr <= addi(0, 0, 0);
    @(posedge clk);
  endtask
  task automatic wb(input logic [31:0] a, output logic att, output logic kill);
    wb_store_valid <= 1; wb_store_addr <= a;
    @(negedge clk);
    att = mp1_attack; kill = store_kill;
    @(posedge clk);
    wb_store_valid <= 0;
  endtask

  task automatic authenticate(input logic exp_pass);
    uv_start <= 1; @(posedge clk); uv_start <= 0;
    do @(posedge clk); while (!uv_done);
    check(uv_pass == exp_pass, $sformatf("authentication result %b", uv_pass));
    if (uv_pass) n_uv_pass++; else n_uv_fail++;
  endtask

  initial begin
    byte unsigned m[$], km[$];
    logic [31:0] x;
    logic att, kill;
    kdf_start = 0; core_rom_addr = 0;
    itcm_en = 0; dtcm_en = 0; itcm_we = 0; dtcm_we = 0; itcm_addr = 0; dtcm_addr = 0;
    itcm_wdata = 0; dtcm_wdata = 0; uv_start = 0; uv_ctr0 = 0; uv_enc_itcm = 0; uv_enc_dtcm = 0;
    uv_itcm_words = 0; uv_dtcm_words = 0;
    id_valid = 0; id_instr = 0; reg_x1 = 0; reg_x2 = 0; wb_store_valid = 0; wb_store_addr = 0;
    // the provisioned reference: digest of the boot ROM image
    x = 32'h297;
    for (int i = 0; i < 512; i++) begin
      for (int b = 3; b >= 0; b--) m.push_back(x[8 * b +: 8]);
      x = x * 32'd1664525 + 32'd1013904223;
    end
    boot_ref_hash = sm3_hash(m);
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // 1. secure boot
    check(!fetch_en, "pipeline running before the boot check");
    do @(posedge clk); while (!(boot_done && bad_done));
    @(posedge clk);
    check(fetch_en && !boot_fail && boot_hash == boot_ref_hash, "good boot image rejected");
    check(!bad_fetch && bad_fail, "wrong reference accepted");
    if (fetch_en) n_boot_pass++;
    if (bad_fail) n_boot_fail++;
    core_rom_addr <= 9'd3;
    repeat (2) @(posedge clk);
    check(core_rom_rdata == 32'(32'h297 * 32'd1664525 * 32'd1664525 * 32'd1664525
                                + 32'd1013904223 * (32'd1664525 * 32'd1664525 + 32'd1664525 + 32'd1)),
          "processor cannot read the boot ROM after the check");

    // 2. key derivation started by the pipeline start
    do @(posedge clk); while (!kdf_key_valid);
    for (int i = 0; i < 12; i++) km.push_back(puf_id[95 - 8 * i -: 8] ^ dut.u_kdf.trng_o[95 - 8 * i -: 8]);
    check(kdf_key == sm3_hash(km), "derived key");
    check(!bad_kbusy && !bad_kvalid, "key derived in a chip that failed its boot check");

    // 3. load the TCMs (full size), host signs, device authenticates
    for (int i = 0; i < IW; i++) itcm_img[i] = $urandom;
    for (int i = 0; i < DW; i++) dtcm_img[i] = $urandom;
    for (int i = 0; i < IW; i++) begin
      itcm_en <= 1; itcm_we <= 4'hf; itcm_addr <= 13'(i); itcm_wdata <= itcm_img[i];
      dtcm_en <= 1; dtcm_we <= 4'hf; dtcm_addr <= 13'(i); dtcm_wdata <= dtcm_img[i];
      @(posedge clk);
    end
    itcm_en <= 0; dtcm_en <= 0; itcm_we <= 0; dtcm_we <= 0;
    uv_itcm_words = 14'(IW);
    uv_dtcm_words = 14'(DW);
    uv_ctr0 = {$urandom, $urandom, $urandom, $urandom};
    uv_enc_itcm = aes_ctr_xor(kdf_key, uv_ctr0, img_hash(0, IW));
    uv_enc_dtcm = aes_ctr_xor(kdf_key, uv_ctr0 + 128'd2, img_hash(1, DW));
    authenticate(1'b1);
    check(fetch_en && !uv_halt, "processor stopped after good images");
    dtcm_en <= 1; dtcm_we <= 4'b0010; dtcm_addr <= 13'd4000; dtcm_wdata <= 32'h0000_5a00;
    @(posedge clk);
    dtcm_en <= 0; dtcm_we <= 0;
    authenticate(1'b0);
    check(!fetch_en && uv_halt, "processor not stopped after tampering");

    // 4a. mechanism 1: func1 saves ra at sp+28, then a store overwrites it
    reg_x1 = 32'h4d0; reg_x2 = 32'h0000_ffe0;
    id(jal(1, 32'h100));
    id(sw(1, 2, 28));
    wb(32'h0000_fffc, att, kill);
    check(!att && !kill, "return address save flagged");
    wb(32'h0000_fff0, att, kill);
    check(!att && !kill, "buffer store flagged");
    wb(32'h0000_fffc, att, kill);
    check(att && kill, "return address overwrite not caught");
    id(lw(1, 2, 28));
    id(ret());

    // 4b. mechanism 2: Guard 12, call strcpy, 16 byte stores
    id(guard(12));
    check(guard_ref_bs == 32'd12, "Guard did not set s0");
    id(jal(1, 32'h200));
    for (int i = 0; i < 16; i++) begin
      id(sb(15, 14, 0));
      wb(32'h0000_1000 + 32'(i), att, kill);
      check(kill == (i >= 12), $sformatf("byte store %0d kill=%b", i, kill));
    end
    check(guard_rt_bs == 32'd16, $sformatf("RT_BS %0d", guard_rt_bs));
    id(ret());

    check(n_boot_pass > 0, "no boot passed");
    check(n_boot_fail > 0, "no boot failed");
    check(n_key > 0, "no key derived");
    check(n_uv_pass > 0, "no authentication passed");
    check(n_uv_fail > 0, "no authentication failed");
    check(n_mp1 > 0, "mechanism 1 never fired");
    check(n_mp2 > 0, "mechanism 2 never fired");
    check(n_stall > 0, "no stall");
    check(n_kill > 0, "no store killed");
    $display("boot pass %0d, boot fail %0d, keys %0d, auth pass %0d, auth fail %0d, mp1 %0d, mp2 %0d, stall cycles %0d, killed stores %0d",
             n_boot_pass, n_boot_fail, n_key, n_uv_pass, n_uv_fail, n_mp1, n_mp2, n_stall, n_kill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
