// tb_overflow_attack: the buffer-overflow example program, replayed as a
// processor trace into the full root of trust, with a small stack memory
// model that performs every store the root of trust does not kill.
// func1 (return address 0x4d0) has a 12-byte buffer below its saved return
// address and calls strcpy with a 16-byte attacker string whose last word is
// the entry address of the malicious function (0x488). Three runs:
//  a) protection bypassed (store_kill ignored): the saved return address
//     becomes 0x488, i.e. control flow would be hijacked (the baseline);
//  b) no Guard instruction: mechanism 1 alone catches the store onto the
//     saved return address and the restored ra stays 0x4d0;
//  c) Guard 12 before strcpy: mechanism 2 flags the 13th byte at decode,
//     before it is written, and the restored ra stays 0x4d0.
module tb_overflow_attack;
  import rv_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #50 clk = ~clk;

  logic id_valid, wb_store_valid, core_stall, store_kill, mp1_attack, mp2_attack;
  logic [31:0] id_instr, reg_x1, reg_x2, wb_store_addr, guard_ref_bs, guard_rt_bs;
  logic [7:0] stack [logic [31:0]];
  int checks = 0, failures = 0, n_mp1 = 0, n_mp2 = 0;

  rot_top dut (
    .clk, .rst_n, .boot_ref_hash('0), .core_rom_addr('0), .core_rom_rdata(), .boot_done(), .boot_fail(),
    .boot_hash(), .fetch_en(), .kdf_start(1'b0), .kdf_busy(), .kdf_key_valid(), .kdf_key(), .puf_id(),
    .itcm_en(1'b0), .itcm_we(4'h0), .itcm_addr('0), .itcm_wdata('0), .itcm_rdata(),
    .dtcm_en(1'b0), .dtcm_we(4'h0), .dtcm_addr('0), .dtcm_wdata('0), .dtcm_rdata(),
    .uv_start(1'b0), .uv_ctr0('0), .uv_enc_itcm('0), .uv_enc_dtcm('0), .uv_itcm_words('0), .uv_dtcm_words('0),
    .uv_busy(), .uv_done(), .uv_pass(), .uv_halt(),
    .id_valid, .id_instr, .reg_x1, .reg_x2, .wb_store_valid, .wb_store_addr,
    .core_stall, .store_kill, .mp1_attack, .mp2_attack, .guard_ref_bs, .guard_rt_bs);

  always @(posedge clk) begin
    if (mp1_attack) n_mp1++;
    if (mp2_attack) n_mp2++;
  end

  task automatic id(input logic [31:0] ins);
    id_valid <= 1; id_instr <= ins;
    @(posedge clk);
    id_valid <= 0; id_instr <= addi(0, 0, 0);
  endtask
  // decode, then write-back two cycles later: the store is performed unless killed
  task automatic store(input logic [31:0] ins, input logic [31:0] a, input logic [31:0] d,
                       input int bytes, input bit honour_kill);
    id(ins);
    @(posedge clk);
    wb_store_valid <= 1; wb_store_addr <= a;
    @(negedge clk);
    if (!(honour_kill && store_kill))
      for (int b = 0; b < bytes; b++) stack[a + 32'(b)] = d[8 * b +: 8];
    @(posedge clk);
    wb_store_valid <= 0;
  endtask

  function automatic logic [31:0] load_word(input logic [31:0] a);
    return {stack[a + 3], stack[a + 2], stack[a + 1], stack[a]};
  endfunction

  // returns the return address func1 would restore
  task automatic run(input bit honour_kill, input bit with_guard, output logic [31:0] ra);
    logic [7:0] attack_str [16];
    for (int i = 0; i < 12; i++) attack_str[i] = 8'h41;         // filler 'A'
    {attack_str[15], attack_str[14], attack_str[13], attack_str[12]} = 32'h0000_0488;
    reg_x1 = 32'h4d0; reg_x2 = 32'h0000_ffe0;
    id(jal(1, 32'h3c0));                                         // main calls func1
    store(sw(1, 2, 12), 32'h0000_ffec, 32'h4d0, 4, honour_kill);  // save ra above a 12-byte buffer
    if (with_guard) id(guard(12));
    reg_x1 = 32'h4f8;
    id(jal(1, 32'h100));                                         // call strcpy(buf, attack)
    for (int i = 0; i < 16; i++)
      store(sb(15, 14, 0), 32'h0000_ffe0 + 32'(i), 32'(attack_str[i]), 1, honour_kill);
    id(ret());                                                   // strcpy returns
    id(lw(1, 2, 12));                                            // func1 restores ra
    ra = load_word(32'h0000_ffec);
    id(ret());
    repeat (4) @(posedge clk);
  endtask

  initial begin
    logic [31:0] ra;
    id_valid = 0; id_instr = 0; reg_x1 = 0; reg_x2 = 0; wb_store_valid = 0; wb_store_addr = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run(0, 0, ra);
    checks++;
    if (ra !== 32'h488) begin failures++; $display("FAIL baseline not hijacked: ra %h", ra); end
    n_mp1 = 0; n_mp2 = 0;
    run(1, 0, ra);
    checks += 2;
    if (ra !== 32'h4d0) begin failures++; $display("FAIL mechanism 1: ra %h", ra); end
    if (n_mp1 == 0) begin failures++; $display("FAIL mechanism 1 did not fire"); end
    n_mp1 = 0; n_mp2 = 0;
    run(1, 1, ra);
    checks += 2;
    if (ra !== 32'h4d0) begin failures++; $display("FAIL mechanism 2: ra %h", ra); end
    if (n_mp2 == 0) begin failures++; $display("FAIL mechanism 2 did not fire"); end
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
