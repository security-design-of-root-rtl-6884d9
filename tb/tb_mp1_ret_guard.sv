// tb_mp1_ret_guard: plays call/prologue/body/epilogue sequences into the
// decode-stage port and store addresses into the write-back port. Checks:
// the shadow stack entry {ra, sp+imm} after the return-address save, the
// restricted range (A-4, A], that the saving store itself passes, that a
// buffer store below the range passes, that a store onto the saved slot
// raises attack, stalls for 2 cycles and is killed, that later stores of the
// same function are killed until it returns, nested calls (range follows the
// top entry and returns to the caller's after POP), leaf calls (C3), and
// that nothing is restricted once the stack is empty.
module tb_mp1_ret_guard;
  import rv_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic id_valid, wb_store_valid, attack, stall, store_kill, restrict_valid, full;
  logic [31:0] id_instr, reg_x1, reg_x2, wb_store_addr, restrict_max, top_ra;
  logic [5:0] depth;
  logic [2:0] state_o;
  int checks = 0, failures = 0, stall_cycles = 0, attacks = 0;

  mp1_ret_guard dut (.*);

  always @(posedge clk) begin
    if (stall) stall_cycles++;
    if (attack) attacks++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic id(input logic [31:0] ins);
    id_valid <= 1; id_instr <= ins;
    @(posedge clk);
    id_valid <= 0; id_instr <= addi(0, 0, 0);
    @(posedge clk);
    #1;
  endtask

  // present a write-back store and sample the combinational outputs
  task automatic wb(input logic [31:0] a, output logic att, output logic kill);
    wb_store_valid <= 1; wb_store_addr <= a;
    #1;
    @(negedge clk);
    att = attack; kill = store_kill;
    @(posedge clk);
    wb_store_valid <= 0;
  endtask

  initial begin
    logic att, kill;
    id_valid = 0; id_instr = 0; wb_store_valid = 0; wb_store_addr = 0;
    reg_x1 = 0; reg_x2 = 32'h0001_0000;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(!restrict_valid, "restricted at reset");
    // main calls func1 (ra = 0x4d0)
    reg_x1 = 32'h4d0;
    id(jal(1, 32'h100));
    id(addi(2, 2, -32)); reg_x2 = 32'h0000_ffe0;
    id(sw(1, 2, 28));                    // push {0x4d0, 0xfffc}
    check(depth == 1, "depth after push");
    check(restrict_max == 32'h0000_fffc && top_ra == 32'h4d0, "pushed entry");
    wb(32'h0000_fffc, att, kill);        // the save itself
    check(!att && !kill, "save store flagged");
    wb(32'h0000_ffe0, att, kill);        // buffer store
    check(!att && !kill, "buffer store flagged");
    wb(32'h0000_fff8, att, kill);        // word just below the range
    check(!att && !kill, "store at A-4 flagged");
    stall_cycles = 0;
    wb(32'h0000_fffc, att, kill);        // overflow onto the saved ra
    check(att && kill, "overwrite of saved ra not caught");
    repeat (3) @(posedge clk);
    check(stall_cycles == 2, $sformatf("stall lasted %0d cycles", stall_cycles));
    wb(32'h0000_ffe4, att, kill);
    check(!att && kill, "later store of blocked function not killed");
    // func1 calls func2 (nested)
    reg_x1 = 32'h1a0;
    id(jal(1, 32'h40));
    id(addi(2, 2, -16)); reg_x2 = 32'h0000_ffd0;
    id(sw(1, 2, 12));
    check(depth == 2 && restrict_max == 32'h0000_ffdc, "nested push");
    wb(32'h0000_ffdc, att, kill);
    check(!att, "nested save flagged");
    wb(32'h0000_ffdf, att, kill);
    check(!att, "store above range flagged");
    wb(32'h0000_ffd9, att, kill);        // inside (A-4, A]
    check(att, "store at A-3 not caught");
    // func2 calls a leaf that never saves ra (C1 then C3)
    id(jal(1, 32'h20));
    id(ret());
    check(depth == 2, "leaf call changed the stack");
    // func2 returns: C4 then C5
    id(lw(1, 2, 12));
    id(ret());
    @(posedge clk);
    check(depth == 1 && restrict_max == 32'h0000_fffc, "pop back to caller");
    wb(32'h0000_ffe8, att, kill);
    check(!kill, "store still blocked after the blocked function returned");
    // func1 returns
    id(lw(1, 2, 28));
    id(ret());
    @(posedge clk);
    check(depth == 0 && !restrict_valid, "stack not empty at the end");
    wb(32'h0000_fffc, att, kill);
    check(!att && !kill, "store flagged with empty stack");
    check(attacks == 2, $sformatf("%0d attacks counted", attacks));
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
