// tb_hbcb: drives REF_BS and the running size directly. Checks: no alarm
// before a Guard; within the limit no alarm; the first overflow raises
// attack, stalls 2 cycles and sets store_block; store_block holds through a
// nested call and clears when the guarded callee returns (segment end); and
// a fresh Guard re-arms and clears the block.
module tb_hbcb;
  import rv_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic guard_hit, id_valid, armed, attack, stall, store_block;
  logic [31:0] id_instr, ref_bs, rt_bs_next;
  int checks = 0, failures = 0, stalls = 0, attacks = 0;

  hbcb dut (.*);
  always @(posedge clk) begin if (stall) stalls++; if (attack) attacks++; end

  task automatic check(input logic c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask
  task automatic cyc(input logic g, input logic v, input logic [31:0] ins, input int rt);
    guard_hit <= g; id_valid <= v; id_instr <= ins; rt_bs_next <= 32'(rt);
    @(posedge clk);
    #1;
    guard_hit <= 0; id_valid <= 0;
  endtask

  initial begin
    guard_hit = 0; id_valid = 0; id_instr = 0; ref_bs = 12; rt_bs_next = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    cyc(0, 1, sb(5, 6, 0), 40);
    check(!armed && attacks == 0, "alarm without Guard");
    cyc(1, 1, guard(12), 0);
    check(armed, "not armed after Guard");
    cyc(0, 1, jal(1, 64), 0);                     // call strcpy
    for (int i = 1; i <= 12; i++) cyc(0, 1, sb(5, 6, 0), i);
    check(attacks == 0 && !store_block, "alarm within limit");
    stalls = 0;
    guard_hit <= 0; id_valid <= 1; id_instr <= sb(5, 6, 0); rt_bs_next <= 13;
    #1;
    @(negedge clk);
    check(attack && stall, "overflow not flagged in the decode cycle");
    @(posedge clk);
    #1;
    id_valid <= 0;
    repeat (4) cyc(0, 0, 0, 13);
    check(stalls == 2, $sformatf("stall %0d cycles", stalls));
    check(store_block, "store_block not set");
    cyc(0, 1, jal(1, 8), 14);                     // nested call in strcpy
    cyc(0, 1, ret(), 14);
    check(store_block && armed, "block lost on nested return");
    cyc(0, 1, ret(), 14);                         // strcpy returns
    check(!store_block && !armed, "block not cleared at segment end");
    check(attacks == 1, $sformatf("%0d attacks", attacks));
    ref_bs = 4;
    cyc(1, 1, guard(4), 0);
    cyc(0, 1, sw(5, 2, 0), 4);
    cyc(0, 1, sw(5, 2, 4), 8);
    check(store_block && attacks == 2, "second overflow");
    cyc(1, 1, guard(4), 0);
    check(!store_block && armed, "Guard did not re-arm");
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
