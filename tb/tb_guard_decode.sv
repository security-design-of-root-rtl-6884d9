// tb_guard_decode: sends Guard instructions with random immediates and
// near-miss encodings (wrong funct field, nonzero rd field, other opcode,
// invalid decode slot), checking guard_hit and the value left in s0.
module tb_guard_decode;
  import rv_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic id_valid, guard_hit;
  logic [31:0] id_instr, ref_bs, expect_s0;
  int checks = 0, failures = 0;

  guard_decode dut (.*);

  task automatic send(input logic v, input logic [31:0] ins, input logic exp_hit);
    if (exp_hit) expect_s0 = {20'b0, ins[31:20]};
    id_valid <= v; id_instr <= ins;
    #1;
    @(negedge clk);
    checks++;
    if (guard_hit !== exp_hit) begin failures++; $display("FAIL hit for %h", ins); end
    @(posedge clk);
    #1;
    checks++;
    if (ref_bs !== expect_s0) begin failures++; $display("FAIL s0 %h exp %h", ref_bs, expect_s0); end
  endtask

  initial begin
    id_valid = 0; id_instr = 0; expect_s0 = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    send(1, guard(12), 1'b1);   // the document's example: Guard s0, 12
    checks++;
    if (ref_bs != 32'd12) begin failures++; $display("FAIL s0 after Guard 12"); end
    send(0, 32'h0, 1'b0);
    for (int n = 0; n < 40; n++) begin
      int imm;
      imm = $urandom_range(4095);
      unique case (n % 5)
        0: send(1, guard(imm), 1'b1);
        1: send(1, guard(imm) | 32'h0000_2000, 1'b0);            // funct 8'h03
        2: send(1, guard(imm) | 32'h0000_0080, 1'b0);            // rd field 1
        3: send(1, guard(imm) ^ 32'h0000_0004, 1'b0);            // opcode 7'h73
        default: send(0, guard(imm), 1'b0);                      // not valid
      endcase
    end
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
