// tb_siidm: a fixed sequence (the strcpy-like byte loop, word stores 4
// apart, a halfword, a negative offset, an offset jump of 3, a load) and
// then a random stream of stores, loads and clears, checked cycle by cycle
// against a behavioural model of the qualification rule and of
// RT_BS = sum Y_i (Y = 4 word, 2 halfword, 1 byte).
module tb_siidm;
  import rv_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clear, id_valid, store_ok;
  logic [31:0] id_instr, rt_bs, rt_bs_next;
  logic [2:0] y_i;
  logic [15:0] n_o;
  int checks = 0, failures = 0;
  int m_sum, m_prev, m_n;
  bit m_have;

  siidm dut (.*);

  task automatic step(input logic clr, input logic v, input logic [31:0] ins);
    int imm, f3, y;
    bit isst, ok;
    clear <= clr; id_valid <= v; id_instr <= ins;
    @(posedge clk);
    #1;
    isst = v && ins[6:0] == 7'b0100011;
    imm  = int'($signed({ins[31:25], ins[11:7]}));
    f3   = int'(ins[14:12]);
    if (clr) begin m_sum = 0; m_have = 0; m_n = 0; end
    else if (isst) begin
      ok = imm >= 0 && (!m_have || (imm - m_prev) inside {0, 1, 2, 4});
      y  = (f3 == 2) ? 4 : (f3 == 1) ? 2 : (f3 == 0) ? 1 : 0;
      if (ok) begin m_sum += y; m_n++; end
      m_prev = imm; m_have = 1;
    end
    checks++;
    if (rt_bs !== 32'(m_sum) || n_o !== 16'(m_n)) begin
      failures++; $display("FAIL rt_bs %0d exp %0d (n %0d/%0d) after %h", rt_bs, m_sum, n_o, m_n, ins);
    end
  endtask

  initial begin
    clear = 0; id_valid = 0; id_instr = 0;
    m_sum = 0; m_prev = 0; m_have = 0; m_n = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    step(1, 0, 0);
    repeat (5) step(0, 1, sb(15, 14, 0));        // byte loop: 5 bytes
    step(0, 1, sw(5, 2, 0));
    step(0, 1, sw(5, 2, 4));
    step(0, 1, sw(5, 2, 8));
    step(0, 1, sh(5, 2, 10));
    step(0, 1, sw(5, 2, -4));                   // negative offset: ignored
    step(0, 1, sw(5, 2, 0));
    step(0, 1, sw(5, 2, 3));                    // jump of 3: ignored
    step(0, 1, lw(5, 2, 4));
    checks++;
    if (rt_bs != 5 + 12 + 2 + 4) begin failures++; $display("FAIL fixed sequence sum %0d", rt_bs); end
    for (int n = 0; n < 500; n++) begin
      int k;
      k = $urandom_range(99);
      if (k < 3) step(1, 0, 0);
      else if (k < 10) step(0, 1, lw(5, 2, $urandom_range(64)));
      else if (k < 15) step(0, 0, sw(5, 2, 0));
      else step(0, 1, store($urandom_range(3), 5, 2, int'($urandom_range(20)) - 4));
    end
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
