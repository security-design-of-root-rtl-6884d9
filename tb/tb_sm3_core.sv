// tb_sm3_core: self-checking test of the SM3 engine.
// Feeds messages of several lengths (covering the padding cases: room for the
// length in the same group, marker in the last slots, an exactly full group,
// several groups) and compares the digests with published SM3 results and
// digests of the byte sequence 0,1,2,... computed with an independent SM3
// implementation. It also checks the cycle count: 81 cycles per 512-bit group.
module tb_sm3_core;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         in_valid, in_ready, in_last, hash_valid;
  logic [31:0]  in_data;
  logic [1:0]   in_vbytes;
  logic [255:0] hash_o;
  int checks = 0, failures = 0;

  sm3_core dut (.*);

  byte unsigned msg [$];

  task automatic run_msg(input logic [255:0] expected, input string name);
    int n, nw, cyc, groups;
    n  = msg.size();
    nw = (n + 3) / 4;
    cyc = 0;
    for (int i = 0; i < nw; i++) begin
      logic [31:0] wd;
      wd = '0;
      for (int b = 0; b < 4; b++) if (4 * i + b < n) wd[31 - 8 * b -: 8] = msg[4 * i + b];
      in_valid  <= 1'b1;
      in_data   <= wd;
      in_last   <= (i == nw - 1);
      in_vbytes <= 2'((n - 4 * i >= 4) ? 3 : (n - 4 * i - 1));
      @(posedge clk);
      while (!in_ready) begin @(posedge clk); cyc++; end
      cyc++;
    end
    in_valid <= 1'b0;
    in_last  <= 1'b0;
    while (!hash_valid) begin @(posedge clk); cyc++; end
    checks++;
    if (hash_o !== expected) begin
      failures++;
      $display("FAIL %s: got %h exp %h", name, hash_o, expected);
    end
    groups = (n + 9 + 63) / 64;
    checks++;
    if (cyc != groups * 81 + 1) begin
      failures++;
      $display("FAIL %s: %0d cycles, expected %0d", name, cyc, groups * 81 + 1);
    end
    @(posedge clk);
  endtask

  task automatic seq_msg(input int n);
    msg.delete();
    for (int i = 0; i < n; i++) msg.push_back(byte'(i));
  endtask

  initial begin
    in_valid = 0; in_last = 0; in_data = 0; in_vbytes = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    msg = '{8'h61, 8'h62, 8'h63};
    run_msg(256'h66c7f0f462eeedd9d1f2d46bdc10e4e24167c4875cf2f7a2297da02b8f4ba8e0, "abc");
    msg.delete();
    repeat (16) begin msg.push_back(8'h61); msg.push_back(8'h62); msg.push_back(8'h63); msg.push_back(8'h64); end
    run_msg(256'hdebe9ff92275b8a138604889c18e5a4d6fdb70e5387e5765293dcba39c0c5732, "abcd*16");
    seq_msg(55);  run_msg(256'ha79cf9dcee3404abf7f769698201647fd9d3ff61d629d0f58bb4b5579a427db8, "seq55");
    seq_msg(56);  run_msg(256'h62f7363b15f4de76dd925c493b9d6d00d4ba0ef2a1f334c1d0f13b293aeb40d1, "seq56");
    seq_msg(64);  run_msg(256'h93566f236d157aae078d1ddb5cebdbba1520b5142e22a8915564345ba2ae1d63, "seq64");
    seq_msg(100); run_msg(256'h4b2833c158dd41614b76e37f18889243bd6b4a744e36de60920a2f89e409c64e, "seq100");
    seq_msg(119); run_msg(256'h8f3ea392a89a7119982d6634660db1a95f35d68267a2235e3255998a857f4fbf, "seq119");
    msg = '{8'h5b, 8'h9a, 8'h9a, 8'h7d, 8'h5c, 8'hb6, 8'h0a, 8'h21, 8'h10, 8'he6, 8'h28, 8'hdd};
    run_msg(256'h3b7301470d7200892f1b4412c698fd2294e209b6d2f7fa24b8acde3c354a9a8c, "kdf96");
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
