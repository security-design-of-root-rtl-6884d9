// tb_tcm_ram: writes words and single bytes through port A and reads them
// back through both ports, comparing with a shadow array; checks the
// one-cycle read latency and that B reads while A writes elsewhere.
module tb_tcm_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int W = 256;
  logic a_en;
  logic [3:0] a_we;
  logic [7:0] a_addr, b_addr;
  logic [31:0] a_wdata, a_rdata, b_rdata;
  logic [31:0] shadow [W];
  int checks = 0, failures = 0;

  tcm_ram #(.WORDS(W)) dut (.*);

  initial begin
    a_en = 0; a_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0;
    for (int i = 0; i < W; i++) shadow[i] = '0;
    @(posedge clk);
    for (int i = 0; i < W; i++) begin
      a_en <= 1; a_we <= 4'hf; a_addr <= 8'(i); a_wdata <= $urandom;
      @(posedge clk);
      shadow[i] = a_wdata;
    end
    for (int n = 0; n < 200; n++) begin
      int i;
      logic [3:0] we;
      logic [31:0] d;
      i = $urandom_range(W - 1);
      we = 4'($urandom);
      d = $urandom;
      a_en <= 1; a_we <= we; a_addr <= 8'(i); a_wdata <= d;
      b_addr <= 8'(W - 1 - i);
      @(posedge clk);
      #1;
      checks++;
      if (b_rdata !== shadow[W - 1 - i] && (W - 1 - i) != i) begin failures++; $display("FAIL B read"); end
      for (int b = 0; b < 4; b++) if (we[b]) shadow[i][8 * b +: 8] = d[8 * b +: 8];
    end
    a_we <= 0;
    for (int i = 0; i < W; i++) begin
      a_addr <= 8'(i); b_addr <= 8'(i);
      @(posedge clk);
      #1;
      checks += 2;
      if (a_rdata !== shadow[i]) begin failures++; $display("FAIL A word %0d", i); end
      if (b_rdata !== shadow[i]) begin failures++; $display("FAIL B word %0d", i); end
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
