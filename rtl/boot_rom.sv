// boot_rom: read-only memory holding the boot code, one 32-bit word per
// address, with a registered (one-cycle) read port shared by the processor's
// fetch path and the secure-boot checker. The contents are loaded from
// INIT_FILE at elaboration. The default file, boot_code.hex, is an example
// image only (512 words from the 32-bit LCG x' = 1664525*x + 1013904223,
// starting at x = 0x297); a product build puts its compiled boot code there.
// The 512-word (2 KiB) size is this design's choice.
module boot_rom #(
  parameter int unsigned WORDS     = 512,
  parameter string       INIT_FILE = "rtl/boot_code.hex"
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] addr,
  output logic [31:0]              rdata
);
  logic [31:0] mem [WORDS];

  initial $readmemh(INIT_FILE, mem);

  always_ff @(posedge clk) rdata <= mem[addr];
endmodule
