// tcm_ram: tightly coupled memory (ITCM for user instructions, DTCM for user
// data). Port A is the read/write port of the processor and loader, with a
// per-byte write strobe; port B is a read-only port used by the image
// verifier. Both ports read synchronously (data one cycle after the
// address). Memory contents start at zero. The 32 KiB default (8192 words)
// is the size of the reference platform's instruction and data memories;
// the two-port organisation is this design's choice.
module tcm_ram #(
  parameter int unsigned WORDS = 8192
) (
  input  logic                     clk,
  input  logic                     a_en,
  input  logic [3:0]               a_we,
  input  logic [$clog2(WORDS)-1:0] a_addr,
  input  logic [31:0]              a_wdata,
  output logic [31:0]              a_rdata,
  input  logic [$clog2(WORDS)-1:0] b_addr,
  output logic [31:0]              b_rdata
);
  logic [31:0] mem [WORDS];

  initial for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (a_en) begin
      for (int b = 0; b < 4; b++) if (a_we[b]) mem[a_addr][8 * b +: 8] <= a_wdata[8 * b +: 8];
      a_rdata <= mem[a_addr];
    end
    b_rdata <= mem[b_addr];
  end
endmodule
