// guard_decode: decode and execute logic of the custom "Guard" instruction,
// the software half of memory protection mechanism 2.
//
// Encoding (32 bits): imm12 in [31:20], 8'h01 in [19:12], 5'h00 in [11:7],
// opcode 7'h77 in [6:0]. When a valid decode-stage instruction matches,
// the zero-extended immediate {20'b0, imm12} is written into the security
// register s0 at the next clock; it is REF_BS, the buffer size in bytes that
// the protected function has requested. guard_hit pulses in the decode cycle
// and arms the boundary checker. s0 is a separate security register,
// readable here on ref_bs, not the general-purpose register x8.
// The encoding and the s0 write follow the document; the register's reset
// value (0) is this design's choice.
module guard_decode
  import rv_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        id_valid,
  input  logic [31:0] id_instr,
  output logic        guard_hit,
  output logic [31:0] ref_bs
);
  assign guard_hit = id_valid && is_guard(id_instr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         ref_bs <= '0;
    else if (guard_hit) ref_bs <= {20'b0, id_instr[31:20]};
  end
endmodule
