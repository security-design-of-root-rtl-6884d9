// rv_pkg: RV32I instruction-field helpers used by the memory-protection
// monitors, which watch the processor's decode-stage instruction stream.
// Includes the custom "Guard" instruction: imm12 | 8'h01 | 5'h00 | 7'h77,
// which copies the zero-extended imm12 into the security register s0.
package rv_pkg;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_GUARD  = 7'h77;
  localparam logic [7:0] GUARD_FN  = 8'h01;
  localparam logic [2:0] F3_BYTE   = 3'b000;
  localparam logic [2:0] F3_HALF   = 3'b001;
  localparam logic [2:0] F3_WORD   = 3'b010;

  function automatic logic [6:0] opcode(input logic [31:0] i); return i[6:0];   endfunction
  function automatic logic [4:0] rd(input logic [31:0] i);     return i[11:7];  endfunction
  function automatic logic [4:0] rs1(input logic [31:0] i);    return i[19:15]; endfunction
  function automatic logic [4:0] rs2(input logic [31:0] i);    return i[24:20]; endfunction
  function automatic logic [2:0] funct3(input logic [31:0] i); return i[14:12]; endfunction

  function automatic logic signed [31:0] imm_i(input logic [31:0] i);
    return {{20{i[31]}}, i[31:20]};
  endfunction
  function automatic logic signed [31:0] imm_s(input logic [31:0] i);
    return {{20{i[31]}}, i[31:25], i[11:7]};
  endfunction

  // call: JAL with rd = x1 (ra)
  function automatic logic is_call(input logic [31:0] i);
    return opcode(i) == OP_JAL && rd(i) == 5'd1;
  endfunction
  function automatic logic is_jalr(input logic [31:0] i);
    return opcode(i) == OP_JALR && funct3(i) == 3'b000;
  endfunction
  // return: JALR x0, 0(x1)
  function automatic logic is_ret(input logic [31:0] i);
    return is_jalr(i) && rd(i) == 5'd0 && rs1(i) == 5'd1;
  endfunction
  function automatic logic is_store(input logic [31:0] i);
    return opcode(i) == OP_STORE;
  endfunction
  // SW with rs2 = x1: return address saved to the stack
  function automatic logic is_sw_ra(input logic [31:0] i);
    return is_store(i) && funct3(i) == F3_WORD && rs2(i) == 5'd1;
  endfunction
  // LW with rd = x1: return address restored from the stack
  function automatic logic is_lw_ra(input logic [31:0] i);
    return opcode(i) == OP_LOAD && funct3(i) == F3_WORD && rd(i) == 5'd1;
  endfunction
  function automatic logic is_guard(input logic [31:0] i);
    return opcode(i) == OP_GUARD && rd(i) == 5'd0 && i[19:12] == GUARD_FN;
  endfunction
endpackage
