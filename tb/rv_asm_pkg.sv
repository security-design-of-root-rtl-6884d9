// rv_asm_pkg: tiny RV32I assembler for testbenches (encodings from the
// RISC-V unprivileged specification) plus the custom Guard instruction.
package rv_asm_pkg;
  function automatic logic [31:0] jal(input int rd, input int off);
    logic [20:0] o;
    o = 21'(off);
    return {o[20], o[10:1], o[11], o[19:12], 5'(rd), 7'b1101111};
  endfunction
  function automatic logic [31:0] jalr(input int rd, input int rs1, input int imm);
    return {12'(imm), 5'(rs1), 3'b000, 5'(rd), 7'b1100111};
  endfunction
  function automatic logic [31:0] ret();
    return jalr(0, 1, 0);
  endfunction
  function automatic logic [31:0] store(input int f3, input int rs2, input int rs1, input int imm);
    logic [11:0] i;
    i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'(f3), i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] sw(input int rs2, input int rs1, input int imm); return store(2, rs2, rs1, imm); endfunction
  function automatic logic [31:0] sh(input int rs2, input int rs1, input int imm); return store(1, rs2, rs1, imm); endfunction
  function automatic logic [31:0] sb(input int rs2, input int rs1, input int imm); return store(0, rs2, rs1, imm); endfunction
  function automatic logic [31:0] lw(input int rd, input int rs1, input int imm);
    return {12'(imm), 5'(rs1), 3'b010, 5'(rd), 7'b0000011};
  endfunction
  function automatic logic [31:0] addi(input int rd, input int rs1, input int imm);
    return {12'(imm), 5'(rs1), 3'b000, 5'(rd), 7'b0010011};
  endfunction
  function automatic logic [31:0] guard(input int imm);
    return {12'(imm), 8'h01, 5'h00, 7'h77};
  endfunction
endpackage
