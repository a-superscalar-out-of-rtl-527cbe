// rv_asm: RV32IM instruction encoders used by the testbenches to build
// their programs in SystemVerilog (no external program files).
package rv_asm;
  function automatic logic [31:0] r_type(logic [6:0] f7, logic [4:0] rs2, logic [4:0] rs1,
                                         logic [2:0] f3, logic [4:0] rd, logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] i_type(int imm, logic [4:0] rs1, logic [2:0] f3,
                                         logic [4:0] rd, logic [6:0] op);
    logic [31:0] v = 32'(imm);
    return {v[11:0], rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] s_type(int imm, logic [4:0] rs2, logic [4:0] rs1, logic [2:0] f3);
    logic [31:0] v = 32'(imm);
    return {v[11:5], rs2, rs1, f3, v[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_type(int imm, logic [4:0] rs2, logic [4:0] rs1, logic [2:0] f3);
    logic [31:0] v = 32'(imm);
    return {v[12], v[10:5], rs2, rs1, f3, v[4:1], v[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] j_type(int imm, logic [4:0] rd);
    logic [31:0] v = 32'(imm);
    return {v[20], v[10:1], v[11], v[19:12], rd, 7'b1101111};
  endfunction
  function automatic logic [31:0] addi(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b000, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] andi(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b111, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] slli(logic [4:0] rd, logic [4:0] rs1, int sh);
    return i_type(sh, rs1, 3'b001, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] srai(logic [4:0] rd, logic [4:0] rs1, int sh);
    return i_type(32'h400 | sh, rs1, 3'b101, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] lui(logic [4:0] rd, int imm20);
    logic [31:0] v = 32'(imm20);
    return {v[19:0], rd, 7'b0110111};
  endfunction
  function automatic logic [31:0] auipc(logic [4:0] rd, int imm20);
    logic [31:0] v = 32'(imm20);
    return {v[19:0], rd, 7'b0010111};
  endfunction
  function automatic logic [31:0] add(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'b0, rs2, rs1, 3'b000, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] sub(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'b0100000, rs2, rs1, 3'b000, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] xor_(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'b0, rs2, rs1, 3'b100, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] sltu(logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'b0, rs2, rs1, 3'b011, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] muldiv(logic [2:0] f3, logic [4:0] rd, logic [4:0] rs1, logic [4:0] rs2);
    return r_type(7'b0000001, rs2, rs1, f3, rd, 7'b0110011);
  endfunction
  function automatic logic [31:0] load(logic [2:0] f3, logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, f3, rd, 7'b0000011);
  endfunction
  function automatic logic [31:0] store(logic [2:0] f3, logic [4:0] rs2, logic [4:0] rs1, int imm);
    return s_type(imm, rs2, rs1, f3);
  endfunction
  function automatic logic [31:0] branch(logic [2:0] f3, logic [4:0] rs1, logic [4:0] rs2, int off);
    return b_type(off, rs2, rs1, f3);
  endfunction
  function automatic logic [31:0] jal(logic [4:0] rd, int off);
    return j_type(off, rd);
  endfunction
  function automatic logic [31:0] jalr(logic [4:0] rd, logic [4:0] rs1, int imm);
    return i_type(imm, rs1, 3'b000, rd, 7'b1100111);
  endfunction
endpackage
