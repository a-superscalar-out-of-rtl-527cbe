// tb_decoder: decodes one instruction of each RV32IM class, built with the
// instruction encoders, and checks unit, operation, registers and immediate.
module tb_decoder;
  import ooo_pkg::*;
  import rv_asm::*;
  fetch_slot_t in;
  uop_t out;
  decoder dut (.*);
  int checks = 0, failures = 0;

  task automatic chk(logic [31:0] ins, fu_e fu, logic [3:0] op, int imm, int rs1, int rs2, int rd,
                     logic wr, string name);
    in = '0; in.valid = 1; in.instr = ins; in.pc = 32'h100;
    #1;
    checks++;
    if (out.fu !== fu || out.op !== op || out.imm !== 32'(imm) || out.rs1 !== 5'(rs1) ||
        out.rs2 !== 5'(rs2) || out.rd !== 5'(rd) || out.writes_rd !== wr || !out.valid) begin
      failures++;
      $display("%s: fu %0d op %0d imm %h rs1 %0d rs2 %0d rd %0d wr %0b", name, out.fu, out.op,
               out.imm, out.rs1, out.rs2, out.rd, out.writes_rd);
    end
  endtask

  initial begin
    chk(addi(5, 6, -3),            FU_ALU, 4'(ALU_ADD), -3, 6, 0, 5, 1, "addi");
    chk(sub(7, 8, 9),              FU_ALU, 4'(ALU_SUB), 0, 8, 9, 7, 1, "sub");
    chk(srai(1, 2, 7),             FU_ALU, 4'(ALU_SRA), 32'h407, 2, 0, 1, 1, "srai");
    chk(sltu(3, 4, 5),             FU_ALU, 4'(ALU_SLTU), 0, 4, 5, 3, 1, "sltu");
    chk(lui(4, 32'h12345),         FU_ALU, 4'(ALU_ADD), 32'h12345000, 0, 0, 4, 1, "lui");
    chk(auipc(4, 1),               FU_ALU, 4'(ALU_ADD), 32'h1000, 0, 0, 4, 1, "auipc");
    chk(jal(1, -16),               FU_ALU, 4'(ALU_LINK), -16, 0, 0, 1, 1, "jal");
    chk(jalr(0, 1, 8),             FU_BRU, 4'd0, 8, 1, 0, 0, 0, "jalr");
    chk(branch(3'b101, 3, 4, -8),  FU_BRU, 4'd5, -8, 3, 4, 0, 0, "bge");
    chk(load(3'b100, 9, 10, 33),   FU_MEM, 4'd4, 33, 10, 0, 9, 1, "lbu");
    chk(store(3'b001, 11, 12, -2), FU_MEM, 4'd1, -2, 12, 11, 0, 0, "sh");
    chk(muldiv(3'b110, 13, 14, 15),FU_MDU, 4'd6, 0, 14, 15, 13, 1, "rem");
    chk(addi(0, 1, 1),             FU_ALU, 4'(ALU_ADD), 1, 1, 0, 0, 0, "addi x0");
    in.instr = store(3'b010, 1, 2, 0); #1; checks++;
    if (!out.is_store || out.is_load) failures++;
    in.instr = branch(3'b000, 1, 2, 4); #1; checks++;
    if (!out.is_branch || out.is_jalr) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
