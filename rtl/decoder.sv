// decoder: RV32IM instruction decoder. Turns one fetched instruction into a
// uop_t: which functional unit executes it (ALU, branch unit, multiply/divide
// or memory), the operation, the immediate, the architectural registers and
// whether it writes rd. lui becomes ALU add of x0 and the immediate, auipc an
// ALU add of the PC and the immediate, jal an ALU "link" (rd = pc+4, its target
// is handled in fetch). Conditional branches and jalr go to the branch unit.
// fence, ecall, ebreak and unknown encodings become no-ops (not mentioned by the
// design description; this implementation's choice). Purely combinational.
module decoder
  import ooo_pkg::*;
(
  input  fetch_slot_t in,
  output uop_t        out
);
  logic [31:0] ins;
  logic [6:0]  opc;
  logic [2:0]  f3;
  logic [6:0]  f7;
  assign ins = in.instr;
  assign opc = ins[6:0];
  assign f3  = ins[14:12];
  assign f7  = ins[31:25];

  function automatic alu_op_e alu_of(logic [2:0] f, logic alt, logic is_imm);
    unique case (f)
      3'b000: return (alt && !is_imm) ? ALU_SUB : ALU_ADD;
      3'b001: return ALU_SLL;
      3'b010: return ALU_SLT;
      3'b011: return ALU_SLTU;
      3'b100: return ALU_XOR;
      3'b101: return alt ? ALU_SRA : ALU_SRL;
      3'b110: return ALU_OR;
      default: return ALU_AND;
    endcase
  endfunction

  always_comb begin
    out             = '0;
    out.valid       = in.valid;
    out.pc          = in.pc;
    out.pred_taken  = in.pred_taken;
    out.pred_target = in.pred_target;
    out.ghr         = in.ghr;
    out.ras_ptr     = in.ras_ptr;
    out.ras_top     = in.ras_top;
    out.fu          = FU_ALU;
    out.op          = 4'(ALU_ADD);
    out.rs1         = ins[19:15];
    out.rs2         = ins[24:20];
    out.rd          = ins[11:7];
    unique case (opc)
      7'b0110111: begin // lui
        out.use_imm = 1'b1; out.rs1 = '0; out.rs2 = '0;
        out.imm = {ins[31:12], 12'b0};
      end
      7'b0010111: begin // auipc
        out.use_imm = 1'b1; out.use_pc = 1'b1; out.rs1 = '0; out.rs2 = '0;
        out.imm = {ins[31:12], 12'b0};
      end
      7'b1101111: begin // jal
        out.op = 4'(ALU_LINK); out.rs1 = '0; out.rs2 = '0;
        out.imm = {{12{ins[31]}}, ins[19:12], ins[20], ins[30:21], 1'b0};
      end
      7'b1100111: begin // jalr
        out.fu = FU_BRU; out.is_jalr = 1'b1; out.op = {1'b0, f3}; out.rs2 = '0;
        out.imm = {{20{ins[31]}}, ins[31:20]};
      end
      7'b1100011: begin // branch
        out.fu = FU_BRU; out.is_branch = 1'b1; out.op = {1'b0, f3}; out.rd = '0;
        out.imm = {{20{ins[31]}}, ins[7], ins[30:25], ins[11:8], 1'b0};
      end
      7'b0000011: begin // load
        out.fu = FU_MEM; out.is_load = 1'b1; out.op = {1'b0, f3}; out.rs2 = '0;
        out.imm = {{20{ins[31]}}, ins[31:20]};
      end
      7'b0100011: begin // store
        out.fu = FU_MEM; out.is_store = 1'b1; out.op = {1'b0, f3}; out.rd = '0;
        out.imm = {{20{ins[31]}}, ins[31:25], ins[11:7]};
      end
      7'b0010011: begin // op-imm
        out.use_imm = 1'b1; out.rs2 = '0;
        out.op  = 4'(alu_of(f3, ins[30] && f3 == 3'b101, 1'b1));
        out.imm = {{20{ins[31]}}, ins[31:20]};
      end
      7'b0110011: begin // op / M extension
        if (f7 == 7'b0000001) begin
          out.fu = FU_MDU; out.op = {1'b0, f3};
        end else begin
          out.op = 4'(alu_of(f3, ins[30], 1'b0));
        end
      end
      default: begin // fence, system, illegal: no-op
        out.rs1 = '0; out.rs2 = '0; out.rd = '0;
      end
    endcase
    out.writes_rd = (out.rd != '0);
  end
endmodule
