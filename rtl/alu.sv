// alu: single-cycle integer functional unit.
// The issued instruction and its operands are registered at the clock edge
// (in_valid); the result is computed from that register and driven on the
// ALU result bus in the following cycle. Operand A is rs1 or the PC (auipc),
// operand B rs2 or the immediate. ALU_LINK produces pc+4 (jal). The input
// register takes part in branch recovery: a squashed instruction is dropped
// and resolved branch bits are cleared from its mask. The ALU never stalls,
// which is what lets the scheduler wake its consumers at issue time.
module alu
  import ooo_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  br_t  br,
  input  exe_t in,
  output cdb_t out
);
  exe_t q;
  logic [31:0] a, b, r;

  always_ff @(posedge clk) begin
    if (rst) q.valid <= 1'b0;
    else begin
      q <= in;
      q.valid   <= in.valid && !bm_killed(in.i.bmask, br);
      q.i.bmask <= bm_upd(in.i.bmask, br);
    end
  end

  assign a = q.i.uop.use_pc  ? q.i.uop.pc  : q.a;
  assign b = q.i.uop.use_imm ? q.i.uop.imm : q.b;

  always_comb begin
    unique case (alu_op_e'(q.i.uop.op))
      ALU_ADD:  r = a + b;
      ALU_SUB:  r = a - b;
      ALU_SLL:  r = a << b[4:0];
      ALU_SLT:  r = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: r = {31'b0, a < b};
      ALU_XOR:  r = a ^ b;
      ALU_SRL:  r = a >> b[4:0];
      ALU_SRA:  r = 32'($signed(a) >>> b[4:0]);
      ALU_OR:   r = a | b;
      ALU_AND:  r = a & b;
      ALU_LINK: r = q.i.uop.pc + 32'd4;
      default:  r = a + b;
    endcase
  end

  assign out = '{valid: q.valid, wr: q.i.uop.writes_rd, pd: q.i.pd, rob: q.i.rob, data: r};
endmodule
