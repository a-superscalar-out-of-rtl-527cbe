// bru: branch unit for conditional branches and jalr (early branch resolution).
// The issued branch is registered at the clock edge; in the next cycle the
// unit computes the real next PC (taken target or pc+4; jalr: (rs1+imm)&~1),
// compares it with the next PC fetch predicted, and broadcasts the result to
// the whole core in that same cycle: br.valid with the branch's one-hot mask
// bit, and br.mispredict when the prediction was wrong. On a misprediction
// redirect_pc is the correct PC. jalr also writes rd = pc+4 on the branch
// result bus. Conditional branches train the GShare predictor with the
// history index they were predicted with. Single cycle, never stalls.
module bru
  import ooo_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  br_t         br_in,     // resolution broadcast (for squashing the input register)
  input  exe_t        in,
  output cdb_t        out,
  output br_t         br_out,
  output logic [31:0] redirect_pc,
  output logic        bp_update_valid,
  output ghr_t        bp_update_idx,
  output logic        bp_update_taken,
  output logic        is_cond        // the resolving instruction is a conditional branch
);
  exe_t q;
  logic taken;
  logic [31:0] target, actual_next, pred_next;

  always_ff @(posedge clk) begin
    if (rst) q.valid <= 1'b0;
    else begin
      q <= in;
      q.valid   <= in.valid && !bm_killed(in.i.bmask, br_in);
      q.i.bmask <= bm_upd(in.i.bmask, br_in);
    end
  end

  always_comb begin
    unique case (q.i.uop.op[2:0])
      3'b000:  taken = q.a == q.b;
      3'b001:  taken = q.a != q.b;
      3'b100:  taken = $signed(q.a) <  $signed(q.b);
      3'b101:  taken = $signed(q.a) >= $signed(q.b);
      3'b110:  taken = q.a <  q.b;
      3'b111:  taken = q.a >= q.b;
      default: taken = 1'b0;
    endcase
    if (q.i.uop.is_jalr) begin
      taken  = 1'b1;
      target = (q.a + q.i.uop.imm) & ~32'd1;
    end else begin
      target = q.i.uop.pc + q.i.uop.imm;
    end
    actual_next = taken ? target : q.i.uop.pc + 32'd4;
    pred_next   = q.i.uop.pred_taken ? q.i.uop.pred_target : q.i.uop.pc + 32'd4;
  end

  assign redirect_pc     = actual_next;
  assign br_out.valid      = q.valid;
  assign br_out.mispredict = actual_next != pred_next;
  assign br_out.onehot        = bmask_t'(1) << q.i.btag;
  assign br_out.tag        = q.i.btag;
  assign is_cond           = q.i.uop.is_branch;
  assign bp_update_valid = q.valid && q.i.uop.is_branch;
  assign bp_update_idx   = q.i.uop.pc[GHR_W+1:2] ^ q.i.uop.ghr;
  assign bp_update_taken = taken;
  assign out = '{valid: q.valid, wr: q.i.uop.writes_rd, pd: q.i.pd, rob: q.i.rob,
                 data: q.i.uop.pc + 32'd4};
endmodule
