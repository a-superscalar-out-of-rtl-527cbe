// fetch: two-stage, two-wide instruction fetch.
// Stage 1 holds the PC and sends it to the I-cache; its next PC is the next
// sequential PC (pc+8, or pc+4 when the second word would fall in the next
// cache line). Stage 2 receives the I-cache answer one cycle later, builds a
// bundle of up to two instructions and predicts: conditional branches use the
// GShare predictor, jal targets are computed here, returns (jalr x0,0(ra/t0))
// pop the return address stack, and calls (jal/jalr with rd = ra/t0) push it.
// Conditional branches and jalr are serializing: in slot 0 they end the bundle
// and in slot 1 they are held back to start the next bundle, so at most one
// direction prediction is made per cycle. When stage 2's next PC differs from
// the sequential PC stage 1 assumed, stage 1 is redirected (one bubble).
// A backend redirect (branch misprediction) sets the PC, restores the history
// and RAS top from the branch's checkpoint, and sets the epoch bit to the
// opposite of the tag of the last request sent, so an I-cache answer still in
// flight is dropped even after two redirects in a row (the I-cache holds at
// most one request).
// Every slot carries the global history seen before its prediction and the RAS
// state after its own push/pop; dispatch checkpoints them for each branch.
// AUIPC-jalr fusion: when slot 0 is "auipc rd" and slot 1 is a jalr whose
// base register is that rd, the jalr's target is pc0 + (auipc imm << 12) +
// jalr imm, known exactly in fetch; the jalr then stays in slot 1 and is
// predicted taken to that target (pushing the RAS if it is a call). This
// covers the usual far-call/far-jump pair; which pairs to fuse is this
// design's choice, the fusion path itself follows the document.
// Other non-return jalr is predicted not-taken and resolved in the branch unit.
module fetch
  import ooo_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000,
  parameter int          IQ_DEPTH = 8
) (
  input  logic          clk,
  input  logic          rst,
  // I-cache
  output logic          ic_req_valid,
  output logic [31:0]   ic_req_pc,
  output logic          ic_req_tag,
  input  logic          ic_req_ready,
  input  logic          ic_resp_valid,
  input  logic [31:0]   ic_resp_pc,
  input  logic          ic_resp_tag,
  input  logic [31:0]   ic_resp_instr0,
  input  logic [31:0]   ic_resp_instr1,
  input  logic          ic_resp_second_valid,
  // instruction queue
  input  logic [$clog2(IQ_DEPTH):0] iq_count,
  output logic          iq_push,
  output fetch_slot_t   iq_data [2],
  // backend redirect
  input  logic          redirect_valid,
  input  logic [31:0]   redirect_pc,
  input  ghr_t          restore_ghr,
  input  ras_ptr_t      restore_ras_ptr,
  input  logic [31:0]   restore_ras_top,
  // predictor training
  input  logic          bp_update_valid,
  input  ghr_t          bp_update_idx,
  input  logic          bp_update_taken
);
  logic [31:0] pc_q;
  logic        epoch;

  // ---------------- stage 2: bundle build and prediction ----------------
  logic        s2_valid;
  logic [31:0] pc0, pc1;
  logic [31:0] i0, i1;
  logic        is_br0, is_jal0, is_jalr0, is_br1, is_jal1, is_jalr1;
  logic        keep1;
  logic [31:0] next_pc;
  logic        ctl_valid;       // a control instruction in the bundle
  logic        ctl_slot;
  logic [31:0] ctl_pc, ctl_ins;
  logic        bp_taken;
  ghr_t        ghr_now;
  logic        ras_push, ras_pop;
  logic [31:0] ras_top, ras_below;
  ras_ptr_t    ras_ptr;
  logic        ctl_taken;
  logic [31:0] ctl_target;
  logic        spec_valid;
  ras_ptr_t    after_ptr;
  logic [31:0] after_top;

  function automatic logic is_link(logic [4:0] r);
    return r == 5'd1 || r == 5'd5;
  endfunction

  assign s2_valid = ic_resp_valid && ic_resp_tag == epoch && !redirect_valid;
  assign pc0 = ic_resp_pc;
  assign pc1 = ic_resp_pc + 32'd4;
  assign i0  = ic_resp_instr0;
  assign i1  = ic_resp_instr1;
  assign is_br0   = i0[6:0] == 7'b1100011;
  assign is_jal0  = i0[6:0] == 7'b1101111;
  assign is_jalr0 = i0[6:0] == 7'b1100111;
  assign is_br1   = ic_resp_second_valid && i1[6:0] == 7'b1100011;
  assign is_jal1  = ic_resp_second_valid && i1[6:0] == 7'b1101111;
  assign is_jalr1 = ic_resp_second_valid && i1[6:0] == 7'b1100111;

  // auipc rd / jalr rs1 = rd pair in one bundle
  logic        fuse1;
  logic [31:0] fuse_target;
  assign fuse1 = is_jalr1 && i0[6:0] == 7'b0010111 && i0[11:7] != 5'd0 && i0[11:7] == i1[19:15];
  assign fuse_target = (pc0 + {i0[31:12], 12'b0} + {{20{i1[31]}}, i1[31:20]}) & ~32'd1;

  always_comb begin
    keep1     = ic_resp_second_valid && !(is_br0 || is_jal0 || is_jalr0) &&
                (!(is_br1 || is_jalr1) || fuse1);
    ctl_valid = 1'b0; ctl_slot = 1'b0; ctl_pc = pc0; ctl_ins = i0;
    if (is_br0 || is_jal0 || is_jalr0) begin
      ctl_valid = 1'b1;
    end else if (keep1 && (is_jal1 || fuse1)) begin
      ctl_valid = 1'b1; ctl_slot = 1'b1; ctl_pc = pc1; ctl_ins = i1;
    end
  end

  gshare u_gshare (
    .clk, .rst,
    .pred_pc      (ctl_pc),
    .pred_taken   (bp_taken),
    .ghr_out      (ghr_now),
    .spec_valid   (spec_valid),
    .spec_taken   (ctl_taken),
    .restore_valid(redirect_valid),
    .restore_ghr  (restore_ghr),
    .update_valid (bp_update_valid),
    .update_idx   (bp_update_idx),
    .update_taken (bp_update_taken)
  );

  ras u_ras (
    .clk, .rst,
    .push         (ras_push),
    .push_addr    (ctl_pc + 32'd4),
    .pop          (ras_pop),
    .top          (ras_top),
    .ptr_out      (ras_ptr),
    .below_top    (ras_below),
    .restore_valid(redirect_valid),
    .restore_ptr  (restore_ras_ptr),
    .restore_top  (restore_ras_top)
  );

  always_comb begin
    ctl_taken  = 1'b0;
    ctl_target = ctl_pc + 32'd4;
    ras_push   = 1'b0;
    ras_pop    = 1'b0;
    spec_valid = 1'b0;
    after_ptr  = ras_ptr;
    after_top  = ras_top;
    if (s2_valid && ctl_valid) begin
      unique case (ctl_ins[6:0])
        7'b1100011: begin
          spec_valid = 1'b1;
          ctl_taken  = bp_taken;
          ctl_target = ctl_pc + {{20{ctl_ins[31]}}, ctl_ins[7], ctl_ins[30:25], ctl_ins[11:8], 1'b0};
        end
        7'b1101111: begin
          ctl_taken  = 1'b1;
          ctl_target = ctl_pc + {{12{ctl_ins[31]}}, ctl_ins[19:12], ctl_ins[20], ctl_ins[30:21], 1'b0};
          ras_push   = is_link(ctl_ins[11:7]);
        end
        default: begin // jalr
          if (ctl_slot && fuse1) begin
            ctl_taken  = 1'b1;
            ctl_target = fuse_target;
            ras_push   = is_link(ctl_ins[11:7]);
          end else if (is_link(ctl_ins[19:15]) && ctl_ins[11:7] == 5'd0) begin
            ras_pop    = 1'b1;
            ctl_taken  = 1'b1;
            ctl_target = ras_top;
          end else begin
            ras_push   = is_link(ctl_ins[11:7]);
          end
        end
      endcase
      if (ras_push) begin
        after_ptr = ras_ptr_t'(ras_ptr + 1'b1);
        after_top = ctl_pc + 32'd4;
      end else if (ras_pop) begin
        after_ptr = ras_ptr_t'(ras_ptr - 1'b1);
        after_top = ras_below;
      end
    end
  end

  always_comb begin
    if (ctl_valid && ctl_taken) next_pc = ctl_target;
    else                        next_pc = keep1 ? pc0 + 32'd8 : pc0 + 32'd4;
  end

  always_comb begin
    iq_push    = s2_valid;
    iq_data[0] = '0;
    iq_data[1] = '0;
    iq_data[0].valid   = 1'b1;
    iq_data[0].pc      = pc0;
    iq_data[0].instr   = i0;
    iq_data[0].ghr     = ghr_now;
    iq_data[0].ras_ptr = ras_ptr;
    iq_data[0].ras_top = ras_top;
    iq_data[1].valid   = keep1;
    iq_data[1].pc      = pc1;
    iq_data[1].instr   = i1;
    iq_data[1].ghr     = ghr_now;
    iq_data[1].ras_ptr = ras_ptr;
    iq_data[1].ras_top = ras_top;
    if (ctl_valid) begin
      iq_data[ctl_slot].pred_taken  = ctl_taken;
      iq_data[ctl_slot].pred_target = ctl_target;
      iq_data[ctl_slot].ras_ptr     = after_ptr;
      iq_data[ctl_slot].ras_top     = after_top;
    end
  end

  // ---------------- stage 1: PC and I-cache request ----------------
  logic s2_redirect;
  assign s2_redirect  = s2_valid && (next_pc != pc_q);
  assign ic_req_valid = !redirect_valid && !s2_redirect &&
                        (iq_count <= ($clog2(IQ_DEPTH)+1)'(IQ_DEPTH - 2));
  assign ic_req_pc    = pc_q;
  assign ic_req_tag   = epoch;

  logic sent_tag;   // tag of the last request the I-cache accepted
  always_ff @(posedge clk) begin
    if (rst)                                sent_tag <= 1'b0;
    else if (ic_req_valid && ic_req_ready) sent_tag <= epoch;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_q  <= RESET_PC;
      epoch <= 1'b0;
    end else if (redirect_valid) begin
      pc_q  <= redirect_pc;
      epoch <= ~sent_tag;
    end else if (s2_redirect) begin
      pc_q  <= next_pc;
    end else if (ic_req_valid && ic_req_ready) begin
      pc_q  <= (pc_q[4:2] != 3'b111) ? pc_q + 32'd8 : pc_q + 32'd4;
    end
  end
endmodule
