// dispatch: two-wide decode, rename and dispatch.
// Takes the bundle at the head of the instruction queue, decodes both slots,
// renames their sources through the RAT (slot 1 reads slot 0's new register
// when it depends on it), takes new destination registers from the free list,
// and sends the renamed instructions to the reorder buffer, the issue queue
// of their functional unit and, for memory instructions, the load or store
// queue. The whole bundle is dispatched in one cycle or waits (all-or-nothing;
// this implementation's choice) until the ROB, free list, issue queues, load
// and store queues and, for a branch or jalr, a branch mask bit all have room.
// A branch or jalr gets the lowest free mask bit as its tag; in the same cycle
// the RAT, the free-list read pointer, the ROB tail and the store-queue tail
// are checkpointed under that tag (ckpt_valid/ckpt_tag), and the branch's
// global history and RAS state are stored in the mask allocator. Every
// dispatched instruction carries the mask of unresolved branches. Nothing is
// dispatched in the cycle a misprediction is broadcast.
// Contains the decoders, RAT, free list, branch mask allocator and ready list.
module dispatch
  import ooo_pkg::*;
#(
  parameter int IQ_CNT_W = 4,
  parameter int N_WAKE   = 4
) (
  input  logic          clk,
  input  logic          rst,
  input  br_t           br,
  input  wake_t         wake [N_WAKE],
  // instruction queue head
  input  logic          q_empty,
  input  fetch_slot_t   q_head [2],
  output logic          q_pop,
  // capacity
  input  logic [ROB_W:0]    rob_free,
  input  logic [IQ_CNT_W-1:0] iq_free [4],   // indexed by fu_e
  input  logic [LDQ_W:0]    ldq_free,
  input  logic [STQ_W:0]    stq_free,
  input  rob_idx_t      rob_idx [2],
  input  ldq_idx_t      ldq_idx [2],
  input  stq_idx_t      stq_idx [2],
  // outputs to ROB / issue queues / LSQ
  output logic          disp_en  [2],
  output iss_t          disp_iss [2],
  output logic          disp_rdy1 [2],
  output logic          disp_rdy2 [2],
  output logic          ld_alloc [2],
  output logic          st_alloc [2],
  output bmask_t        disp_bmask,
  output logic          ckpt_valid,
  output btag_t         ckpt_tag,
  // commit-time frees
  input  logic          free_en [2],
  input  preg_t         free_preg [2],
  // recovery state for fetch
  output ghr_t          rs_ghr,
  output ras_ptr_t      rs_ras_ptr,
  output logic [31:0]   rs_ras_top,
  // statistics
  output logic          stat_stall_branch
);
  uop_t   u [2];
  logic   v [2];
  areg_t  rat_rd [4];
  preg_t  rat_ps [4];
  preg_t  fl_preg [2];
  logic [PREG_W-1:0] fl_count;
  logic   fl_alloc [2];
  bmask_t cur_mask;
  logic   br_avail;
  btag_t  br_tag;
  preg_t  ps [4];
  logic   rt_ready [4];
  logic   rat_wr [2];
  areg_t  rat_wr_a [2];
  preg_t  pd [2];
  logic   is_ctl [2];
  logic   fire;
  logic   mispredict;
  logic   clr_en [2];

  assign mispredict = br.valid && br.mispredict;

  decoder u_dec0 (.in(q_head[0]), .out(u[0]));
  decoder u_dec1 (.in(q_head[1]), .out(u[1]));

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      v[s]      = !q_empty && u[s].valid;
      is_ctl[s] = u[s].is_branch || u[s].is_jalr;
    end
    rat_rd[0] = u[0].rs1; rat_rd[1] = u[0].rs2;
    rat_rd[2] = u[1].rs1; rat_rd[3] = u[1].rs2;
  end

  // source renaming; slot 1 takes slot 0's new register when it reads slot 0's rd
  logic dep1, dep2;
  assign dep1 = v[0] && u[0].writes_rd && u[0].rd == u[1].rs1;
  assign dep2 = v[0] && u[0].writes_rd && u[0].rd == u[1].rs2;
  assign ps[0] = (u[0].rs1 == '0) ? '0 : rat_ps[0];
  assign ps[1] = (u[0].rs2 == '0) ? '0 : rat_ps[1];
  assign ps[2] = (u[1].rs1 == '0) ? '0 : dep1 ? fl_preg[0] : rat_ps[2];
  assign ps[3] = (u[1].rs2 == '0) ? '0 : dep2 ? fl_preg[0] : rat_ps[3];

  // resources
  logic [2:0] n_fu [4];
  logic [1:0] n_rob, n_pd, n_ld, n_st;
  logic       n_br;
  logic       res_ok;
  always_comb begin
    for (int f = 0; f < 4; f++) n_fu[f] = '0;
    n_rob = '0; n_pd = '0; n_ld = '0; n_st = '0; n_br = 1'b0;
    for (int s = 0; s < 2; s++)
      if (v[s]) begin
        n_fu[u[s].fu] = n_fu[u[s].fu] + 1'b1;
        n_rob = n_rob + 1'b1;
        n_pd  = n_pd + 2'(u[s].writes_rd);
        n_ld  = n_ld + 2'(u[s].is_load);
        n_st  = n_st + 2'(u[s].is_store);
        n_br  = n_br | is_ctl[s];
      end
    res_ok = (ROB_W+1)'(n_rob) <= rob_free && PREG_W'(n_pd) <= fl_count &&
             (LDQ_W+1)'(n_ld) <= ldq_free && (STQ_W+1)'(n_st) <= stq_free &&
             (!n_br || br_avail);
    for (int f = 0; f < 4; f++)
      if (IQ_CNT_W'(n_fu[f]) > iq_free[f]) res_ok = 1'b0;
  end

  assign fire  = !q_empty && res_ok && !mispredict;
  assign q_pop = fire;
  assign stat_stall_branch = !q_empty && !mispredict && n_br && !br_avail;

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      fl_alloc[s] = fire && v[s] && u[s].writes_rd;
      pd[s]       = u[s].writes_rd ? fl_preg[s] : '0;
      rat_wr[s]   = fl_alloc[s];
      rat_wr_a[s] = u[s].rd;
      clr_en[s]   = fl_alloc[s];
      disp_en[s]  = fire && v[s];
      ld_alloc[s] = disp_en[s] && u[s].is_load;
      st_alloc[s] = disp_en[s] && u[s].is_store;
    end
    ckpt_valid = fire && ((v[0] && is_ctl[0]) || (v[1] && is_ctl[1]));
    ckpt_tag   = br_tag;
    disp_bmask = cur_mask;
    for (int s = 0; s < 2; s++) begin
      disp_iss[s].uop   = u[s];
      disp_iss[s].pd    = pd[s];
      disp_iss[s].ps1   = ps[2*s];
      disp_iss[s].ps2   = ps[2*s+1];
      disp_iss[s].rob   = rob_idx[s];
      disp_iss[s].bmask = cur_mask;
      disp_iss[s].btag  = br_tag;
      disp_iss[s].ldq   = ldq_idx[s];
      disp_iss[s].stq   = stq_idx[s];
      disp_rdy1[s] = rt_ready[2*s];
      disp_rdy2[s] = rt_ready[2*s+1];
    end
    if (u[1].rs1 != '0 && dep1) disp_rdy1[1] = 1'b0;
    if (u[1].rs2 != '0 && dep2) disp_rdy2[1] = 1'b0;
  end

  rat u_rat (
    .clk, .rst,
    .rd_areg(rat_rd), .rd_preg(rat_ps),
    .wr_en(rat_wr), .wr_areg(rat_wr_a), .wr_preg(pd),
    .ckpt_valid, .ckpt_tag,
    .restore_valid(mispredict), .restore_tag(br.tag)
  );

  free_list u_fl (
    .clk, .rst,
    .alloc_en(fl_alloc), .alloc_preg(fl_preg), .count(fl_count),
    .free_en, .free_preg,
    .ckpt_valid, .ckpt_tag,
    .restore_valid(mispredict), .restore_tag(br.tag)
  );

  logic        ctl_slot;
  assign ctl_slot = !(v[0] && is_ctl[0]);

  br_mask_alloc u_bma (
    .clk, .rst, .br,
    .cur_mask, .free_avail(br_avail), .free_tag(br_tag),
    .alloc(ckpt_valid),
    .alloc_ghr(u[ctl_slot].ghr),
    .alloc_ras_ptr(u[ctl_slot].ras_ptr),
    .alloc_ras_top(u[ctl_slot].ras_top),
    .rs_ghr, .rs_ras_ptr, .rs_ras_top
  );

  ready_table #(.N_WAKE(N_WAKE)) u_rt (
    .clk, .rst, .wake,
    .clr_en, .clr_preg(pd),
    .rd_preg(ps), .rd_ready(rt_ready)
  );
endmodule
