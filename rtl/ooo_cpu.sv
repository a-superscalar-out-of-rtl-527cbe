// ooo_cpu: two-wide superscalar, out-of-order RV32IM core with its caches.
// Fetch (two stages, GShare + RAS) fills an instruction queue with bundles of
// up to two instructions. Dispatch decodes and renames a bundle per cycle onto
// 64 physical registers and places the instructions into the reorder buffer
// and four issue queues (ALU, branch, multiply/divide, memory). Each queue
// issues at most one instruction per cycle to its unit; operands are read
// from the physical register file with a bypass from the four result buses.
// The ALU and branch unit wake their consumers at issue (early wakeup), the
// multiply/divide and load/store units when the result is broadcast.
// Branches resolve in the branch unit (early branch resolution): on a
// misprediction every structure squashes the instructions carrying the
// branch's mask bit and restores its checkpoint in the same cycle, and fetch
// restarts at the correct PC. The reorder buffer retires up to two
// instructions per cycle in order; stores update the data cache only at
// retirement. An I-cache (2-way, prefetching) and a D-cache (4-way) share one
// DRAM port through the cacheline adapter.
// Ports: clock, synchronous active-high reset, the 64-bit-beat DRAM port, a
// retirement trace (per slot: valid, PC, rd, write flag and value) and event
// strobes for performance counting.
module ooo_cpu
  import ooo_pkg::*;
#(
  parameter logic [31:0] RESET_PC = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  // DRAM
  output logic [31:0] dram_addr,
  output logic        dram_read,
  output logic        dram_write,
  output logic [63:0] dram_wdata,
  input  logic        dram_ready,
  input  logic [31:0] dram_raddr,
  input  logic [63:0] dram_rdata,
  input  logic        dram_rvalid,
  // retirement trace
  output logic        commit_valid [2],
  output logic [31:0] commit_pc    [2],
  output logic [4:0]  commit_rd    [2],
  output logic        commit_we    [2],
  output logic [31:0] commit_data  [2],
  // events
  output logic        ev_branch,
  output logic        ev_mispredict,
  output logic        ev_dual_dispatch,
  output logic        ev_dual_commit,
  output logic        ev_fwd_full,
  output logic        ev_fwd_partial,
  output logic        ev_icache_miss,
  output logic        ev_prefetch_hit,
  output logic        ev_dcache_miss,
  output logic        ev_writeback,
  output logic        ev_branch_stall,
  output logic        ev_early_wake
);
  localparam int IQ_DEPTH = 8;
  localparam int IQ_CW    = $clog2(IQ_DEPTH) + 1;
  localparam int FQ_DEPTH = 8;

  br_t         br;
  logic        mispredict;
  cdb_t        cdb [NUM_CDB];
  wake_t       wake [4];

  // ---------------- front end ----------------
  logic        ic_req_valid, ic_req_tag, ic_req_ready;
  logic [31:0] ic_req_pc;
  logic        ic_resp_valid, ic_resp_tag, ic_resp_second_valid;
  logic [31:0] ic_resp_pc, ic_resp_instr0, ic_resp_instr1;
  logic        icm_req_valid, icm_req_ready, icm_resp_valid;
  logic [31:0] icm_req_addr;
  logic [LINE_BITS-1:0] icm_resp_data;
  logic [$clog2(FQ_DEPTH):0] fq_count;
  logic        fq_push, fq_empty, fq_pop;
  fetch_slot_t fq_in [2];
  fetch_slot_t fq_head [2];
  logic [31:0] redirect_pc;
  ghr_t        rs_ghr, restore_ghr;
  ras_ptr_t    rs_ras_ptr;
  logic [31:0] rs_ras_top;
  logic        bp_update_valid, bp_update_taken, bru_is_cond;
  ghr_t        bp_update_idx;

  assign mispredict  = br.valid && br.mispredict;
  assign restore_ghr = bru_is_cond ? {rs_ghr[GHR_W-2:0], bp_update_taken} : rs_ghr;

  fetch #(.RESET_PC(RESET_PC), .IQ_DEPTH(FQ_DEPTH)) u_fetch (
    .clk, .rst,
    .ic_req_valid, .ic_req_pc, .ic_req_tag, .ic_req_ready,
    .ic_resp_valid, .ic_resp_pc, .ic_resp_tag, .ic_resp_instr0, .ic_resp_instr1,
    .ic_resp_second_valid,
    .iq_count(fq_count), .iq_push(fq_push), .iq_data(fq_in),
    .redirect_valid(mispredict), .redirect_pc,
    .restore_ghr, .restore_ras_ptr(rs_ras_ptr), .restore_ras_top(rs_ras_top),
    .bp_update_valid, .bp_update_idx, .bp_update_taken
  );

  icache u_icache (
    .clk, .rst,
    .req_valid(ic_req_valid), .req_pc(ic_req_pc), .req_tag(ic_req_tag), .req_ready(ic_req_ready),
    .resp_valid(ic_resp_valid), .resp_pc(ic_resp_pc), .resp_tag(ic_resp_tag),
    .resp_instr0(ic_resp_instr0), .resp_instr1(ic_resp_instr1),
    .resp_second_valid(ic_resp_second_valid),
    .mem_req_valid(icm_req_valid), .mem_req_addr(icm_req_addr), .mem_req_ready(icm_req_ready),
    .mem_resp_valid(icm_resp_valid), .mem_resp_data(icm_resp_data),
    .stat_miss(ev_icache_miss), .stat_pf_hit(ev_prefetch_hit)
  );

  instr_queue #(.DEPTH(FQ_DEPTH)) u_fq (
    .clk, .rst, .flush(mispredict),
    .push(fq_push), .push_data(fq_in),
    .pop(fq_pop), .empty(fq_empty), .head(fq_head), .count(fq_count)
  );

  // ---------------- dispatch ----------------
  logic [ROB_W:0]   rob_free;
  logic [IQ_CW-1:0] iq_free [4];
  logic [LDQ_W:0]   ldq_free;
  logic [STQ_W:0]   stq_free;
  rob_idx_t         rob_idx [2];
  ldq_idx_t         ldq_idx [2];
  stq_idx_t         stq_idx [2];
  logic             disp_en [2];
  iss_t             disp_iss [2];
  logic             disp_rdy1 [2], disp_rdy2 [2];
  logic             ld_alloc [2], st_alloc [2];
  bmask_t           disp_bmask;
  logic             ckpt_valid;
  btag_t            ckpt_tag;
  logic             free_en [2];
  preg_t            free_preg [2];

  dispatch #(.IQ_CNT_W(IQ_CW), .N_WAKE(4)) u_dispatch (
    .clk, .rst, .br, .wake,
    .q_empty(fq_empty), .q_head(fq_head), .q_pop(fq_pop),
    .rob_free, .iq_free, .ldq_free, .stq_free,
    .rob_idx, .ldq_idx, .stq_idx,
    .disp_en, .disp_iss, .disp_rdy1, .disp_rdy2, .ld_alloc, .st_alloc, .disp_bmask,
    .ckpt_valid, .ckpt_tag,
    .free_en, .free_preg,
    .rs_ghr, .rs_ras_ptr, .rs_ras_top,
    .stat_stall_branch(ev_branch_stall)
  );

  // ---------------- reorder buffer and retirement map ----------------
  logic        rob_alloc_wr [2], rob_alloc_st [2];
  areg_t       rob_alloc_rd [2];
  preg_t       rob_alloc_pd [2];
  logic [31:0] rob_alloc_pc [2];
  logic        st_done;
  rob_idx_t    st_done_idx;
  logic        c_en [2], c_wr [2];
  areg_t       c_rd [2];
  preg_t       c_pd [2];
  logic [31:0] c_pc [2];
  logic        store_commit_req, store_commit_ack;
  logic        rr_commit [2];

  always_comb
    for (int s = 0; s < 2; s++) begin
      rob_alloc_wr[s] = disp_iss[s].uop.writes_rd;
      rob_alloc_st[s] = disp_iss[s].uop.is_store;
      rob_alloc_rd[s] = disp_iss[s].uop.rd;
      rob_alloc_pd[s] = disp_iss[s].pd;
      rob_alloc_pc[s] = disp_iss[s].uop.pc;
      rr_commit[s]    = c_en[s] && c_wr[s];
    end

  rob u_rob (
    .clk, .rst,
    .alloc_en(disp_en), .alloc_rd(rob_alloc_rd), .alloc_pd(rob_alloc_pd), .alloc_wr(rob_alloc_wr),
    .alloc_store(rob_alloc_st), .alloc_pc(rob_alloc_pc), .alloc_idx(rob_idx), .free_cnt(rob_free),
    .cdb, .st_done, .st_done_idx,
    .ckpt_valid, .ckpt_tag, .br,
    .commit_en(c_en), .commit_rd(c_rd), .commit_pd(c_pd), .commit_wr(c_wr), .commit_pc(c_pc),
    .store_commit_req, .store_commit_ack
  );

  rrat u_rrat (
    .clk, .rst,
    .commit_en(rr_commit), .commit_areg(c_rd), .commit_preg(c_pd),
    .free_en, .free_preg
  );

  // ---------------- issue queues ----------------
  logic iq_wr [4][2];
  logic iq_iss_valid [4];
  iss_t iq_iss [4];
  logic fu_ready [4];
  logic mdu_ready;

  always_comb
    for (int f = 0; f < 4; f++)
      for (int s = 0; s < 2; s++)
        iq_wr[f][s] = disp_en[s] && disp_iss[s].uop.fu == fu_e'(f);

  assign fu_ready[FU_ALU] = 1'b1;
  assign fu_ready[FU_BRU] = 1'b1;
  assign fu_ready[FU_MDU] = mdu_ready;
  assign fu_ready[FU_MEM] = 1'b1;

  for (genvar f = 0; f < 4; f++) begin : g_iq
    issue_queue #(.DEPTH(IQ_DEPTH), .N_WAKE(4)) u_iq (
      .clk, .rst,
      .wr_en(iq_wr[f]), .wr_data(disp_iss), .wr_rdy1(disp_rdy1), .wr_rdy2(disp_rdy2),
      .free_cnt(iq_free[f]),
      .wake, .br,
      .fu_ready(fu_ready[f]),
      .iss_valid(iq_iss_valid[f]), .iss_data(iq_iss[f])
    );
  end

  // ---------------- register read with bypass ----------------
  preg_t       prf_ra [10];
  logic [31:0] prf_rd [10];
  logic        prf_we [NUM_CDB];
  preg_t       prf_wa [NUM_CDB];
  logic [31:0] prf_wd [NUM_CDB];
  exe_t        exe [4];

  always_comb begin
    for (int f = 0; f < 4; f++) begin
      prf_ra[2*f]   = iq_iss[f].ps1;
      prf_ra[2*f+1] = iq_iss[f].ps2;
    end
    prf_ra[8] = c_pd[0];
    prf_ra[9] = c_pd[1];
    for (int c = 0; c < NUM_CDB; c++) begin
      prf_we[c] = cdb[c].valid && cdb[c].wr;
      prf_wa[c] = cdb[c].pd;
      prf_wd[c] = cdb[c].data;
    end
    for (int f = 0; f < 4; f++) begin
      exe[f].valid = iq_iss_valid[f];
      exe[f].i     = iq_iss[f];
      exe[f].a     = prf_rd[2*f];
      exe[f].b     = prf_rd[2*f+1];
      for (int c = 0; c < NUM_CDB; c++) begin
        if (prf_we[c] && cdb[c].pd == iq_iss[f].ps1 && iq_iss[f].ps1 != '0) exe[f].a = cdb[c].data;
        if (prf_we[c] && cdb[c].pd == iq_iss[f].ps2 && iq_iss[f].ps2 != '0) exe[f].b = cdb[c].data;
      end
    end
  end

  prf #(.N_RD(10), .N_WR(NUM_CDB)) u_prf (
    .clk, .rst,
    .rd_addr(prf_ra), .rd_data(prf_rd),
    .wr_en(prf_we), .wr_addr(prf_wa), .wr_data(prf_wd)
  );

  // ---------------- wakeup ----------------
  always_comb begin
    wake[0] = '{valid: iq_iss_valid[FU_ALU] && iq_iss[FU_ALU].uop.writes_rd, tag: iq_iss[FU_ALU].pd};
    wake[1] = '{valid: iq_iss_valid[FU_BRU] && iq_iss[FU_BRU].uop.writes_rd, tag: iq_iss[FU_BRU].pd};
    wake[2] = '{valid: cdb[2].valid && cdb[2].wr, tag: cdb[2].pd};
    wake[3] = '{valid: cdb[3].valid && cdb[3].wr, tag: cdb[3].pd};
  end

  // ---------------- functional units ----------------
  alu u_alu (.clk, .rst, .br, .in(exe[FU_ALU]), .out(cdb[0]));

  bru u_bru (
    .clk, .rst, .br_in(br), .in(exe[FU_BRU]), .out(cdb[1]), .br_out(br), .redirect_pc,
    .bp_update_valid, .bp_update_idx, .bp_update_taken, .is_cond(bru_is_cond)
  );

  mdu u_mdu (.clk, .rst, .br, .in(exe[FU_MDU]), .ready(mdu_ready), .out(cdb[2]));

  // ---------------- memory ----------------
  logic            dc_req_valid, dc_req_ready, dc_req_we, dc_resp_valid;
  logic [31:0]     dc_req_addr, dc_req_wdata, dc_resp_rdata;
  logic [3:0]      dc_req_wmask;
  logic [LDQ_W:0]  dc_req_id, dc_resp_id;
  logic            dcm_req_valid, dcm_req_we, dcm_req_ready, dcm_resp_valid;
  logic [31:0]     dcm_req_addr;
  logic [LINE_BITS-1:0] dcm_req_wdata, dcm_resp_data;
  logic [1:0]      dcm_resp_id;

  lsu u_lsu (
    .clk, .rst, .br,
    .ld_alloc_en(ld_alloc), .st_alloc_en(st_alloc), .alloc_bmask(disp_bmask),
    .ld_alloc_idx(ldq_idx), .st_alloc_idx(stq_idx),
    .ldq_free_cnt(ldq_free), .stq_free_cnt(stq_free),
    .ckpt_valid, .ckpt_tag,
    .in(exe[FU_MEM]), .st_done, .st_done_idx,
    .store_commit_req, .store_commit_ack,
    .dc_req_valid, .dc_req_ready, .dc_req_addr, .dc_req_we, .dc_req_wmask, .dc_req_wdata,
    .dc_req_id, .dc_resp_valid, .dc_resp_rdata, .dc_resp_id,
    .out(cdb[3]),
    .stat_fwd_full(ev_fwd_full), .stat_fwd_partial(ev_fwd_partial)
  );

  dcache u_dcache (
    .clk, .rst,
    .req_valid(dc_req_valid), .req_ready(dc_req_ready), .req_addr(dc_req_addr),
    .req_we(dc_req_we), .req_wmask(dc_req_wmask), .req_wdata(dc_req_wdata), .req_id(dc_req_id),
    .resp_valid(dc_resp_valid), .resp_rdata(dc_resp_rdata), .resp_id(dc_resp_id),
    .mem_req_valid(dcm_req_valid), .mem_req_we(dcm_req_we), .mem_req_addr(dcm_req_addr),
    .mem_req_wdata(dcm_req_wdata), .mem_req_ready(dcm_req_ready),
    .mem_resp_valid(dcm_resp_valid), .mem_resp_data(dcm_resp_data),
    .stat_miss(ev_dcache_miss), .stat_writeback(ev_writeback)
  );

  cacheline_adapter u_adapter (
    .clk, .rst,
    .i_req_valid(icm_req_valid), .i_req_addr(icm_req_addr), .i_req_ready(icm_req_ready),
    .i_resp_valid(icm_resp_valid), .i_resp_data(icm_resp_data),
    .d_req_valid(dcm_req_valid), .d_req_we(dcm_req_we), .d_req_addr(dcm_req_addr),
    .d_req_wdata(dcm_req_wdata), .d_req_id(2'd0), .d_req_ready(dcm_req_ready),
    .d_resp_valid(dcm_resp_valid), .d_resp_data(dcm_resp_data), .d_resp_id(dcm_resp_id),
    .dram_addr, .dram_read, .dram_write, .dram_wdata, .dram_ready,
    .dram_raddr, .dram_rdata, .dram_rvalid
  );

  // ---------------- trace and events ----------------
  always_comb
    for (int s = 0; s < 2; s++) begin
      commit_valid[s] = c_en[s];
      commit_pc[s]    = c_pc[s];
      commit_rd[s]    = c_rd[s];
      commit_we[s]    = c_wr[s];
      commit_data[s]  = prf_rd[8+s];
    end

  assign ev_branch        = br.valid;
  assign ev_mispredict    = mispredict;
  assign ev_dual_dispatch = disp_en[0] && disp_en[1];
  assign ev_dual_commit   = c_en[0] && c_en[1];
  assign ev_early_wake    = wake[0].valid || wake[1].valid;
endmodule
