// lsu: load/store unit with a split load queue (LDQ) and store queue (STQ),
// eight entries each as in the design description.
// Dispatch allocates queue entries before execution: any free LDQ slot for a
// load, the STQ tail for a store. Each load records which STQ entries are
// older than it (the valid ones at its dispatch, plus a store in slot 0 of
// the same bundle). The STQ tail is checkpointed per branch and restored on a
// misprediction; entries of the wrong path are dropped by their branch mask.
// Issue from the memory issue queue goes through an address generation stage
// (one registered cycle): it computes the address and byte mask, fills the
// queue entry, and for a store tells the reorder buffer the store is done.
// Loads are conservative: a load may execute only when every older store has
// its address. The bytes it needs are taken, per byte, from the youngest older
// store to the same word (store-to-load forwarding through byte masks); if all
// bytes come from the STQ the load completes without the cache, otherwise the
// cache is read and the forwarded bytes are merged into the answer.
// Stores change memory only after commit: when the reorder buffer's head is a
// store, the STQ head is written to the data cache and store_commit_ack is
// given once the cache has answered. One cache request is outstanding at a
// time (stores first); a load squashed while its request is outstanding has
// its answer discarded. Load results leave on the LSU result bus one cycle
// after the data is known.
module lsu
  import ooo_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  br_t         br,
  // allocation from dispatch
  input  logic        ld_alloc_en [2],
  input  logic        st_alloc_en [2],
  input  bmask_t      alloc_bmask,
  output ldq_idx_t    ld_alloc_idx [2],
  output stq_idx_t    st_alloc_idx [2],
  output logic [LDQ_W:0] ldq_free_cnt,
  output logic [STQ_W:0] stq_free_cnt,
  input  logic        ckpt_valid,
  input  btag_t       ckpt_tag,
  // issue
  input  exe_t        in,
  output logic        st_done,
  output rob_idx_t    st_done_idx,
  // commit
  input  logic        store_commit_req,
  output logic        store_commit_ack,
  // data cache
  output logic        dc_req_valid,
  input  logic        dc_req_ready,
  output logic [31:0] dc_req_addr,
  output logic        dc_req_we,
  output logic [3:0]  dc_req_wmask,
  output logic [31:0] dc_req_wdata,
  output logic [LDQ_W:0] dc_req_id,
  input  logic        dc_resp_valid,
  input  logic [31:0] dc_resp_rdata,
  input  logic [LDQ_W:0] dc_resp_id,
  // result bus
  output cdb_t        out,
  // statistics
  output logic        stat_fwd_full,
  output logic        stat_fwd_partial
);
  typedef struct packed {
    logic        valid;
    logic        addr_valid;
    logic        sent;
    bmask_t      bmask;
    logic [STQ_DEPTH-1:0] older;
    logic [29:0] waddr;
    logic [1:0]  boff;
    logic [2:0]  f3;
    preg_t       pd;
    logic        wr;
    rob_idx_t    rob;
    logic [3:0]  fwd_mask;
    logic [31:0] fwd_data;
  } ld_t;

  typedef struct packed {
    logic        valid;
    logic        addr_valid;
    bmask_t      bmask;
    logic [29:0] waddr;
    logic [3:0]  wmask;
    logic [31:0] data;
  } st_t;

  ld_t ldq [LDQ_DEPTH];
  st_t stq [STQ_DEPTH];
  logic [STQ_W:0] st_head, st_tail, st_tail_next;
  logic [STQ_W:0] st_ckpt [BR_MASK_W];
  exe_t q;
  logic mispredict;
  assign mispredict = br.valid && br.mispredict;

  // ---------------- allocation ----------------
  logic ld_ok [2];
  always_comb begin
    ldq_free_cnt = '0;
    for (int i = 0; i < LDQ_DEPTH; i++) ldq_free_cnt = ldq_free_cnt + (LDQ_W+1)'(!ldq[i].valid);
    ld_ok[0] = 1'b0; ld_alloc_idx[0] = '0;
    for (int i = LDQ_DEPTH-1; i >= 0; i--)
      if (!ldq[i].valid) begin ld_ok[0] = 1'b1; ld_alloc_idx[0] = ldq_idx_t'(i); end
    ld_ok[1] = ld_ok[0]; ld_alloc_idx[1] = ld_alloc_idx[0];
    if (ld_alloc_en[0]) begin
      ld_ok[1] = 1'b0;
      for (int i = LDQ_DEPTH-1; i >= 0; i--)
        if (!ldq[i].valid && ldq_idx_t'(i) != ld_alloc_idx[0]) begin
          ld_ok[1] = 1'b1; ld_alloc_idx[1] = ldq_idx_t'(i);
        end
    end
  end
  assign stq_free_cnt    = (STQ_W+1)'(STQ_DEPTH) - (st_tail - st_head);
  assign st_alloc_idx[0] = st_tail[STQ_W-1:0];
  assign st_alloc_idx[1] = st_alloc_en[0] ? stq_idx_t'(st_tail[STQ_W-1:0] + 1'b1) : st_tail[STQ_W-1:0];
  assign st_tail_next    = st_tail + (STQ_W+1)'(st_alloc_en[0]) + (STQ_W+1)'(st_alloc_en[1]);

  logic [STQ_DEPTH-1:0] st_valid_vec, st_known_vec;
  always_comb
    for (int i = 0; i < STQ_DEPTH; i++) begin
      st_valid_vec[i] = stq[i].valid;
      st_known_vec[i] = stq[i].valid && stq[i].addr_valid;
    end

  // ---------------- address generation ----------------
  logic [31:0] agu_addr;
  logic        agu_valid;
  assign agu_addr  = q.a + q.i.uop.imm;
  assign agu_valid = q.valid && !bm_killed(q.i.bmask, br);
  assign st_done     = agu_valid && q.i.uop.is_store;
  assign st_done_idx = q.i.rob;

  function automatic logic [3:0] byte_mask(logic [2:0] f3, logic [1:0] off);
    unique case (f3[1:0])
      2'b00:   return 4'b0001 << off;
      2'b01:   return 4'b0011 << off;
      default: return 4'b1111;
    endcase
  endfunction

  // ---------------- load selection and forwarding ----------------
  logic          ld_sel_found;
  ldq_idx_t      ld_sel;
  logic [3:0]    need, fmask;
  logic [31:0]   fdata;
  always_comb begin
    ld_sel_found = 1'b0; ld_sel = '0;
    for (int i = LDQ_DEPTH-1; i >= 0; i--)
      if (ldq[i].valid && ldq[i].addr_valid && !ldq[i].sent &&
          (ldq[i].older & ~st_known_vec) == '0 && !bm_killed(ldq[i].bmask, br)) begin
        ld_sel_found = 1'b1; ld_sel = ldq_idx_t'(i);
      end
    need  = byte_mask(ldq[ld_sel].f3, ldq[ld_sel].boff);
    fmask = '0;
    fdata = '0;
    for (int k = 0; k < STQ_DEPTH; k++) begin
      automatic stq_idx_t s = stq_idx_t'(st_head[STQ_W-1:0] + stq_idx_t'(k));
      if (ldq[ld_sel].older[s] && stq[s].waddr == ldq[ld_sel].waddr)
        for (int b = 0; b < 4; b++)
          if (stq[s].wmask[b] && need[b]) begin
            fmask[b] = 1'b1;
            fdata[8*b +: 8] = stq[s].data[8*b +: 8];
          end
    end
  end

  function automatic logic [31:0] ld_extend(logic [31:0] w, logic [2:0] f3, logic [1:0] off);
    logic [31:0] s;
    s = w >> (8 * off);
    unique case (f3)
      3'b000:  return {{24{s[7]}}, s[7:0]};
      3'b001:  return {{16{s[15]}}, s[15:0]};
      3'b100:  return {24'b0, s[7:0]};
      3'b101:  return {16'b0, s[15:0]};
      default: return s;
    endcase
  endfunction

  // ---------------- cache port ----------------
  logic        busy;         // one request outstanding
  logic        full_fwd;
  logic        send_store, send_load;
  logic        resp_load_ok;
  ldq_idx_t    resp_idx;
  logic [31:0] merged;

  assign full_fwd   = ld_sel_found && (need & ~fmask) == '0;
  assign send_store = !busy && store_commit_req;
  assign send_load  = !busy && !store_commit_req && ld_sel_found && !full_fwd;

  always_comb begin
    dc_req_valid = send_store || send_load;
    dc_req_we    = send_store;
    if (send_store) begin
      dc_req_addr  = {stq[st_head[STQ_W-1:0]].waddr, 2'b00};
      dc_req_wmask = stq[st_head[STQ_W-1:0]].wmask;
      dc_req_wdata = stq[st_head[STQ_W-1:0]].data;
      dc_req_id    = {1'b1, LDQ_W'(0)};
    end else begin
      dc_req_addr  = {ldq[ld_sel].waddr, 2'b00};
      dc_req_wmask = '0;
      dc_req_wdata = '0;
      dc_req_id    = {1'b0, ld_sel};
    end
  end

  assign resp_idx         = dc_resp_id[LDQ_W-1:0];
  assign store_commit_ack = dc_resp_valid && dc_resp_id[LDQ_W];
  assign resp_load_ok     = dc_resp_valid && !dc_resp_id[LDQ_W] &&
                            ldq[resp_idx].valid && ldq[resp_idx].sent &&
                            !bm_killed(ldq[resp_idx].bmask, br);
  always_comb begin
    merged = dc_resp_rdata;
    for (int b = 0; b < 4; b++)
      if (ldq[resp_idx].fwd_mask[b]) merged[8*b +: 8] = ldq[resp_idx].fwd_data[8*b +: 8];
  end

  logic do_fwd_complete;
  assign do_fwd_complete = full_fwd && !resp_load_ok;
  assign stat_fwd_full    = do_fwd_complete;
  assign stat_fwd_partial = send_load && dc_req_ready && fmask != '0;

  always_ff @(posedge clk) begin
    if (rst) begin
      q.valid <= 1'b0;
      for (int i = 0; i < LDQ_DEPTH; i++) ldq[i].valid <= 1'b0;
      for (int i = 0; i < STQ_DEPTH; i++) stq[i].valid <= 1'b0;
      st_head <= '0;
      st_tail <= '0;
      busy    <= 1'b0;
      out.valid <= 1'b0;
    end else begin
      // AGU input register
      q <= in;
      q.valid   <= in.valid && !bm_killed(in.i.bmask, br);
      q.i.bmask <= bm_upd(in.i.bmask, br);

      // branch mask maintenance and squash
      for (int i = 0; i < LDQ_DEPTH; i++) begin
        ldq[i].bmask <= bm_upd(ldq[i].bmask, br);
        if (bm_killed(ldq[i].bmask, br)) ldq[i].valid <= 1'b0;
      end
      for (int i = 0; i < STQ_DEPTH; i++) begin
        stq[i].bmask <= bm_upd(stq[i].bmask, br);
        if (bm_killed(stq[i].bmask, br)) stq[i].valid <= 1'b0;
      end

      // address generation result
      if (agu_valid && q.i.uop.is_load) begin
        ldq[q.i.ldq].addr_valid <= 1'b1;
        ldq[q.i.ldq].waddr      <= agu_addr[31:2];
        ldq[q.i.ldq].boff       <= agu_addr[1:0];
        ldq[q.i.ldq].f3         <= q.i.uop.op[2:0];
        ldq[q.i.ldq].pd         <= q.i.pd;
        ldq[q.i.ldq].wr         <= q.i.uop.writes_rd;
        ldq[q.i.ldq].rob        <= q.i.rob;
      end
      if (agu_valid && q.i.uop.is_store) begin
        stq[q.i.stq].addr_valid <= 1'b1;
        stq[q.i.stq].waddr      <= agu_addr[31:2];
        stq[q.i.stq].wmask      <= byte_mask(q.i.uop.op[2:0], agu_addr[1:0]);
        stq[q.i.stq].data       <= q.b << (8 * agu_addr[1:0]);
      end

      // cache requests and answers
      if (dc_req_valid && dc_req_ready) begin
        busy       <= 1'b1;
        if (send_load) begin
          ldq[ld_sel].sent     <= 1'b1;
          ldq[ld_sel].fwd_mask <= fmask;
          ldq[ld_sel].fwd_data <= fdata;
        end
      end
      out.valid <= 1'b0;
      if (dc_resp_valid) begin
        busy <= 1'b0;
        if (store_commit_ack) begin
          stq[st_head[STQ_W-1:0]].valid <= 1'b0;
          st_head <= st_head + 1'b1;
          for (int i = 0; i < LDQ_DEPTH; i++) ldq[i].older[st_head[STQ_W-1:0]] <= 1'b0;
        end
        if (resp_load_ok) begin
          ldq[resp_idx].valid <= 1'b0;
          out <= '{valid: 1'b1, wr: ldq[resp_idx].wr, pd: ldq[resp_idx].pd, rob: ldq[resp_idx].rob,
                   data: ld_extend(merged, ldq[resp_idx].f3, ldq[resp_idx].boff)};
        end
      end
      if (do_fwd_complete) begin
        ldq[ld_sel].valid <= 1'b0;
        out <= '{valid: 1'b1, wr: ldq[ld_sel].wr, pd: ldq[ld_sel].pd, rob: ldq[ld_sel].rob,
                 data: ld_extend(fdata, ldq[ld_sel].f3, ldq[ld_sel].boff)};
      end

      // allocation and store-queue tail
      if (mispredict) st_tail <= st_ckpt[br.tag];
      else begin
        st_tail <= st_tail_next;
        if (ckpt_valid) st_ckpt[ckpt_tag] <= st_tail_next;
        for (int s = 0; s < 2; s++) begin
          if (ld_alloc_en[s] && ld_ok[s]) begin
            ldq[ld_alloc_idx[s]].valid      <= 1'b1;
            ldq[ld_alloc_idx[s]].addr_valid <= 1'b0;
            ldq[ld_alloc_idx[s]].sent       <= 1'b0;
            ldq[ld_alloc_idx[s]].bmask      <= bm_upd(alloc_bmask, br);
            ldq[ld_alloc_idx[s]].older      <=
              (st_valid_vec & ~(store_commit_ack ? STQ_DEPTH'(1) << st_head[STQ_W-1:0] : '0)) |
              ((s == 1 && st_alloc_en[0]) ? STQ_DEPTH'(1) << st_alloc_idx[0] : '0);
            ldq[ld_alloc_idx[s]].fwd_mask   <= '0;
          end
          if (st_alloc_en[s]) begin
            stq[st_alloc_idx[s]].valid      <= 1'b1;
            stq[st_alloc_idx[s]].addr_valid <= 1'b0;
            stq[st_alloc_idx[s]].bmask      <= bm_upd(alloc_bmask, br);
          end
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) dc_resp_valid |-> busy)
    else $error("lsu: cache answer with no request outstanding");
endmodule
