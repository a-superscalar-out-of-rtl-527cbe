// rob: reorder buffer, 32 entries, in-order retirement of up to two
// instructions per cycle. Dispatch writes up to two entries at the tail; the
// indices it will get are alloc_idx. Functional units mark entries done
// through the result buses (cdb) and the load/store unit through st_done when a
// store has its address and data. The head commits when done; slot 1 commits
// with it when also done, unless either is a store. A store at the head raises
// store_commit_req and commits only when the load/store unit answers with
// store_commit_ack, after its cache write has completed, so memory is updated
// in order. The tail pointer is checkpointed per branch (the entry after the
// branch) and restored on a misprediction, dropping all younger entries.
// Pointers are one bit wider than the index so full and empty differ.
module rob
  import ooo_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // allocation
  input  logic        alloc_en [2],
  input  areg_t       alloc_rd [2],
  input  preg_t       alloc_pd [2],
  input  logic        alloc_wr [2],
  input  logic        alloc_store [2],
  input  logic [31:0] alloc_pc [2],
  output rob_idx_t    alloc_idx [2],
  output logic [ROB_W:0] free_cnt,
  // completion
  input  cdb_t        cdb [NUM_CDB],
  input  logic        st_done,
  input  rob_idx_t    st_done_idx,
  // branch checkpoint / recovery
  input  logic        ckpt_valid,
  input  btag_t       ckpt_tag,
  input  br_t         br,
  // commit
  output logic        commit_en [2],
  output areg_t       commit_rd [2],
  output preg_t       commit_pd [2],
  output logic        commit_wr [2],
  output logic [31:0] commit_pc [2],
  output logic        store_commit_req,
  input  logic        store_commit_ack
);
  typedef struct packed {
    logic        done;
    logic        wr;
    logic        store;
    areg_t       rd;
    preg_t       pd;
    logic [31:0] pc;
  } entry_t;

  entry_t          ent [ROB_DEPTH];
  logic [ROB_W:0]  head, tail, tail_next;
  logic [ROB_W:0]  ckpt [BR_MASK_W];
  logic [ROB_W:0]  cnt;
  rob_idx_t        h0, h1;
  logic            v0, v1;

  assign cnt      = tail - head;
  assign free_cnt = (ROB_W+1)'(ROB_DEPTH) - cnt;
  assign alloc_idx[0] = tail[ROB_W-1:0];
  assign alloc_idx[1] = alloc_en[0] ? rob_idx_t'(tail[ROB_W-1:0] + 1'b1) : tail[ROB_W-1:0];
  assign tail_next = tail + (ROB_W+1)'(alloc_en[0]) + (ROB_W+1)'(alloc_en[1]);

  assign h0 = head[ROB_W-1:0];
  assign h1 = rob_idx_t'(h0 + 1'b1);
  assign v0 = cnt >= 1;
  assign v1 = cnt >= 2;

  always_comb begin
    store_commit_req = v0 && ent[h0].done && ent[h0].store;
    commit_en[0] = v0 && ent[h0].done && (!ent[h0].store || store_commit_ack);
    commit_en[1] = commit_en[0] && !ent[h0].store && v1 && ent[h1].done && !ent[h1].store;
    for (int s = 0; s < 2; s++) begin
      commit_rd[s] = ent[s == 0 ? h0 : h1].rd;
      commit_pd[s] = ent[s == 0 ? h0 : h1].pd;
      commit_wr[s] = ent[s == 0 ? h0 : h1].wr;
      commit_pc[s] = ent[s == 0 ? h0 : h1].pc;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      head <= '0;
      tail <= '0;
    end else begin
      head <= head + (ROB_W+1)'(commit_en[0]) + (ROB_W+1)'(commit_en[1]);
      if (br.valid && br.mispredict) tail <= ckpt[br.tag];
      else begin
        tail <= tail_next;
        if (ckpt_valid) ckpt[ckpt_tag] <= tail_next;
      end
      for (int c = 0; c < NUM_CDB; c++)
        if (cdb[c].valid) ent[cdb[c].rob].done <= 1'b1;
      if (st_done) ent[st_done_idx].done <= 1'b1;
      for (int s = 0; s < 2; s++)
        if (alloc_en[s] && !(br.valid && br.mispredict)) begin
          ent[alloc_idx[s]] <= '{done: 1'b0, wr: alloc_wr[s], store: alloc_store[s],
                                 rd: alloc_rd[s], pd: alloc_pd[s], pc: alloc_pc[s]};
        end
    end
  end

  assert property (@(posedge clk) disable iff (rst) cnt <= (ROB_W+1)'(ROB_DEPTH))
    else $error("rob overflow");
endmodule
