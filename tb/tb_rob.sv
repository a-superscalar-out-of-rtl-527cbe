// tb_rob: fills the reorder buffer two at a time, completes entries out of
// order through the result buses, and checks that retirement is in order, at
// most two per cycle, with stores waiting for their acknowledgement and never
// in the second slot; a checkpointed tail is restored on a misprediction.
module tb_rob;
  import ooo_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic alloc_en [2], alloc_wr [2], alloc_store [2];
  areg_t alloc_rd [2];
  preg_t alloc_pd [2];
  logic [31:0] alloc_pc [2];
  rob_idx_t alloc_idx [2];
  logic [ROB_W:0] free_cnt;
  cdb_t cdb [NUM_CDB];
  logic st_done;
  rob_idx_t st_done_idx;
  logic ckpt_valid;
  btag_t ckpt_tag;
  br_t br;
  logic commit_en [2], commit_wr [2];
  areg_t commit_rd [2];
  preg_t commit_pd [2];
  logic [31:0] commit_pc [2];
  logic store_commit_req, store_commit_ack;
  rob dut (.*);

  int checks = 0, failures = 0;
  int next_pc = 0;        // sequence number given as pc
  int exp_pc = 0;         // next expected to retire
  int inflight [$];       // sequence numbers allocated, not retired
  bit is_st [int];
  rob_idx_t idx_of [int];
  int n_dual = 0, n_store = 0, n_flush = 0;
  int ck_seq = -1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (cdb[i]) cdb[i] = '0;
    alloc_en = '{0, 0}; st_done = 0; ckpt_valid = 0; br = '0; store_commit_ack = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      br = '0;
      // misprediction: squash everything after the checkpointed sequence number
      if (ck_seq >= 0 && ck_seq < exp_pc) ck_seq = -1;   // the branch retired unresolved: forget it
      if (ck_seq >= 0 && $urandom_range(0, 40) == 0) begin
        br.valid = 1; br.mispredict = 1; br.tag = 1; br.onehot = 4'b0010;
      end
      for (int s = 0; s < 2; s++) begin
        alloc_en[s] = !br.valid && free_cnt >= 2 && $urandom_range(0, 1);
        alloc_store[s] = ($urandom_range(0, 4) == 0);
        alloc_wr[s] = !alloc_store[s];
        alloc_rd[s] = areg_t'($urandom()); alloc_pd[s] = preg_t'($urandom());
      end
      if (!alloc_en[0]) alloc_en[1] = 0;
      alloc_pc[0] = next_pc; alloc_pc[1] = next_pc + 1;
      ckpt_valid = alloc_en[0] && !alloc_en[1] && ck_seq < 0 && $urandom_range(0, 3) == 0;
      ckpt_tag = 1;
      foreach (cdb[c]) begin
        cdb[c] = '0;
        if (inflight.size() > 0 && $urandom_range(0, 1)) begin
          automatic int q = inflight[$urandom_range(0, inflight.size() - 1)];
          if (!is_st[q]) begin cdb[c].valid = 1; cdb[c].rob = idx_of[q]; end
        end
      end
      st_done = 0;
      if (inflight.size() > 0) begin
        automatic int q = inflight[$urandom_range(0, inflight.size() - 1)];
        if (is_st[q]) begin st_done = 1; st_done_idx = idx_of[q]; end
      end
      store_commit_ack = store_commit_req && $urandom_range(0, 1);
      #1;
      for (int s = 0; s < 2; s++) if (commit_en[s]) begin
        checks++;
        if (commit_pc[s] !== 32'(exp_pc)) begin failures++; $display("retired %0d expected %0d", commit_pc[s], exp_pc); end
        if (s == 1 && is_st[exp_pc]) begin failures++; $display("store in slot 1"); end
        if (is_st[exp_pc] && !store_commit_ack) begin failures++; $display("store retired without ack"); end
        exp_pc++;
      end
      @(posedge clk);
      if (commit_en[0] && commit_en[1]) n_dual++;
      for (int s = 0; s < 2; s++) if (commit_en[s]) begin
        if (is_st[inflight[0]]) n_store++;
        void'(inflight.pop_front());
      end
      if (br.valid) begin
        while (inflight.size() > 0 && inflight[$] > ck_seq) void'(inflight.pop_back());
        next_pc = ck_seq + 1;
        ck_seq = -1;
        n_flush++;
      end else begin
        for (int s = 0; s < 2; s++) if (alloc_en[s]) begin
          inflight.push_back(next_pc);
          is_st[next_pc] = alloc_store[s];
          idx_of[next_pc] = alloc_idx[s];
          next_pc++;
        end
        if (ckpt_valid) ck_seq = next_pc - 1;
      end
    end
    checks += 3; $display("dual %0d store %0d flush %0d retired %0d inflight %0d free %0d", n_dual, n_store, n_flush, exp_pc, inflight.size(), free_cnt);
    if (n_dual == 0 || n_store == 0 || n_flush == 0) begin failures++; $display("coverage %0d %0d %0d", n_dual, n_store, n_flush); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
