// tb_dispatch: random bundles (ALU, multiply, load, store, conditional
// branch alone in slot 0) are offered to the dispatch stage while the
// testbench plays the rest of the core: random issue-queue, ROB and LSQ room,
// wakeups of waiting registers, in-order commit that frees the previous
// mapping of each destination, and branch resolution in any order, some of
// them mispredicted. A reference rename model (map table, set of allocated
// physical registers, ready bits, outstanding branch tags with a map
// snapshot per tag) predicts every output: source registers (including a
// slot-1 source produced by slot 0), fresh destination registers never in
// use, ready bits, branch masks and tags, load/store queue allocation, the
// all-or-nothing resource decision, and that a bundle with room is taken.
module tb_dispatch;
  import ooo_pkg::*;
  import rv_asm::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  br_t br;
  wake_t wake [4];
  logic q_empty, q_pop;
  fetch_slot_t q_head [2];
  logic [ROB_W:0] rob_free;
  logic [3:0] iq_free [4];
  logic [LDQ_W:0] ldq_free;
  logic [STQ_W:0] stq_free;
  rob_idx_t rob_idx [2];
  ldq_idx_t ldq_idx [2];
  stq_idx_t stq_idx [2];
  logic disp_en [2], disp_rdy1 [2], disp_rdy2 [2], ld_alloc [2], st_alloc [2];
  iss_t disp_iss [2];
  bmask_t disp_bmask;
  logic ckpt_valid; btag_t ckpt_tag;
  logic free_en [2]; preg_t free_preg [2];
  ghr_t rs_ghr; ras_ptr_t rs_ras_ptr; logic [31:0] rs_ras_top;
  logic stat_stall_branch;
  dispatch dut (.*);

  typedef struct { bit wr; preg_t old; bmask_t mask; bit br; int tag; } ent_t;

  int checks = 0, failures = 0;
  preg_t  map [32];
  preg_t  snap [4][32];
  bmask_t br_older [4];     // for each outstanding tag, the branches older than it
  bit     alloc [64];
  bit     rdy [64];
  bmask_t outstanding;
  ent_t   rob [$];
  bit     taken;
  int     n_commit;
  int     n_disp = 0, n_mis = 0, n_br = 0, n_pair = 0, n_block = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rand_instr(bit allow_br);
    logic [4:0] rd, r1, r2;
    int k;
    rd = 5'($urandom_range(1, 7)); r1 = 5'($urandom_range(0, 7)); r2 = 5'($urandom_range(0, 7));
    k = $urandom_range(0, 9);
    if (k < 4) return add(rd, r1, r2);
    if (k == 4) return muldiv(3'b000, rd, r1, r2);
    if (k == 5) return load(3'b010, rd, r1, 0);
    if (k == 6) return store(3'b010, r2, r1, 0);
    if (k >= 7 && allow_br) return branch(3'b000, r1, r2, 8);
    return add(rd, r1, r2);
  endfunction

  function automatic bit is_br(logic [31:0] i); return i[6:0] == 7'b1100011; endfunction
  function automatic bit is_ld(logic [31:0] i); return i[6:0] == 7'b0000011; endfunction
  function automatic bit is_st(logic [31:0] i); return i[6:0] == 7'b0100011; endfunction
  function automatic bit writes(logic [31:0] i); return !is_br(i) && !is_st(i) && i[11:7] != 0; endfunction
  function automatic fu_e fu_of(logic [31:0] i);
    if (is_br(i)) return FU_BRU;
    if (is_ld(i) || is_st(i)) return FU_MEM;
    if (i[25]) return FU_MDU;
    return FU_ALU;
  endfunction
  function automatic bit woken(preg_t p);
    foreach (wake[w]) if (wake[w].valid && wake[w].tag == p) return 1;
    return 0;
  endfunction

  // reference check and update at each clock edge
  always @(posedge clk) if (!rst) begin
    automatic preg_t m [32] = map;
    automatic int nfu [4] = '{0, 0, 0, 0};
    automatic int nld = 0, nst = 0, nrob = 0, npd = 0, nfree = 0;
    automatic bit has_br = 0, fire_exp;
    automatic bit mis = br.valid && br.mispredict;
    for (int p = 0; p < 64; p++) nfree += int'(!alloc[p]);
    for (int s = 0; s < 2; s++) if (!q_empty && q_head[s].valid) begin
      nfu[fu_of(q_head[s].instr)]++; nrob++;
      npd += int'(writes(q_head[s].instr)); nld += int'(is_ld(q_head[s].instr)); nst += int'(is_st(q_head[s].instr));
      has_br |= is_br(q_head[s].instr);
    end
    fire_exp = !q_empty && !mis && nrob <= int'(rob_free) && npd <= nfree && nld <= int'(ldq_free) && nst <= int'(stq_free) &&
               !(has_br && outstanding == 4'hf);
    for (int f = 0; f < 4; f++) if (nfu[f] > int'(iq_free[f])) fire_exp = 0;
    checks++;
    if (q_pop !== fire_exp) begin failures++; $display("%t: dispatch decision %0d, expected %0d", $time, q_pop, fire_exp); end
    if (!q_empty && !fire_exp) n_block++;
    taken = q_pop;
    if (q_pop) begin
      for (int s = 0; s < 2; s++) begin
        automatic logic [31:0] ins = q_head[s].instr;
        automatic logic [4:0] r1 = ins[19:15], r2 = ins[24:20], rd = ins[11:7];
        automatic iss_t d = disp_iss[s];
        checks++;
        if (disp_en[s] !== q_head[s].valid) begin failures++; $display("slot %0d enable", s); end
        if (!q_head[s].valid) continue;
        n_disp++;
        if (s == 1) n_pair++;
        checks += 6;
        if (d.ps1 !== m[r1]) begin failures++; $display("slot %0d ps1 %0d expected %0d", s, d.ps1, m[r1]); end
        if (!is_ld(ins) && d.ps2 !== m[r2]) begin failures++; $display("slot %0d ps2 %0d expected %0d", s, d.ps2, m[r2]); end
        if (disp_rdy1[s] !== (r1 == 0 || rdy[m[r1]] || woken(m[r1]))) begin failures++; $display("slot %0d rdy1", s); end
        if (!is_ld(ins) && disp_rdy2[s] !== (r2 == 0 || rdy[m[r2]] || woken(m[r2]))) begin failures++; $display("slot %0d rdy2", s); end
        if (ld_alloc[s] !== is_ld(ins) || st_alloc[s] !== is_st(ins)) begin failures++; $display("slot %0d lsq alloc", s); end
        if (bm_upd(d.bmask, br) !== bm_upd(outstanding, br)) begin failures++; $display("slot %0d mask %b expected %b", s, d.bmask, outstanding); end
        if (writes(ins)) begin
          checks++;
          if (alloc[d.pd] || d.pd == 0) begin failures++; $display("slot %0d destination p%0d already in use", s, d.pd); end
          rob.push_back('{wr: 1, old: m[rd], mask: outstanding, br: 0, tag: 0});
          alloc[d.pd] = 1; rdy[d.pd] = 0; m[rd] = d.pd;
        end else
          rob.push_back('{wr: 0, old: 0, mask: outstanding, br: is_br(ins), tag: int'(ckpt_tag)});
        if (is_br(ins)) begin
          checks++;
          n_br++;
          if (!ckpt_valid || outstanding[ckpt_tag] || d.btag !== ckpt_tag) begin failures++; $display("branch tag"); end
        end
      end
      if (ckpt_valid) begin
        snap[ckpt_tag] = m;
        br_older[ckpt_tag] = outstanding;
        outstanding[ckpt_tag] = 1;
      end
    end
    map = m;
    // wakeups take effect after this cycle's lookups
    for (int w = 0; w < 4; w++) if (wake[w].valid) rdy[wake[w].tag] = 1;
    // commits chosen for this cycle leave the model
    for (int s = 0; s < n_commit; s++) begin
      if (rob[0].wr) alloc[rob[0].old] = 0;
      void'(rob.pop_front());
    end
    // branch resolution
    if (br.valid) begin
      automatic int k = int'(br.tag);
      if (br.mispredict) begin
        automatic ent_t keep [$];
        automatic bmask_t gone = br.onehot;
        foreach (rob[i]) if (!rob[i].mask[k]) keep.push_back(rob[i]);
        rob = keep;
        for (int j = 0; j < 4; j++) if (outstanding[j] && br_older[j][k]) gone[j] = 1;
        outstanding &= ~gone;
        map = snap[k];
        for (int p = 0; p < 64; p++) alloc[p] = 0;
        foreach (map[a]) alloc[map[a]] = 1;
        foreach (rob[i]) if (rob[i].wr) alloc[rob[i].old] = 1;
      end
      foreach (rob[i]) rob[i].mask[k] = 0;
      for (int j = 0; j < 4; j++) br_older[j][k] = 0;
      outstanding[k] = 0;
    end
  end

  // stimulus
  initial begin
    automatic logic [31:0] b0, b1;
    automatic bit have = 0;
    n_commit = 0; taken = 0;
    br = '0; q_empty = 1; q_head[0] = '0; q_head[1] = '0;
    foreach (wake[w]) wake[w] = '0;
    free_en = '{0, 0}; free_preg = '{0, 0};
    for (int a = 0; a < 32; a++) begin map[a] = preg_t'(a); alloc[a] = 1; end
    for (int p = 0; p < 64; p++) rdy[p] = 1;
    outstanding = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // new bundle after the previous one was taken
      if (!have || taken) begin
        b0 = rand_instr(1);
        b1 = is_br(b0) ? 32'h0 : rand_instr(0);
        have = 1;
        q_head[0] = '0; q_head[1] = '0;
        q_head[0].valid = 1; q_head[0].pc = 32'(cyc * 8); q_head[0].instr = b0;
        q_head[1].valid = !is_br(b0) && $urandom_range(0, 3) != 0;
        q_head[1].pc = 32'(cyc * 8 + 4); q_head[1].instr = q_head[1].valid ? b1 : 32'h13;
      end
      q_empty = $urandom_range(0, 4) == 0;
      rob_free = (ROB_W+1)'($urandom_range(0, 5) == 0 ? $urandom_range(0, 1) : 8);
      for (int f = 0; f < 4; f++) iq_free[f] = 4'($urandom_range(0, 6) == 0 ? $urandom_range(0, 1) : 8);
      ldq_free = (LDQ_W+1)'($urandom_range(0, 6) == 0 ? $urandom_range(0, 1) : 8);
      stq_free = (STQ_W+1)'($urandom_range(0, 6) == 0 ? $urandom_range(0, 1) : 8);
      rob_idx[0] = rob_idx_t'(cyc); rob_idx[1] = rob_idx_t'(cyc + 1);
      ldq_idx[0] = ldq_idx_t'(cyc); ldq_idx[1] = ldq_idx_t'(cyc + 3);
      stq_idx[0] = stq_idx_t'(cyc); stq_idx[1] = stq_idx_t'(cyc + 5);
      // wake two random waiting registers
      foreach (wake[w]) wake[w] = '0;
      for (int w = 0; w < 2; w++) begin
        automatic int p = $urandom_range(1, 63);
        if (alloc[p] && !rdy[p] && $urandom_range(0, 1)) wake[w] = '{valid: 1, tag: preg_t'(p)};
      end
      // resolve one outstanding branch, in any order
      br = '0;
      if (outstanding != 0 && $urandom_range(0, 3) == 0) begin
        automatic int k;
        do k = $urandom_range(0, 3); while (!outstanding[k]);
        br.valid = 1; br.tag = btag_t'(k); br.onehot = bmask_t'(1 << k);
        br.mispredict = $urandom_range(0, 3) == 0;
        if (br.mispredict) n_mis++;
      end
      // commit up to two from the head when no older branch is unresolved
      // (a branch also waits for its own resolution); the freed registers go
      // to the free list in order on the two ports
      free_en = '{0, 0};
      n_commit = 0;
      for (int s = 0; s < 2; s++) begin
        if (rob.size() > s && rob[s].mask == 0 && !(rob[s].br && outstanding[rob[s].tag]) &&
            $urandom_range(0, 2) != 0) begin
          n_commit++;
          if (rob[s].wr) begin
            automatic int port = (free_en[0]) ? 1 : 0;
            free_en[port] = 1; free_preg[port] = rob[s].old;
          end
        end else break;
      end
    end
    checks++;
    if (n_br == 0 || n_mis == 0 || n_pair == 0 || n_block == 0) begin
      failures++; $display("coverage: branches %0d mispredicts %0d pairs %0d blocked %0d", n_br, n_mis, n_pair, n_block);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
