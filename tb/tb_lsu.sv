// tb_lsu: a random program of 600 byte/half/word loads and stores over a
// 16-word region is dispatched in order into the load/store unit (one or two
// per cycle, two in a cycle exercising the same-bundle store case), issued
// in random order, and retired in order by a small model of the reorder
// buffer that asks for store commits. A one-request-at-a-time memory model
// with random stalls stands in for the data cache. Every load result must
// equal the value given by executing the program in order; each store must
// report done with its own reorder-buffer index; byte forwarding (full and
// partial) must have happened.
module tb_lsu;
  import ooo_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  br_t br;
  logic ld_alloc_en [2], st_alloc_en [2];
  bmask_t alloc_bmask;
  ldq_idx_t ld_alloc_idx [2];
  stq_idx_t st_alloc_idx [2];
  logic [LDQ_W:0] ldq_free_cnt;
  logic [STQ_W:0] stq_free_cnt;
  logic ckpt_valid; btag_t ckpt_tag;
  exe_t in;
  logic st_done; rob_idx_t st_done_idx;
  logic store_commit_req, store_commit_ack;
  logic dc_req_valid, dc_req_ready, dc_req_we, dc_resp_valid;
  logic [31:0] dc_req_addr, dc_req_wdata, dc_resp_rdata;
  logic [3:0] dc_req_wmask;
  logic [LDQ_W:0] dc_req_id, dc_resp_id;
  cdb_t out;
  logic stat_fwd_full, stat_fwd_partial;
  lsu dut (.*);

  localparam int N = 600;
  int checks = 0, failures = 0;
  bit          is_ld [N];
  logic [2:0]  f3 [N];
  logic [31:0] base [N], imm [N], sdata [N], expv [N];
  ldq_idx_t    lq [N];
  stq_idx_t    sq [N];
  bit          dispatched [N], issued [N], done [N];
  int          n_disp = 0, head = 0, n_full = 0, n_part = 0;
  logic [7:0]  ref_b [64];
  logic [31:0] dmem [16];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("timeout: head %0d dispatched %0d done %0d issued %0d", head, n_disp, done[head], issued[head]);
    $display("is_ld %0d lq %0d sq %0d f3 %0d", is_ld[head], lq[head], sq[head], f3[head]);
    for (int i = 0; i < 8; i++) $display("ldq %0d: v %0d av %0d sent %0d older %b | stq v %0d av %0d", i, dut.ldq[i].valid, dut.ldq[i].addr_valid, dut.ldq[i].sent, dut.ldq[i].older, dut.stq[i].valid, dut.stq[i].addr_valid);
    $display("st_head %0d st_tail %0d busy %0d", dut.st_head, dut.st_tail, dut.busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program and expected values
  initial begin
    for (int b = 0; b < 64; b++) ref_b[b] = 8'(b * 7 + 3);
    for (int w = 0; w < 16; w++) dmem[w] = {ref_b[4*w+3], ref_b[4*w+2], ref_b[4*w+1], ref_b[4*w]};
    for (int n = 0; n < N; n++) begin
      int sz, a;
      is_ld[n] = $urandom_range(0, 1);
      sz = $urandom_range(0, 2);
      a = $urandom_range(0, 15) * 4 + ((sz == 0) ? $urandom_range(0, 3) : (sz == 1) ? 2 * $urandom_range(0, 1) : 0);
      f3[n] = is_ld[n] ? 3'(sz + (sz < 2 && $urandom_range(0, 1) ? 4 : 0)) : 3'(sz);
      imm[n] = 32'($urandom_range(0, 8)) * 4 - 16;
      base[n] = 32'h1000 + 32'(a) - imm[n];
      sdata[n] = $urandom();
      if (is_ld[n]) begin
        logic [31:0] v;
        v = {ref_b[(a & ~3) + 3], ref_b[(a & ~3) + 2], ref_b[(a & ~3) + 1], ref_b[a & ~3]} >> (8 * (a % 4));
        case (f3[n])
          3'd0: v = {{24{v[7]}}, v[7:0]};
          3'd1: v = {{16{v[15]}}, v[15:0]};
          3'd4: v = {24'd0, v[7:0]};
          3'd5: v = {16'd0, v[15:0]};
          default: ;
        endcase
        expv[n] = v;
      end else
        for (int b = 0; b < (1 << sz); b++) ref_b[a + b] = sdata[n][8*b +: 8];
    end
  end

  // data cache model: one request at a time, answer after 1-3 cycles
  bit m_busy; int m_t; logic m_we; logic [31:0] m_addr; logic [LDQ_W:0] m_id;
  always @(posedge clk) begin
    dc_resp_valid <= 1'b0;
    if (m_busy) begin
      if (m_t == 0) begin
        m_busy = 0;
        dc_resp_valid <= 1'b1;
        dc_resp_id <= m_id;
        dc_resp_rdata <= dmem[m_addr[5:2]];
      end else m_t--;
    end else if (dc_req_valid && dc_req_ready) begin
      m_busy = 1; m_t = $urandom_range(0, 2); m_addr = dc_req_addr; m_id = dc_req_id; m_we = dc_req_we;
      checks++;
      if (dc_req_addr[31:6] != 26'(32'h1000 >> 6)) begin failures++; $display("cache address %h", dc_req_addr); end
      if (dc_req_we)
        for (int b = 0; b < 4; b++) if (dc_req_wmask[b]) dmem[dc_req_addr[5:2]][8*b +: 8] = dc_req_wdata[8*b +: 8];
    end
  end
  always @(negedge clk) dc_req_ready = !m_busy && ($urandom_range(0, 3) != 0);

  // results
  always @(posedge clk) if (!rst) begin
    n_full += int'(stat_fwd_full);
    n_part += int'(stat_fwd_partial);
    if (out.valid) begin
      automatic int n = -1;
      for (int k = head; k < n_disp; k++) if (is_ld[k] && rob_idx_t'(k) == out.rob && issued[k] && !done[k]) begin n = k; break; end
      checks++;
      if (n < 0) begin failures++; $display("unexpected load result rob %0d", out.rob); end
      else begin
        done[n] = 1;
        if (out.data !== expv[n] || out.pd !== preg_t'(n)) begin
          failures++; $display("load %0d f3 %0d: got %h expected %h", n, f3[n], out.data, expv[n]);
        end
      end
    end
    if (st_done) begin
      automatic int n = -1;
      for (int k = head; k < n_disp; k++) if (!is_ld[k] && rob_idx_t'(k) == st_done_idx && !done[k]) begin n = k; break; end
      checks++;
      if (n < 0 || !issued[n]) begin failures++; $display("unexpected store done %0d", st_done_idx); end
      else done[n] = 1;
    end
  end

  initial begin
    br = '0; alloc_bmask = '0; ckpt_valid = 0; ckpt_tag = '0; in = '0;
    ld_alloc_en = '{0, 0}; st_alloc_en = '{0, 0}; store_commit_req = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    while (head < N) begin
      int want;
      @(negedge clk);
      // retire (commit request is evaluated against the state of this cycle)
      store_commit_req = 0;
      if (head < n_disp && done[head]) begin
        if (is_ld[head]) head++;
        else store_commit_req = 1;
      end
      // dispatch up to two, stopping at the queue limits and a 24-entry window
      ld_alloc_en = '{0, 0}; st_alloc_en = '{0, 0};
      want = $urandom_range(0, 2);
      begin
        automatic int nl = 0, ns = 0;
        for (int s = 0; s < want; s++) begin
          automatic int n = n_disp;
          if (n >= N || n - head >= 24) break;
          if (is_ld[n] ? (nl + 1 > int'(ldq_free_cnt)) : (ns + 1 > int'(stq_free_cnt))) break;
          if (is_ld[n]) begin ld_alloc_en[s] = 1; nl++; end else begin st_alloc_en[s] = 1; ns++; end
          n_disp++;
        end
        #1;
        for (int s = 0, n = n_disp - int'(ld_alloc_en[0] | st_alloc_en[0]) - int'(ld_alloc_en[1] | st_alloc_en[1]); s < 2; s++)
          if (ld_alloc_en[s] || st_alloc_en[s]) begin
            lq[n] = ld_alloc_idx[s]; sq[n] = st_alloc_idx[s]; dispatched[n] = 1; n++;
          end
      end
      // issue one random dispatched operation
      in = '0;
      if ($urandom_range(0, 3) != 0) begin
        automatic int cand[$];
        for (int k = head; k < n_disp; k++) if (!issued[k]) cand.push_back(k);
        if (cand.size() > 0) begin
          automatic int n = cand[$urandom_range(0, cand.size() - 1)];
          issued[n] = 1;
          in.valid = 1;
          in.i.uop.valid = 1;
          in.i.uop.fu = FU_MEM;
          in.i.uop.is_load = is_ld[n];
          in.i.uop.is_store = !is_ld[n];
          in.i.uop.writes_rd = is_ld[n];
          in.i.uop.op = {1'b0, f3[n]};
          in.i.uop.imm = imm[n];
          in.i.pd = preg_t'(n);
          in.i.rob = rob_idx_t'(n);
          in.i.ldq = lq[n];
          in.i.stq = sq[n];
          in.a = base[n];
          in.b = sdata[n];
        end
      end
      @(posedge clk);
      if (store_commit_req && store_commit_ack) head++;
    end
    @(negedge clk);
    store_commit_req = 0;
    repeat (5) @(posedge clk);
    for (int w = 0; w < 16; w++) begin
      checks++;
      if (dmem[w] !== {ref_b[4*w+3], ref_b[4*w+2], ref_b[4*w+1], ref_b[4*w]}) begin failures++; $display("final memory word %0d", w); end
    end
    checks++;
    if (n_full == 0 || n_part == 0) begin failures++; $display("forwarding full %0d partial %0d", n_full, n_part); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
