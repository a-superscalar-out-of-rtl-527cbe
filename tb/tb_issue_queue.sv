// tb_issue_queue: dispatches instructions with random source readiness,
// wakes their sources at random through the wakeup ports, and resolves
// branches. Checks that only instructions with both sources ready issue,
// that every instruction issues exactly once unless squashed, that squashed
// ones never issue, that the oldest-slot select issues whenever something is
// ready, and that the free count is right.
module tb_issue_queue;
  import ooo_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic wr_en [2], wr_rdy1 [2], wr_rdy2 [2];
  iss_t wr_data [2];
  logic [3:0] free_cnt;
  wake_t wake [4];
  br_t br;
  logic fu_ready, iss_valid;
  iss_t iss_data;
  issue_queue #(.DEPTH(8), .N_WAKE(4)) dut (.*);

  int checks = 0, failures = 0;
  // model entries keyed by rob index (unique id)
  bit    m_valid [32];
  bit    m_r1 [32], m_r2 [32];
  preg_t m_p1 [32], m_p2 [32];
  bmask_t m_bm [32];
  int id = 0, n_issued = 0, n_killed = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int live();
    int c = 0;
    foreach (m_valid[i]) c += m_valid[i];
    return c;
  endfunction

  initial begin
    foreach (wake[i]) wake[i] = '0;
    wr_en = '{0, 0}; br = '0; fu_ready = 1;
    foreach (m_valid[i]) m_valid[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      br = '0;
      if ($urandom_range(0, 9) == 0) begin
        br.valid = 1; br.tag = btag_t'($urandom()); br.onehot = bmask_t'(1) << br.tag;
        br.mispredict = $urandom_range(0, 1);
      end
      fu_ready = ($urandom_range(0, 3) != 0);
      for (int w = 0; w < 4; w++) begin
        wake[w].valid = $urandom_range(0, 1); wake[w].tag = preg_t'($urandom_range(1, 20));
      end
      for (int s = 0; s < 2; s++) begin
        wr_en[s] = (live() + s < 6) && $urandom_range(0, 1) && !m_valid[(id + s) % 32];
        wr_data[s] = '0;
        wr_data[s].rob = rob_idx_t'(id + s);
        wr_data[s].ps1 = preg_t'($urandom_range(1, 20));
        wr_data[s].ps2 = preg_t'($urandom_range(1, 20));
        wr_data[s].bmask = bmask_t'($urandom());
        wr_rdy1[s] = $urandom_range(0, 1);
        wr_rdy2[s] = $urandom_range(0, 1);
      end
      if (!wr_en[0]) wr_en[1] = 0;
      #1;
      checks++;
      if (free_cnt !== 4'(8 - live())) begin failures++; $display("free count %0d vs %0d", free_cnt, 8 - live()); end
      begin
        automatic bit any_ready = 0;
        foreach (m_valid[i]) if (m_valid[i] && m_r1[i] && m_r2[i] && !bm_killed(m_bm[i], br)) any_ready = 1;
        if (iss_valid) begin
          automatic int r = iss_data.rob;
          checks++;
          if (!m_valid[r] || !m_r1[r] || !m_r2[r] || bm_killed(m_bm[r], br)) begin
            failures++; $display("bad issue of %0d", r);
          end
        end else if (fu_ready && any_ready) begin
          // the lowest ready slot may be one being squashed; only flag when none is squashed
          if (!(br.valid && br.mispredict)) begin checks++; failures++; $display("ready entry not issued"); end
        end
        if (iss_valid && !fu_ready) begin failures++; $display("issued while unit busy"); end
      end
      @(posedge clk);
      if (iss_valid) begin m_valid[iss_data.rob] = 0; n_issued++; end
      foreach (m_valid[i]) if (m_valid[i]) begin
        for (int w = 0; w < 4; w++) if (wake[w].valid) begin
          if (wake[w].tag == m_p1[i]) m_r1[i] = 1;
          if (wake[w].tag == m_p2[i]) m_r2[i] = 1;
        end
        if (bm_killed(m_bm[i], br)) begin m_valid[i] = 0; n_killed++; end
        m_bm[i] = bm_upd(m_bm[i], br);
      end
      if (!(br.valid && br.mispredict))
        for (int s = 0; s < 2; s++) if (wr_en[s]) begin
          automatic int r = wr_data[s].rob;
          m_valid[r] = 1; m_r1[r] = wr_rdy1[s]; m_r2[r] = wr_rdy2[s];
          m_p1[r] = wr_data[s].ps1; m_p2[r] = wr_data[s].ps2; m_bm[r] = bm_upd(wr_data[s].bmask, br);
          id++;
        end
    end
    checks++;
    if (n_issued < 100 || n_killed == 0) begin failures++; $display("issued %0d killed %0d", n_issued, n_killed); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
