// tb_gshare: checks the GShare predictor against a reference model: random
// training of the pattern history table, speculative history shifts and
// history restores, with predictions compared every cycle.
module tb_gshare;
  import ooo_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [31:0] pred_pc;
  logic pred_taken, spec_valid, spec_taken, restore_valid, update_valid, update_taken;
  ghr_t ghr_out, restore_ghr, update_idx;
  gshare dut (.*);

  int checks = 0, failures = 0;
  int m_cnt [512];
  bit m_val [512];
  ghr_t m_ghr;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    spec_valid = 0; restore_valid = 0; update_valid = 0; pred_pc = 0;
    spec_taken = 0; update_taken = 0; restore_ghr = 0; update_idx = 0;
    m_ghr = 0;
    foreach (m_val[i]) m_val[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      pred_pc       = $urandom() & 32'hFFC;
      spec_valid    = $urandom_range(0, 1);
      spec_taken    = $urandom_range(0, 1);
      restore_valid = ($urandom_range(0, 9) == 0);
      restore_ghr   = ghr_t'($urandom());
      update_valid  = $urandom_range(0, 1);
      update_idx    = ghr_t'($urandom_range(0, 15));   // few entries so counters saturate
      update_taken  = ($urandom_range(0, 3) != 0);
      #1;
      begin
        automatic ghr_t idx = pred_pc[10:2] ^ m_ghr;
        automatic bit exp = m_val[idx] && m_cnt[idx] >= 2;
        checks += 2;
        if (pred_taken !== exp) begin failures++; $display("pred mismatch idx %0d", idx); end
        if (ghr_out !== m_ghr) begin failures++; $display("ghr mismatch"); end
      end
      @(posedge clk);
      if (restore_valid) m_ghr = restore_ghr;
      else if (spec_valid) m_ghr = {m_ghr[7:0], spec_taken};
      if (update_valid) begin
        if (!m_val[update_idx]) m_cnt[update_idx] = update_taken ? 2 : 1;
        else if (update_taken && m_cnt[update_idx] < 3) m_cnt[update_idx]++;
        else if (!update_taken && m_cnt[update_idx] > 0) m_cnt[update_idx]--;
        m_val[update_idx] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
