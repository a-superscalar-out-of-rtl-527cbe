// tb_rat: checks the register alias table against a reference model under
// random two-wide renames, branch checkpoints and restores.
module tb_rat;
  import ooo_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  areg_t rd_areg [4];
  preg_t rd_preg [4];
  logic  wr_en [2];
  areg_t wr_areg [2];
  preg_t wr_preg [2];
  logic  ckpt_valid, restore_valid;
  btag_t ckpt_tag, restore_tag;
  rat dut (.*);

  int checks = 0, failures = 0;
  preg_t m [32];
  preg_t mc [4][32];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m[i]) m[i] = preg_t'(i);
    foreach (mc[t, i]) mc[t][i] = preg_t'(i);
    wr_en = '{0, 0}; ckpt_valid = 0; restore_valid = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    // fill every checkpoint first so restores are defined
    for (int t = 0; t < 4; t++) begin
      @(negedge clk); ckpt_valid = 1; ckpt_tag = btag_t'(t);
      @(posedge clk); mc[t] = m;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int s = 0; s < 2; s++) begin
        wr_en[s] = $urandom_range(0, 1); wr_areg[s] = areg_t'($urandom()); wr_preg[s] = preg_t'($urandom());
      end
      for (int r = 0; r < 4; r++) rd_areg[r] = areg_t'($urandom());
      ckpt_valid = ($urandom_range(0, 3) == 0); ckpt_tag = btag_t'($urandom());
      restore_valid = ($urandom_range(0, 7) == 0); restore_tag = btag_t'($urandom());
      #1;
      for (int r = 0; r < 4; r++) begin
        checks++;
        if (rd_preg[r] !== m[rd_areg[r]]) begin failures++; $display("lookup mismatch"); end
      end
      @(posedge clk);
      if (restore_valid) m = mc[restore_tag];
      else begin
        for (int s = 0; s < 2; s++) if (wr_en[s] && wr_areg[s] != 0) m[wr_areg[s]] = wr_preg[s];
        if (ckpt_valid) mc[ckpt_tag] = m;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
