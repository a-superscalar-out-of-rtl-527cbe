// tb_rrat: checks that the retirement RAT frees exactly the register an
// architectural register was committed to before, including two commits of
// the same register in one cycle.
module tb_rrat;
  import ooo_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic  commit_en [2];
  areg_t commit_areg [2];
  preg_t commit_preg [2];
  logic  free_en [2];
  preg_t free_preg [2];
  rrat dut (.*);

  int checks = 0, failures = 0;
  preg_t m [32];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m[i]) m[i] = preg_t'(i);
    commit_en = '{0, 0};
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int s = 0; s < 2; s++) begin
        commit_en[s] = $urandom_range(0, 1);
        commit_areg[s] = areg_t'($urandom_range(0, 7));
        commit_preg[s] = preg_t'($urandom());
      end
      #1;
      for (int s = 0; s < 2; s++) begin
        automatic preg_t exp = m[commit_areg[s]];
        if (s == 1 && commit_en[0] && commit_areg[0] == commit_areg[1]) exp = commit_preg[0];
        checks++;
        if (free_en[s] !== (commit_en[s] && commit_areg[s] != 0) || (free_en[s] && free_preg[s] !== exp)) begin
          failures++; $display("free mismatch slot %0d", s);
        end
      end
      @(posedge clk);
      for (int s = 0; s < 2; s++) if (commit_en[s] && commit_areg[s] != 0) m[commit_areg[s]] = commit_preg[s];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
