// tb_ready_table: random wakeups and destination allocations against a model
// of the ready bits; lookups must include wakeups of the same cycle.
module tb_ready_table;
  import ooo_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  wake_t wake [4];
  logic  clr_en [2];
  preg_t clr_preg [2];
  preg_t rd_preg [4];
  logic  rd_ready [4];
  ready_table #(.N_WAKE(4)) dut (.*);
  int checks = 0, failures = 0;
  bit m [64];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m[i]) m[i] = 1;
    foreach (wake[i]) wake[i] = '0;
    clr_en = '{0, 0};
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int w = 0; w < 4; w++) begin
        wake[w].valid = ($urandom_range(0, 3) == 0); wake[w].tag = preg_t'($urandom_range(1, 15));
      end
      for (int s = 0; s < 2; s++) begin
        clr_en[s] = $urandom_range(0, 1); clr_preg[s] = preg_t'($urandom_range(1, 15) + 16 * s);
      end
      for (int r = 0; r < 4; r++) rd_preg[r] = preg_t'($urandom_range(0, 31));
      #1;
      for (int r = 0; r < 4; r++) begin
        automatic bit exp = m[rd_preg[r]] || rd_preg[r] == 0;
        for (int w = 0; w < 4; w++) if (wake[w].valid && wake[w].tag == rd_preg[r]) exp = 1;
        checks++;
        if (rd_ready[r] !== exp) begin failures++; $display("ready mismatch p%0d", rd_preg[r]); end
      end
      @(posedge clk);
      for (int w = 0; w < 4; w++) if (wake[w].valid) m[wake[w].tag] = 1;
      for (int s = 0; s < 2; s++) if (clr_en[s]) m[clr_preg[s]] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
