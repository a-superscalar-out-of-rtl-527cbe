// tb_free_list: runs the free list as the core would use it. A model keeps
// the set of registers that are free; the test allocates, frees registers it
// holds, checkpoints and restores, and checks that the count matches, that
// every allocated register was free and that a restore returns exactly the
// registers allocated after the checkpoint.
module tb_free_list;
  import ooo_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic  alloc_en [2];
  preg_t alloc_preg [2];
  logic [PREG_W-1:0] count;
  logic  free_en [2];
  preg_t free_preg [2];
  logic  ckpt_valid, restore_valid;
  btag_t ckpt_tag, restore_tag;
  free_list dut (.*);

  int checks = 0, failures = 0;
  bit   is_free [64];
  preg_t held [$];            // committed-to registers the test may free
  preg_t spec [$];            // allocated since the checkpoint
  bit    have_ckpt;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // once the state has diverged the later checks say nothing new; stop early
  always @(posedge clk)
    if (failures >= 5) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end

  function automatic int nfree();
    int c = 0;
    foreach (is_free[i]) c += is_free[i];
    return c;
  endfunction

  initial begin
    foreach (is_free[i]) is_free[i] = (i >= 32);
    alloc_en = '{0, 0}; free_en = '{0, 0}; ckpt_valid = 0; restore_valid = 0;
    ckpt_tag = 0; restore_tag = 0; have_ckpt = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      restore_valid = have_ckpt && ($urandom_range(0, 15) == 0);
      for (int s = 0; s < 2; s++) alloc_en[s] = !restore_valid && $urandom_range(0, 1) && nfree() > 2;
      ckpt_valid = !restore_valid && !have_ckpt && ($urandom_range(0, 7) == 0);
      ckpt_tag = 2; restore_tag = 2;
      for (int s = 0; s < 2; s++) begin
        free_en[s] = held.size() > s + 1 && $urandom_range(0, 2) == 0 && (s == 0 || free_en[0]);
        if (free_en[s]) free_preg[s] = held[s];
      end
      #1;
      checks++;
      if (count !== PREG_W'(nfree())) begin failures++; $display("count %0d vs %0d", count, nfree()); end
      for (int s = 0; s < 2; s++)
        if (alloc_en[s]) begin
          checks++;
          if (!is_free[alloc_preg[s]]) begin failures++; $display("allocated a busy register %0d", alloc_preg[s]); end
        end
      @(posedge clk);
      for (int s = 0; s < 2; s++) if (free_en[s]) begin is_free[held[0]] = 1; void'(held.pop_front()); end
      if (restore_valid) begin
        foreach (spec[i]) is_free[spec[i]] = 1;
        spec.delete();
        have_ckpt = 0;
      end else begin
        for (int s = 0; s < 2; s++) if (alloc_en[s]) begin
          is_free[alloc_preg[s]] = 0;
          if (have_ckpt) spec.push_back(alloc_preg[s]);
          else held.push_back(alloc_preg[s]);
        end
        if (ckpt_valid) have_ckpt = 1;
        // a checkpoint taken now covers only later allocations
      end
      // occasionally the speculative registers become non-speculative
      if (have_ckpt && !restore_valid && $urandom_range(0, 31) == 0) begin
        foreach (spec[i]) held.push_back(spec[i]);
        spec.delete();
        have_ckpt = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
