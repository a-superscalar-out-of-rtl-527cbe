// tb_br_mask_alloc: allocates branch tags in program order and resolves them
// at random, correctly or as mispredictions. A model tracks the live branches
// in age order; on a misprediction the branch and all younger ones are freed.
// Checks the busy mask, the lowest free tag and the checkpointed history/RAS
// state read back for the resolving branch.
module tb_br_mask_alloc;
  import ooo_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  br_t br;
  bmask_t cur_mask;
  logic free_avail, alloc;
  btag_t free_tag;
  ghr_t alloc_ghr, rs_ghr;
  ras_ptr_t alloc_ras_ptr, rs_ras_ptr;
  logic [31:0] alloc_ras_top, rs_ras_top;
  br_mask_alloc dut (.*);
  int checks = 0, failures = 0;
  int live [$];            // tags, oldest first
  ghr_t mg [4];
  logic [31:0] mt [4];
  int n_kill = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bmask_t mask_of();
    bmask_t m = '0;
    foreach (live[i]) m[live[i]] = 1'b1;
    return m;
  endfunction

  initial begin
    br = '0; alloc = 0; alloc_ghr = 0; alloc_ras_ptr = 0; alloc_ras_top = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      int k;
      @(negedge clk);
      br = '0;
      if (live.size() > 0 && $urandom_range(0, 2) == 0) begin
        k = $urandom_range(0, live.size() - 1);
        br.valid = 1; br.tag = btag_t'(live[k]); br.onehot = bmask_t'(1) << live[k];
        br.mispredict = ($urandom_range(0, 3) == 0);
      end
      alloc = $urandom_range(0, 1) && !(br.valid && br.mispredict);
      alloc_ghr = ghr_t'($urandom()); alloc_ras_top = $urandom(); alloc_ras_ptr = ras_ptr_t'($urandom());
      #1;
      checks += 2;
      if (cur_mask !== (mask_of() & ~(br.valid ? br.onehot : '0))) begin failures++; $display("mask mismatch %b vs %b n=%0d", cur_mask, mask_of(), n); end
      begin
        automatic bit exp_avail = live.size() < 4;
        automatic int exp_tag = 0;
        for (int t = 3; t >= 0; t--) if (!mask_of()[t]) exp_tag = t;
        if (free_avail !== exp_avail || (exp_avail && free_tag !== btag_t'(exp_tag))) begin
          failures++; $display("free tag mismatch");
        end
      end
      if (br.valid) begin
        checks++;
        if (rs_ghr !== mg[br.tag] || rs_ras_top !== mt[br.tag]) begin failures++; $display("checkpoint mismatch"); end
      end
      @(posedge clk);
      if (br.valid) begin
        if (br.mispredict) begin
          n_kill++;
          live = live[0:k-1];
          if (k == 0) live.delete();
        end else live.delete(k);
      end
      if (alloc && free_avail) begin
        mg[free_tag] = alloc_ghr; mt[free_tag] = alloc_ras_top;
        live.push_back(int'(free_tag));
      end
    end
    checks++;
    if (n_kill == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
