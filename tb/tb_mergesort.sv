// tb_mergesort: workload test for the whole core at its default sizes. A
// bottom-up merge sort of 64 pseudo-random words (generated by the program
// itself with a multiply-add recurrence) runs from DRAM: six passes that merge
// runs of width 1, 2, 4, ... between two buffers, which gives the core
// data-dependent branches that GShare cannot learn, tight load/store loops,
// loop-exit mispredictions and loads that follow stores to the same words.
// Every retired instruction is compared with the reference instruction-set
// simulator (PC, destination, value); at the end the reference memory must
// hold the 64 words in ascending order with the same sum as the input. The
// cycle count and IPC are printed; the number of mispredictions and dual
// commits must be non-zero.
module tb_mergesort;
  import rv_asm::*;
  import rv_ref::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic [31:0] dram_addr, dram_raddr;
  logic        dram_read, dram_write, dram_ready, dram_rvalid;
  logic [63:0] dram_wdata, dram_rdata;
  logic        commit_valid [2];
  logic [31:0] commit_pc [2];
  logic [4:0]  commit_rd [2];
  logic        commit_we [2];
  logic [31:0] commit_data [2];
  logic ev_branch, ev_mispredict, ev_dual_dispatch, ev_dual_commit, ev_fwd_full, ev_fwd_partial;
  logic ev_icache_miss, ev_prefetch_hit, ev_dcache_miss, ev_writeback, ev_branch_stall, ev_early_wake;

  ooo_cpu dut (.*);
  dram_model #(.WORDS(8192), .LATENCY(12)) u_dram (.*);

  localparam int N = 64;
  int checks = 0, failures = 0, cycles = 0, retired = 0;
  int n_mispredict = 0, n_branch = 0, n_dual_commit = 0;
  logic [31:0] prog [$];
  int halt_pc;
  rv_iss iss;
  logic done = 1'b0;

  // label fix-ups for forward branches
  typedef struct { int at; logic [2:0] f3; logic [4:0] rs1, rs2; string lbl; } fix_t;
  fix_t fixes [$];
  int   labels [string];

  function automatic int here();
    return prog.size() * 4;
  endfunction
  function automatic void emit(logic [31:0] w);
    prog.push_back(w);
  endfunction
  function automatic void label(string l);
    labels[l] = here();
  endfunction
  function automatic void br(logic [2:0] f3, logic [4:0] rs1, logic [4:0] rs2, string l);
    fixes.push_back('{at: prog.size(), f3: f3, rs1: rs1, rs2: rs2, lbl: l});
    emit(32'h13);
  endfunction

  localparam logic [2:0] BEQ = 3'b000, BNE = 3'b001, BLT = 3'b100, BGE = 3'b101;

  // x10 source buffer, x11 destination buffer, x12 = N, x13 = run width
  task automatic build_program();
    emit(lui(10, 4));                 // 0x4000
    emit(lui(11, 5));                 // 0x5000
    emit(addi(12, 0, N));
    // fill: x6 = x6 * 13 + 7, keep 11 bits
    emit(addi(5, 0, 0));
    emit(addi(6, 0, 99));
    emit(addi(7, 0, 13));
    label("fill");
    emit(muldiv(3'b000, 6, 6, 7));
    emit(addi(6, 6, 7));
    emit(andi(8, 6, 2047));
    emit(slli(20, 5, 2));
    emit(add(20, 20, 10));
    emit(store(3'b010, 8, 20, 0));
    emit(addi(5, 5, 1));
    br(BLT, 5, 12, "fill");
    emit(addi(13, 0, 1));
    label("pass");
    emit(add(23, 13, 13));            // 2w
    emit(addi(14, 0, 0));             // lo
    label("run");
    emit(add(15, 14, 13));            // mid
    emit(add(16, 14, 23));            // hi
    emit(add(17, 14, 0));             // i
    emit(add(18, 15, 0));             // j
    emit(add(19, 14, 0));             // k
    label("merge");
    br(BGE, 17, 15, "tail_j");
    br(BGE, 18, 16, "tail_i");
    emit(slli(20, 17, 2)); emit(add(20, 20, 10)); emit(load(3'b010, 21, 20, 0));
    emit(slli(24, 18, 2)); emit(add(24, 24, 10)); emit(load(3'b010, 22, 24, 0));
    emit(slli(25, 19, 2)); emit(add(25, 25, 11));
    br(BLT, 22, 21, "take_j");
    emit(store(3'b010, 21, 25, 0));
    emit(addi(17, 17, 1));
    emit(addi(19, 19, 1));
    emit(jal(0, 0)); fixes.push_back('{at: prog.size() - 1, f3: 3'b111, rs1: 0, rs2: 0, lbl: "merge"});
    label("take_j");
    emit(store(3'b010, 22, 25, 0));
    emit(addi(18, 18, 1));
    emit(addi(19, 19, 1));
    emit(jal(0, 0)); fixes.push_back('{at: prog.size() - 1, f3: 3'b111, rs1: 0, rs2: 0, lbl: "merge"});
    label("tail_i");                  // copy the rest of the left run
    br(BGE, 17, 15, "run_done");
    emit(slli(20, 17, 2)); emit(add(20, 20, 10)); emit(load(3'b010, 21, 20, 0));
    emit(slli(25, 19, 2)); emit(add(25, 25, 11)); emit(store(3'b010, 21, 25, 0));
    emit(addi(17, 17, 1)); emit(addi(19, 19, 1));
    emit(jal(0, 0)); fixes.push_back('{at: prog.size() - 1, f3: 3'b111, rs1: 0, rs2: 0, lbl: "tail_i"});
    label("tail_j");                  // copy the rest of the right run
    br(BGE, 18, 16, "run_done");
    emit(slli(24, 18, 2)); emit(add(24, 24, 10)); emit(load(3'b010, 22, 24, 0));
    emit(slli(25, 19, 2)); emit(add(25, 25, 11)); emit(store(3'b010, 22, 25, 0));
    emit(addi(18, 18, 1)); emit(addi(19, 19, 1));
    emit(jal(0, 0)); fixes.push_back('{at: prog.size() - 1, f3: 3'b111, rs1: 0, rs2: 0, lbl: "tail_j"});
    label("run_done");
    emit(add(14, 14, 23));
    br(BLT, 14, 12, "run");
    // swap buffers, double the width
    emit(add(26, 10, 0)); emit(add(10, 11, 0)); emit(add(11, 26, 0));
    emit(add(13, 23, 0));
    br(BLT, 13, 12, "pass");
    halt_pc = here();
    emit(jal(0, 0));
    foreach (fixes[f]) begin
      int off = labels[fixes[f].lbl] - fixes[f].at * 4;
      prog[fixes[f].at] = (fixes[f].f3 == 3'b111) ? jal(0, off)
                                                   : branch(fixes[f].f3, fixes[f].rs1, fixes[f].rs2, off);
    end
  endtask

  always @(posedge clk) begin
    if (!rst && !done) begin
      cycles <= cycles + 1;
      for (int s = 0; s < 2; s++) begin
        if (commit_valid[s] && !done) begin
          logic [31:0] epc, eval;
          logic [4:0]  erd;
          logic        ewe;
          if (commit_pc[s] == 32'(halt_pc)) begin
            done = 1'b1;
          end else begin
            ewe = iss.step(epc, erd, eval);
            retired++;
            checks++;
            if (commit_pc[s] != epc) begin
              failures++;
              if (failures < 10) $display("pc mismatch: core %h ref %h", commit_pc[s], epc);
            end else if (ewe) begin
              checks++;
              if (!commit_we[s] || commit_rd[s] != erd || commit_data[s] != eval) begin
                failures++;
                if (failures < 10)
                  $display("value mismatch at %h: core x%0d=%h ref x%0d=%h", epc,
                           commit_rd[s], commit_data[s], erd, eval);
              end
            end
          end
        end
      end
      n_branch      += int'(ev_branch);
      n_mispredict  += int'(ev_mispredict);
      n_dual_commit += int'(ev_dual_commit);
    end
  end

  initial begin
    longint sum_in, sum_out;
    iss = new(8192 * 2);
    build_program();
    foreach (u_dram.mem[i]) u_dram.mem[i] = '0;
    foreach (prog[i]) begin
      iss.mem[i] = prog[i];
      if (i % 2 == 0) u_dram.mem[i / 2][31:0] = prog[i];
      else            u_dram.mem[i / 2][63:32] = prog[i];
    end
    repeat (5) @(posedge clk);
    rst <= 1'b0;
    wait (done);
    @(posedge clk);
    $display("merge sort of %0d words: %0d instructions in %0d cycles (IPC %0.3f), %0d branches, %0d mispredicted",
             N, retired, cycles, real'(retired) / real'(cycles), n_branch, n_mispredict);
    // input recomputed from the same recurrence; output is the sorted buffer
    sum_in = 0; sum_out = 0;
    begin
      logic [31:0] v = 99;
      for (int i = 0; i < N; i++) begin v = v * 13 + 7; sum_in += v & 2047; end
    end
    for (int i = 0; i < N; i++) begin
      sum_out += iss.mem[4096 + i];
      checks++;
      if (i > 0 && iss.mem[4096 + i] < iss.mem[4096 + i - 1]) begin failures++; $display("not sorted at %0d", i); end
    end
    checks += 3;
    if (sum_in != sum_out) begin failures++; $display("sorted data is not a permutation of the input"); end
    if (n_mispredict == 0) begin failures++; $display("no mispredictions"); end
    if (n_dual_commit == 0) begin failures++; $display("no two-wide commits"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: program did not finish (retired %0d)", retired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
