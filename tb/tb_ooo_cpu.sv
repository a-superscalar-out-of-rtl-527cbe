// tb_ooo_cpu: end-to-end test of the out-of-order core at its default sizes.
// A test program is assembled in SystemVerilog, placed in the DRAM model and
// in a reference instruction-set simulator. Every retired instruction is
// compared with the reference (PC, destination register and value). The
// program exercises dependent ALU chains, multiply/divide, store-to-load
// forwarding (full and partial), data-cache conflict misses with dirty
// writebacks, calls and returns through the RAS, a far call through an
// auipc/jalr pair that fetch fuses (watched inside fetch, since the fusion is
// visible only as a correct prediction), an indirect jalr, loops whose
// exits mispredict, a data-dependent branch pattern for the GShare history,
// and more unresolved branches than there are branch mask bits. Each of those
// mechanisms is counted and must have happened at least once.
module tb_ooo_cpu;
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

  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int retired = 0;
  logic [31:0] prog [$];
  int halt_pc;
  rv_iss iss;
  logic done = 1'b0;

  // counters for the mechanisms
  int n_branch, n_mispredict, n_dual_dispatch, n_dual_commit, n_fwd_full, n_fwd_partial;
  int n_icache_miss, n_prefetch_hit, n_dcache_miss, n_writeback, n_branch_stall, n_early_wake;
  int n_fused;

  function automatic int here();
    return prog.size() * 4;
  endfunction
  function automatic void emit(logic [31:0] w);
    prog.push_back(w);
  endfunction

  task automatic build_program();
    int loop1, loop2, loop3, loop4, func, func2, fix_call, fix_far, fix_skip, skip, ind, fix;
    // x10 = 0x4000 data base, x11 = loop bound
    emit(lui(10, 4));
    emit(addi(11, 0, 20));
    emit(addi(12, 0, 0));
    emit(addi(13, 0, 1));
    loop1 = here();
    emit(add(12, 12, 13));
    emit(muldiv(3'b000, 14, 13, 13));       // mul
    emit(add(12, 12, 14));
    emit(store(3'b010, 12, 10, 0));         // sw x12, 0(x10)
    emit(load(3'b010, 15, 10, 0));          // lw: forwarded
    emit(store(3'b000, 13, 10, 5));         // sb x13, 5(x10)
    emit(load(3'b010, 16, 10, 4));          // lw: one byte forwarded, rest from cache
    emit(load(3'b100, 17, 10, 5));          // lbu: forwarded
    emit(add(18, 15, 16));
    emit(add(18, 18, 17));
    emit(andi(8, 13, 1));                   // alternating branch
    emit(branch(3'b000, 8, 0, 8));          // beq x8, x0, +8
    emit(addi(19, 19, 3));
    emit(addi(10, 10, 8));
    emit(addi(13, 13, 1));
    emit(branch(3'b100, 13, 11, loop1 - here()));   // blt x13, x11, loop1
    // calls and returns
    emit(addi(20, 0, 0));
    emit(addi(21, 0, 5));
    loop2 = here();
    fix_call = prog.size();
    emit(32'h0);                            // jal x1, func (patched)
    emit(addi(20, 20, 1));
    fix_far = prog.size();
    emit(auipc(5, 0));                      // far call: auipc x5 / jalr x1, x5 (patched)
    emit(32'h0);
    emit(branch(3'b001, 20, 21, loop2 - here()));   // bne x20, x21, loop2
    // indirect jump through jalr (not a return)
    emit(auipc(6, 0));
    emit(addi(6, 6, 16));
    emit(jalr(7, 6, 0));                    // -> +8 after this
    emit(addi(25, 0, 99));                  // skipped
    emit(addi(26, 7, 1));
    // more unresolved branches than mask bits, behind a slow divide
    emit(addi(5, 0, 1000));
    emit(muldiv(3'b100, 5, 5, 21));         // div x5 = 200
    // (each branch targets the next instruction, so all six are fetched
    // whichever way they are predicted)
    for (int i = 0; i < 6; i++) emit(branch(3'b000, 5, 0, 4));
    emit(addi(27, 5, 1));
    emit(addi(28, 27, 1));
    // conflict misses: 12 lines in one D-cache set, stride 512 bytes
    emit(lui(22, 8));                       // x22 = 0x8000
    emit(addi(23, 0, 0));
    emit(addi(24, 0, 12));
    loop3 = here();
    emit(slli(9, 23, 9));
    emit(add(9, 9, 22));
    emit(muldiv(3'b000, 29, 23, 21));
    emit(store(3'b010, 29, 9, 0));
    emit(store(3'b001, 23, 9, 6));
    emit(addi(23, 23, 1));
    emit(branch(3'b100, 23, 24, loop3 - here()));
    emit(addi(23, 0, 0));
    emit(addi(30, 0, 0));
    loop4 = here();
    emit(slli(9, 23, 9));
    emit(add(9, 9, 22));
    emit(load(3'b010, 29, 9, 0));
    emit(load(3'b001, 31, 9, 6));
    emit(add(30, 30, 29));
    emit(xor_(30, 30, 31));
    emit(addi(23, 23, 1));
    emit(branch(3'b100, 23, 24, loop4 - here()));
    // signed arithmetic corner cases
    emit(lui(1, 32'h80000));
    emit(addi(2, 0, -1));
    emit(muldiv(3'b100, 3, 1, 2));          // div overflow
    emit(muldiv(3'b110, 4, 1, 2));          // rem overflow
    emit(muldiv(3'b101, 6, 1, 0));          // divu by zero
    emit(muldiv(3'b111, 7, 1, 0));          // remu by zero
    emit(muldiv(3'b001, 8, 1, 2));          // mulh
    emit(muldiv(3'b011, 9, 2, 2));          // mulhu
    emit(srai(14, 1, 4));
    emit(sltu(15, 2, 1));
    emit(sub(16, 0, 2));
    halt_pc = here();
    emit(jal(0, 0));                        // halt: jump to self
    // function
    func = here();
    emit(muldiv(3'b110, 17, 12, 21));       // rem
    emit(add(18, 18, 17));
    emit(jalr(0, 1, 0));                    // ret
    // far-call target, kept short so the divider is not swamped
    func2 = here();
    emit(add(18, 18, 20));
    emit(jalr(0, 1, 0));                    // ret
    prog[fix_call] = jal(1, func - fix_call * 4);
    prog[fix_far + 1] = jalr(1, 5, func2 - fix_far * 4);
  endtask

  // retirement checking
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
      n_branch        += int'(ev_branch);
      n_mispredict    += int'(ev_mispredict);
      n_dual_dispatch += int'(ev_dual_dispatch);
      n_dual_commit   += int'(ev_dual_commit);
      n_fwd_full      += int'(ev_fwd_full);
      n_fwd_partial   += int'(ev_fwd_partial);
      n_icache_miss   += int'(ev_icache_miss);
      n_prefetch_hit  += int'(ev_prefetch_hit);
      n_dcache_miss   += int'(ev_dcache_miss);
      n_writeback     += int'(ev_writeback);
      n_branch_stall  += int'(ev_branch_stall);
      n_early_wake    += int'(ev_early_wake);
      n_fused         += int'(dut.u_fetch.s2_valid && dut.u_fetch.keep1 && dut.u_fetch.fuse1);
    end
  end

  task automatic need(string what, int n);
    checks++;
    $display("  %-22s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
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
    $display("retired %0d instructions in %0d cycles (IPC %0.3f)", retired, cycles,
             real'(retired) / real'(cycles));
    need("branches resolved", n_branch);
    need("mispredictions", n_mispredict);
    need("two-wide dispatch", n_dual_dispatch);
    need("two-wide commit", n_dual_commit);
    need("full forwarding", n_fwd_full);
    need("partial forwarding", n_fwd_partial);
    need("I-cache misses", n_icache_miss);
    need("prefetch hits", n_prefetch_hit);
    need("D-cache misses", n_dcache_miss);
    need("dirty writebacks", n_writeback);
    need("branch-mask stalls", n_branch_stall);
    need("early wakeups", n_early_wake);
    need("fused auipc/jalr", n_fused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: program did not finish (retired %0d)", retired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
