// tb_fetch: the fetch unit runs a generated program (straight-line code,
// forward jumps, calls into small functions that return through ra,
// conditional branches, and a jump back to the start) from an I-cache model
// with random latency. The testbench follows the path fetch should take
// (jal targets, returns from its own call stack, conditional branches in the
// predicted direction) and checks every pushed slot's PC and instruction,
// that conditional branches and jalr never sit in slot 1 or have a second
// slot behind them, except a jalr fused with the auipc in slot 0 (far calls
// "auipc x7 / jalr ra, x7" are in the program: fused, they must be predicted
// taken to the exact target; split across bundles, not taken), that taken
// predictions carry the right target, that the
// instruction queue never overflows, and that after a backend redirect the
// next pushed instruction is the redirect target. The predictor is trained at
// random so both directions are predicted.
module tb_fetch;
  import ooo_pkg::*;
  import rv_asm::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic ic_req_valid, ic_req_tag, ic_req_ready, ic_resp_valid, ic_resp_tag, ic_resp_second_valid;
  logic [31:0] ic_req_pc, ic_resp_pc, ic_resp_instr0, ic_resp_instr1;
  logic [3:0] iq_count;
  logic iq_push;
  fetch_slot_t iq_data [2];
  logic redirect_valid; logic [31:0] redirect_pc;
  ghr_t restore_ghr; ras_ptr_t restore_ras_ptr; logic [31:0] restore_ras_top;
  logic bp_update_valid, bp_update_taken; ghr_t bp_update_idx;
  fetch dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] mem [1024];
  int n_call = 0, n_ret = 0, n_taken = 0, n_ntaken = 0, n_redir = 0, n_dual = 0, n_fuse = 0, n_split = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program: main code 0x000-0x3fc, eight functions at 0x800 + 64*k
  initial begin
    for (int w = 0; w < 1024; w++) mem[w] = addi(5'd0, 5'd0, 0);
    for (int w = 0; w < 255; w++) begin
      automatic int r = $urandom_range(0, 99);
      automatic int pc = 4 * w;
      if (r < 6) mem[w] = jal(5'd1, 32'h800 + 64 * $urandom_range(0, 7) - pc);
      else if (r < 12) mem[w] = branch(3'b000, 5'd5, 5'd6, 4 * $urandom_range(1, 6));
      else if (r < 15 && pc + 40 <= 32'h3fc) mem[w] = jal(5'd0, 4 * $urandom_range(1, 9));
      else if (r < 23 && pc >= 32'h200 && w < 253) begin
        mem[w]     = auipc(5'd7, 0);
        mem[w + 1] = jalr(5'd1, 5'd7, 32'h800 + 64 * $urandom_range(0, 7) - pc);
        w++;
      end
      else mem[w] = addi(5'd5, 5'd5, 1);
    end
    mem[255] = jal(5'd0, -32'h3fc);
    for (int k = 0; k < 8; k++) begin
      automatic int len = $urandom_range(0, 14);
      for (int j = 0; j < len; j++) mem[512 + 16 * k + j] = addi(5'd6, 5'd6, 1);
      mem[512 + 16 * k + len] = jalr(5'd0, 5'd1, 0);
    end
  end

  // I-cache model: one request at a time, answer 1 to 4 cycles later
  bit c_busy; int c_t; logic [31:0] c_pc; logic c_tag;
  always @(posedge clk) begin
    ic_resp_valid <= 1'b0;
    if (rst) c_busy = 0;
    else if (c_busy) begin
      if (c_t == 0) begin
        c_busy = 0;
        ic_resp_valid <= 1'b1;
        ic_resp_pc <= c_pc; ic_resp_tag <= c_tag;
        ic_resp_instr0 <= mem[c_pc[11:2]];
        ic_resp_instr1 <= mem[c_pc[11:2] + 10'd1];
        ic_resp_second_valid <= c_pc[4:2] != 3'd7;
      end else c_t--;
    end else if (ic_req_valid && ic_req_ready) begin
      c_busy = 1; c_t = $urandom_range(0, 3) == 0 ? $urandom_range(1, 3) : 0; c_pc = ic_req_pc; c_tag = ic_req_tag;
    end
  end
  always @(negedge clk) ic_req_ready = !c_busy;

  // expected path
  logic [31:0] exp_pc;
  logic [31:0] stack [$];
  int q_count = 0;
  task automatic follow(fetch_slot_t s, bit fused, logic [31:0] fuse_tgt);
    logic [31:0] ins;
    ins = mem[s.pc[11:2]];
    checks += 2;
    if (s.pc !== exp_pc) begin failures++; $display("%t: fetched pc %h, expected %h", $time, s.pc, exp_pc); exp_pc = s.pc; end
    if (s.instr !== ins) begin failures++; $display("instr at %h", s.pc); end
    if (ins[6:0] == 7'b1101111) begin
      if (ins[11:7] == 5'd1) begin stack.push_back(s.pc + 4); n_call++; end
      exp_pc = s.pc + {{12{ins[31]}}, ins[19:12], ins[20], ins[30:21], 1'b0};
    end else if (ins[6:0] == 7'b1100111 && !(ins[19:15] == 5'd1 && ins[11:7] == 5'd0)) begin
      checks++;
      if (fused) begin
        n_fuse++;
        if (!s.pred_taken || s.pred_target !== fuse_tgt) begin failures++; $display("fused jalr at %h predicted %0d %h", s.pc, s.pred_taken, s.pred_target); end
        if (ins[11:7] == 5'd1) stack.push_back(s.pc + 4);
        exp_pc = fuse_tgt;
      end else begin
        n_split++;
        if (s.pred_taken) begin failures++; $display("unfused jalr at %h predicted taken", s.pc); end
        exp_pc = s.pc + 4;
      end
    end else if (ins[6:0] == 7'b1100111) begin
      n_ret++;
      exp_pc = stack.size() > 0 ? stack.pop_back() : 32'hx;
      checks++;
      if (!s.pred_taken || s.pred_target !== exp_pc) begin failures++; $display("return at %h predicted %h", s.pc, s.pred_target); end
    end else if (ins[6:0] == 7'b1100011) begin
      if (s.pred_taken) begin
        n_taken++;
        exp_pc = s.pc + {{20{ins[31]}}, ins[7], ins[30:25], ins[11:8], 1'b0};
        checks++;
        if (s.pred_target !== exp_pc) begin failures++; $display("branch target at %h", s.pc); end
      end else begin
        n_ntaken++;
        exp_pc = s.pc + 4;
      end
    end else exp_pc = s.pc + 4;
  endtask

  function automatic bit serial(logic [31:0] ins);
    return ins[6:0] == 7'b1100011 || ins[6:0] == 7'b1100111;
  endfunction

  // slot 1 jalr whose base is written by the auipc in slot 0
  function automatic bit pair(logic [31:0] a, logic [31:0] j);
    return a[6:0] == 7'b0010111 && a[11:7] != 5'd0 && j[6:0] == 7'b1100111 && j[19:15] == a[11:7];
  endfunction

  always @(posedge clk) if (!rst) begin
    if (iq_push && !redirect_valid) begin
      checks += 2;
      if (!iq_data[0].valid) begin failures++; $display("push with empty slot 0"); end
      if (q_count + 1 > 8) begin failures++; $display("push into a full queue"); end
      if (iq_data[0].valid) follow(iq_data[0], 1'b0, 32'h0);
      if (iq_data[1].valid) begin
        n_dual++;
        checks++;
        if ((serial(iq_data[1].instr) && !pair(iq_data[0].instr, iq_data[1].instr)) || serial(iq_data[0].instr)) begin failures++; $display("serializing instruction paired at %h", iq_data[0].pc); end
        follow(iq_data[1], pair(iq_data[0].instr, iq_data[1].instr),
               (iq_data[0].pc + {iq_data[0].instr[31:12], 12'b0} +
                {{20{iq_data[1].instr[31]}}, iq_data[1].instr[31:20]}) & ~32'd1);
      end
      q_count += 1;   // the queue holds bundles
    end
    if (redirect_valid) begin
      exp_pc = redirect_pc;
      stack.delete();
      q_count = 0;
      n_redir++;
    end
  end

  // consumer, predictor training and redirects
  initial begin
    redirect_valid = 0; redirect_pc = 0; restore_ghr = 0; restore_ras_ptr = 0; restore_ras_top = 0;
    bp_update_valid = 0; bp_update_idx = 0; bp_update_taken = 0; iq_count = 0;
    exp_pc = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      q_count -= (q_count >= 1 && $urandom_range(0, 2) == 0) ? 1 : 0;
      iq_count = 4'(q_count);
      bp_update_valid = $urandom_range(0, 3) == 0;
      bp_update_idx = ghr_t'($urandom());
      bp_update_taken = $urandom_range(0, 1);
      redirect_valid = $urandom_range(0, 199) == 0;
      redirect_pc = 32'($urandom_range(0, 254) * 4);
      restore_ghr = ghr_t'($urandom());
    end
    checks++;
    if (n_call == 0 || n_ret == 0 || n_taken == 0 || n_ntaken == 0 || n_redir == 0 || n_dual == 0 || n_fuse == 0 || n_split == 0) begin
      failures++;
      $display("coverage: calls %0d returns %0d taken %0d not-taken %0d redirects %0d dual %0d fused %0d split %0d",
               n_call, n_ret, n_taken, n_ntaken, n_redir, n_dual, n_fuse, n_split);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
