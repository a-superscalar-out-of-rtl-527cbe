// tb_icache: instruction memory holds word = address XOR a constant. The test
// walks sequential PCs (which brings the next-line prefetcher into play) and
// jumps to random PCs, checking both returned words, the second-word flag,
// the returned tag, that prefetched lines are used, and that a hit answers
// the cycle after the request.
module tb_icache;
  import ooo_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic req_valid, req_tag, req_ready, resp_valid, resp_tag, resp_second_valid;
  logic [31:0] req_pc, resp_pc, resp_instr0, resp_instr1;
  logic mem_req_valid, mem_req_ready, mem_resp_valid, stat_miss, stat_pf_hit;
  logic [31:0] mem_req_addr;
  logic [255:0] mem_resp_data;
  icache dut (.*);
  int checks = 0, failures = 0;
  int n_pf = 0, n_hit1 = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] word(logic [31:0] a);
    return {a[31:2], 2'b00} ^ 32'h5A5A_0013;
  endfunction

  logic pend; logic [31:0] pend_addr; int pend_t;
  assign mem_req_ready = !pend;
  always_ff @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (rst) pend <= 0;
    else begin
      if (mem_req_valid && mem_req_ready) begin pend <= 1; pend_addr <= mem_req_addr; pend_t <= 8; end
      if (pend) begin
        if (pend_t == 0) begin
          pend <= 0;
          mem_resp_valid <= 1;
          for (int w = 0; w < 8; w++) mem_resp_data[32*w +: 32] <= word(pend_addr + 32'(4 * w));
        end else pend_t <= pend_t - 1;
      end
    end
  end

  always @(posedge clk) n_pf += int'(stat_pf_hit);

  initial begin
    logic [31:0] pc;
    req_valid = 0; req_pc = 0; req_tag = 0;
    pc = 32'h1000;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      int lat;
      @(negedge clk);
      if ($urandom_range(0, 49) == 0) pc = ($urandom() & 32'h3FFC);
      req_valid = 1; req_pc = pc; req_tag = $urandom_range(0, 1);
      while (!req_ready) @(negedge clk);
      @(negedge clk);
      req_valid = 0;
      lat = 1;
      while (!resp_valid && lat < 200) begin @(negedge clk); lat++; end
      if (lat == 1) n_hit1++;
      checks += 3;
      if (resp_pc !== pc || resp_tag !== req_tag) begin failures++; $display("pc/tag mismatch"); end
      if (resp_instr0 !== word(pc)) begin failures++; $display("word0 at %h", pc); end
      if (resp_second_valid !== (pc[4:2] != 7) || (resp_second_valid && resp_instr1 !== word(pc + 4))) begin
        failures++; $display("word1 at %h", pc);
      end
      pc = pc + (pc[4:2] != 7 ? 8 : 4);
    end
    checks++;
    if (n_pf == 0 || n_hit1 == 0) begin failures++; $display("prefetch hits %0d", n_pf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
