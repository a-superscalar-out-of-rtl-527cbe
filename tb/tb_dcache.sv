// tb_dcache: random word reads and byte-masked writes over 24 lines that map
// to only 4 sets, so the 4-way sets overflow and dirty lines are written
// back. A line-level memory model answers reads after a few cycles. Every
// read answer is compared with a reference memory and must carry its
// request ID; hits must answer the cycle after the request.
module tb_dcache;
  import ooo_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic req_valid, req_ready, req_we, resp_valid;
  logic [31:0] req_addr, req_wdata, resp_rdata;
  logic [3:0] req_wmask, req_id, resp_id;
  logic mem_req_valid, mem_req_we, mem_req_ready, mem_resp_valid, stat_miss, stat_writeback;
  logic [31:0] mem_req_addr;
  logic [255:0] mem_req_wdata, mem_resp_data;
  dcache dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] ref_mem [int];     // word address -> data
  logic [255:0] lines [int];      // line address -> data held by the memory model
  int n_wb = 0, n_miss = 0, n_hit1 = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model
  logic pend; logic [31:0] pend_addr; int pend_t;
  always_ff @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (rst) pend <= 0;
    else begin
      if (mem_req_valid && mem_req_ready) begin
        if (mem_req_we) begin lines[int'(mem_req_addr[31:5])] = mem_req_wdata; n_wb++; end
        else begin pend <= 1; pend_addr <= mem_req_addr; pend_t <= 5; end
      end
      if (pend) begin
        if (pend_t == 0) begin
          pend <= 0;
          mem_resp_valid <= 1'b1;
          mem_resp_data <= lines.exists(int'(pend_addr[31:5])) ? lines[int'(pend_addr[31:5])] : '0;
        end else pend_t <= pend_t - 1;
      end
    end
  end
  assign mem_req_ready = !pend && ($urandom_range(0, 3) != 0);

  function automatic logic [31:0] addr_of(int k);
    // 6 tags x 4 sets, 8 words per line
    return 32'((k % 6) * 1024 + ((k / 6) % 4) * 32 + ((k / 24) % 8) * 4);
  endfunction

  initial begin
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_wmask = 0; req_id = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] a, exp;
      int lat;
      @(negedge clk);
      a = addr_of($urandom_range(0, 191));
      req_valid = 1; req_addr = a; req_id = 4'($urandom());
      req_we = $urandom_range(0, 1); req_wmask = 4'($urandom_range(1, 15)); req_wdata = $urandom();
      exp = ref_mem.exists(int'(a[31:2])) ? ref_mem[int'(a[31:2])] : '0;
      while (!req_ready) @(negedge clk);
      @(negedge clk);
      req_valid = 0;
      lat = 1;
      while (!resp_valid && lat < 200) begin @(negedge clk); lat++; end
      checks++;
      if (resp_id !== req_id) begin failures++; $display("id mismatch"); end
      if (lat == 1) n_hit1++; else n_miss++;
      if (req_we) begin
        for (int b = 0; b < 4; b++) if (req_wmask[b]) exp[8*b +: 8] = req_wdata[8*b +: 8];
        ref_mem[int'(a[31:2])] = exp;
      end else begin
        checks++;
        if (resp_rdata !== exp) begin failures++; $display("read %h: got %h expected %h", a, resp_rdata, exp); end
      end
    end
    checks++;
    if (n_wb == 0 || n_miss == 0 || n_hit1 == 0) begin failures++; $display("coverage wb %0d miss %0d hit %0d", n_wb, n_miss, n_hit1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
