// tb_cacheline_adapter: an I-cache requester reads random lines while a
// D-cache requester writes and reads lines of its own, both through the
// adapter into the DRAM model. Each line read back must hold what the
// reference says (initial pattern or the last line written there), with the
// D-side ID returned; the I-side must never have two reads outstanding. Like
// the blocking data cache, the D requester never sends a request for a line
// that still has a read outstanding.
module tb_cacheline_adapter;
  import ooo_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic i_req_valid, i_req_ready, i_resp_valid;
  logic [31:0] i_req_addr;
  logic [255:0] i_resp_data;
  logic d_req_valid, d_req_we, d_req_ready, d_resp_valid;
  logic [31:0] d_req_addr;
  logic [255:0] d_req_wdata, d_resp_data;
  logic [1:0] d_req_id, d_resp_id;
  logic [31:0] dram_addr, dram_raddr;
  logic dram_read, dram_write, dram_ready, dram_rvalid;
  logic [63:0] dram_wdata, dram_rdata;
  cacheline_adapter dut (.*);
  dram_model #(.WORDS(4096), .LATENCY(6), .QDEPTH(8)) u_dram (.*);

  int checks = 0, failures = 0;
  logic [255:0] ref_line [int];
  logic [31:0] i_exp_addr;
  bit i_busy = 0;
  int n_i = 0, n_d = 0, n_w = 0;
  logic [31:0] d_pend_addr [4];
  logic [255:0] d_pend_data [4];
  bit d_pend [4];

  function automatic bit line_busy(logic [31:0] a);
    for (int k = 0; k < 4; k++) if (d_pend[k] && d_pend_addr[k][31:5] == a[31:5]) return 1;
    return 0;
  endfunction

  function automatic logic [255:0] init_line(logic [31:0] a);
    logic [255:0] l;
    for (int w = 0; w < 8; w++) l[32*w +: 32] = a + 32'(4 * w);
    return l;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // I-side: one read at a time from lines 0..63
  always @(posedge clk) if (!rst) begin
    if (i_resp_valid) begin
      checks++;
      if (!i_busy || i_resp_data !== init_line(i_exp_addr)) begin failures++; $display("I line %h wrong", i_exp_addr); end
      i_busy = 0; n_i++;
    end
    if (i_req_valid && i_req_ready) begin
      if (i_busy) begin failures++; $display("second I read"); end
      i_busy = 1; i_exp_addr = i_req_addr;
    end
  end
  // D-side answers
  always @(posedge clk) if (!rst && d_resp_valid) begin
    checks++;
    if (!d_pend[d_resp_id] || d_resp_data !== d_pend_data[d_resp_id]) begin
      failures++; $display("D line for id %0d wrong", d_resp_id);
    end
    d_pend[d_resp_id] = 0; n_d++;
  end

  initial begin
    foreach (u_dram.mem[i]) u_dram.mem[i] = {32'(8 * i + 4), 32'(8 * i)};
    for (int l = 0; l < 1024; l++) ref_line[l] = init_line(32'(l * 32));
    i_req_valid = 0; d_req_valid = 0; d_req_we = 0; d_req_id = 0; d_req_addr = 0; d_req_wdata = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    fork
      for (int n = 0; n < 300; n++) begin
        @(negedge clk);
        wait (!i_busy);
        @(negedge clk);
        i_req_valid = 1; i_req_addr = 32'($urandom_range(0, 63) * 32);
        @(posedge clk);
        while (!i_req_ready) @(posedge clk);
        @(negedge clk);
        i_req_valid = 0;
      end
      for (int n = 0; n < 300; n++) begin
        automatic int id = $urandom_range(0, 3);
        @(negedge clk);
        while (d_pend[id]) @(negedge clk);
        d_req_valid = 1;
        d_req_we = $urandom_range(0, 1);
        do d_req_addr = 32'((64 + $urandom_range(0, 15)) * 32); while (line_busy(d_req_addr));
        d_req_wdata = {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
        d_req_id = 2'(id);
        @(posedge clk);
        while (!d_req_ready) @(posedge clk);
        if (d_req_we) begin ref_line[int'(d_req_addr[31:5])] = d_req_wdata; n_w++; end
        else begin d_pend[id] = 1; d_pend_addr[id] = d_req_addr; d_pend_data[id] = ref_line[int'(d_req_addr[31:5])]; end
        @(negedge clk);
        d_req_valid = 0;
      end
    join
    repeat (200) @(posedge clk);
    checks++;
    if (n_i < 250 || n_d < 50 || n_w < 50) begin failures++; $display("counts %0d %0d %0d", n_i, n_d, n_w); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
