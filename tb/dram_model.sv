// dram_model: behavioural model of the off-chip DRAM behind the cacheline
// adapter (not part of the design). A read is accepted in one cycle and, after
// LATENCY cycles, answered with four consecutive 64-bit beats tagged with the
// line address; up to QDEPTH reads may wait. A write is four beats on cycles
// where dram_write and dram_ready are high. dram_ready is high except on
// pseudo-random cycles when RANDOM_STALL is set. Memory is WORDS 64-bit words
// wrapping around; the testbench fills it through the mem array directly.
module dram_model #(
  parameter int WORDS        = 8192,
  parameter int LATENCY      = 12,
  parameter int QDEPTH       = 4,
  parameter bit RANDOM_STALL = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] dram_addr,
  input  logic        dram_read,
  input  logic        dram_write,
  input  logic [63:0] dram_wdata,
  output logic        dram_ready,
  output logic [31:0] dram_raddr,
  output logic [63:0] dram_rdata,
  output logic        dram_rvalid
);
  logic [63:0] mem [WORDS];
  logic [31:0] q_addr [QDEPTH];
  int          q_time [QDEPTH];
  int          q_n;
  int          now;
  int          wbeat;
  int          rbeat;
  logic [31:0] cur;

  function automatic int widx(logic [31:0] a, int beat);
    return int'((32'(a[31:3]) + 32'(beat)) % 32'(WORDS));
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      q_n <= 0; now <= 0; wbeat <= 0; rbeat <= 0;
      dram_ready <= 1'b1; dram_rvalid <= 1'b0;
    end else begin
      now <= now + 1;
      dram_ready <= RANDOM_STALL ? ($urandom_range(0, 7) != 0) : 1'b1;
      if (dram_write && dram_ready) begin
        mem[widx({dram_addr[31:5], 5'b0}, wbeat)] <= dram_wdata;
        wbeat <= (wbeat + 1) % 4;
      end
      dram_rvalid <= 1'b0;
      if (rbeat != 0) begin
        dram_rvalid <= 1'b1;
        dram_raddr  <= cur;
        dram_rdata  <= mem[widx(cur, rbeat)];
        rbeat <= (rbeat + 1) % 4;
      end else if (q_n > 0 && q_time[0] <= now) begin
        dram_rvalid <= 1'b1;
        dram_raddr  <= q_addr[0];
        dram_rdata  <= mem[widx(q_addr[0], 0)];
        cur   <= q_addr[0];
        rbeat <= 1;
        for (int i = 0; i < QDEPTH-1; i++) begin q_addr[i] <= q_addr[i+1]; q_time[i] <= q_time[i+1]; end
      end
      begin
        int n;
        n = q_n - ((rbeat == 0 && q_n > 0 && q_time[0] <= now) ? 1 : 0);
        if (dram_read && dram_ready) begin
          q_addr[n] <= {dram_addr[31:5], 5'b0};
          q_time[n] <= now + LATENCY;
          n++;
        end
        q_n <= n;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(dram_read && dram_ready && q_n == QDEPTH))
    else $error("dram_model: read queue overflow");
endmodule
