// free_list: circular FIFO of free physical registers, NUM_PREGS-32 entries
// (32 with 64 physical registers). Dispatch takes up to two registers from
// the head per cycle (the head entries are visible combinationally); commit
// returns up to two at the tail. The read pointer is checkpointed per branch
// (ckpt_valid, with this cycle's allocations included) and restored on a
// misprediction, which hands back every register taken by the squashed
// instructions. The count uses pointers one bit wider than the index.
// Reset fills it with p32..p63, p0..p31 being the initial mappings.
module free_list
  import ooo_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  alloc_en [2],
  output preg_t alloc_preg [2],
  output logic [PREG_W-1:0] count,   // free registers, 0..32 fits since 32 < 64
  input  logic  free_en [2],
  input  preg_t free_preg [2],
  input  logic  ckpt_valid,
  input  btag_t ckpt_tag,
  input  logic  restore_valid,
  input  btag_t restore_tag
);
  localparam int N  = NUM_PREGS - 32;
  localparam int AW = $clog2(N);
  preg_t       fifo [N];
  logic [AW:0] head, tail;
  logic [AW:0] head_next;
  logic [AW:0] ckpt [BR_MASK_W];
  logic [AW:0] cnt;

  assign cnt   = tail - head;
  assign count = PREG_W'(cnt);
  assign alloc_preg[0] = fifo[head[AW-1:0]];
  assign alloc_preg[1] = alloc_en[0] ? fifo[AW'(head[AW-1:0] + 1'b1)] : fifo[head[AW-1:0]];
  assign head_next = head + (AW+1)'(alloc_en[0]) + (AW+1)'(alloc_en[1]);

  always_ff @(posedge clk) begin
    if (rst) begin
      head <= '0;
      tail <= (AW+1)'(N);
      for (int i = 0; i < N; i++) fifo[i] <= preg_t'(32 + i);
    end else begin
      if (restore_valid) head <= ckpt[restore_tag];
      else begin
        head <= head_next;
        if (ckpt_valid) ckpt[ckpt_tag] <= head_next;
      end
      if (free_en[0] && free_en[1]) begin
        fifo[tail[AW-1:0]]              <= free_preg[0];
        fifo[AW'(tail[AW-1:0] + 1'b1)]  <= free_preg[1];
        tail <= tail + (AW+1)'(2);
      end else if (free_en[0] || free_en[1]) begin
        fifo[tail[AW-1:0]] <= free_en[0] ? free_preg[0] : free_preg[1];
        tail <= tail + 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) cnt <= (AW+1)'(N))
    else $error("free_list overflow");
endmodule
