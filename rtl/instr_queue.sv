// instr_queue: FIFO of two-slot fetch bundles between fetch and decode.
// A bundle is pushed when push is high and popped when pop is high; both may
// happen in one cycle. flush empties the queue (used on a branch
// misprediction). count is exposed so fetch can keep room for the bundle its
// pending I-cache access will return. The depth is this implementation's
// choice. The head bundle is read combinationally.
module instr_queue
  import ooo_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           flush,
  input  logic           push,
  input  fetch_slot_t    push_data [2],
  input  logic           pop,
  output logic           empty,
  output fetch_slot_t    head [2],
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);
  fetch_slot_t mem [DEPTH][2];
  logic [AW:0] rd_ptr, wr_ptr;

  assign count   = wr_ptr - rd_ptr;
  assign empty   = (count == 0);
  assign head[0] = mem[rd_ptr[AW-1:0]][0];
  assign head[1] = mem[rd_ptr[AW-1:0]][1];

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
    end else begin
      if (push) begin
        mem[wr_ptr[AW-1:0]][0] <= push_data[0];
        mem[wr_ptr[AW-1:0]][1] <= push_data[1];
        wr_ptr <= wr_ptr + 1'b1;
      end
      if (pop && !empty) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (rst || flush) push |-> count < (AW+1)'(DEPTH))
    else $error("instr_queue overflow");
endmodule
