// tb_instr_queue: checks the bundle FIFO against a queue model under random
// pushes (only when there is room), pops and occasional flushes.
module tb_instr_queue;
  import ooo_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic flush, push, pop, empty;
  fetch_slot_t push_data [2];
  fetch_slot_t head [2];
  logic [3:0] count;
  instr_queue #(.DEPTH(8)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] mq [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; push = 0; pop = 0; push_data[0] = '0; push_data[1] = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      flush = ($urandom_range(0, 63) == 0);
      push  = (mq.size() < 8) && $urandom_range(0, 1);
      pop   = $urandom_range(0, 1);
      push_data[0] = '0; push_data[1] = '0;
      push_data[0].pc = $urandom(); push_data[1].pc = ~push_data[0].pc;
      #1;
      checks += 2;
      if (count !== 4'(mq.size())) begin failures++; $display("count %0d vs %0d", count, mq.size()); end
      if (mq.size() > 0) begin
        if (head[0].pc !== mq[0] || head[1].pc !== ~mq[0]) begin failures++; $display("head mismatch"); end
      end else if (!empty) failures++;
      @(posedge clk);
      if (flush) mq.delete();
      else begin
        if (pop && mq.size() > 0) void'(mq.pop_front());
        if (push) mq.push_back(push_data[0].pc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
