// tb_ras: checks the 2-entry return address stack against a reference
// circular-buffer model under random pushes, pops and checkpoint restores.
module tb_ras;
  import ooo_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic push, pop, restore_valid;
  logic [31:0] push_addr, top, below_top, restore_top;
  ras_ptr_t ptr_out, restore_ptr;
  ras dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] m [2];
  int mp;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; restore_valid = 0; push_addr = 0; restore_top = 0; restore_ptr = 0;
    m[0] = 0; m[1] = 0; mp = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      push = $urandom_range(0, 1);
      pop  = !push && $urandom_range(0, 1);
      push_addr = $urandom();
      restore_valid = ($urandom_range(0, 7) == 0);
      restore_ptr = ras_ptr_t'($urandom());
      restore_top = $urandom();
      #1;
      checks += 3;
      if (top !== m[mp]) begin failures++; $display("top mismatch %h %h", top, m[mp]); end
      if (below_top !== m[(mp + 1) % 2]) failures++;
      if (ptr_out !== ras_ptr_t'(mp)) failures++;
      @(posedge clk);
      if (restore_valid) begin mp = restore_ptr; m[mp] = restore_top; end
      else if (push) begin mp = (mp + 1) % 2; m[mp] = push_addr; end
      else if (pop) mp = (mp + 1) % 2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
