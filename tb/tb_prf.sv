// tb_prf: random writes on four ports and reads on eight, against a model;
// register 0 must always read zero.
module tb_prf;
  import ooo_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  preg_t rd_addr [8];
  logic [31:0] rd_data [8];
  logic wr_en [4];
  preg_t wr_addr [4];
  logic [31:0] wr_data [4];
  prf #(.N_RD(8), .N_WR(4)) dut (.*);
  int checks = 0, failures = 0;
  logic [31:0] m [64];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m[i]) m[i] = 0;
    wr_en = '{0, 0, 0, 0};
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int w = 0; w < 4; w++) begin
        wr_en[w] = $urandom_range(0, 1);
        wr_addr[w] = preg_t'(16 * w + $urandom_range(0, 15));   // distinct per port
        wr_data[w] = $urandom();
      end
      for (int r = 0; r < 8; r++) rd_addr[r] = preg_t'($urandom());
      #1;
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (rd_data[r] !== m[rd_addr[r]]) begin failures++; $display("read mismatch p%0d", rd_addr[r]); end
      end
      @(posedge clk);
      for (int w = 0; w < 4; w++) if (wr_en[w] && wr_addr[w] != 0) m[wr_addr[w]] = wr_data[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
