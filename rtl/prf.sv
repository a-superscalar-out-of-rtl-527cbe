// prf: physical register file, NUM_PREGS x 32 bits (64 registers).
// N_RD combinational read ports, N_WR write ports written at the clock edge
// (one per result bus; different buses never write the same register in one
// cycle). Register 0 is hard-wired to zero. Reset clears every register so
// that the initial architectural state is all zeros.
module prf
  import ooo_pkg::*;
#(
  parameter int N_RD = 8,
  parameter int N_WR = NUM_CDB
) (
  input  logic        clk,
  input  logic        rst,
  input  preg_t       rd_addr [N_RD],
  output logic [31:0] rd_data [N_RD],
  input  logic        wr_en   [N_WR],
  input  preg_t       wr_addr [N_WR],
  input  logic [31:0] wr_data [N_WR]
);
  logic [31:0] regs [NUM_PREGS];

  always_comb
    for (int r = 0; r < N_RD; r++) rd_data[r] = (rd_addr[r] == '0) ? '0 : regs[rd_addr[r]];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_PREGS; i++) regs[i] <= '0;
    end else begin
      for (int w = 0; w < N_WR; w++)
        if (wr_en[w] && wr_addr[w] != '0) regs[wr_addr[w]] <= wr_data[w];
    end
  end
endmodule
