// ready_table: one ready bit per physical register (the "ready list").
// A bit is cleared when dispatch allocates the register as a destination and
// set by a wakeup: the early wakeup of a single-cycle ALU/branch instruction
// at issue, or a result broadcast of the multiply/divide and load/store units.
// Lookups are combinational and include this cycle's wakeups, so a source
// woken in the same cycle as its consumer is dispatched is seen as ready.
// Reset marks all registers ready (all initial values are zero).
module ready_table
  import ooo_pkg::*;
#(
  parameter int N_WAKE = 4
) (
  input  logic  clk,
  input  logic  rst,
  input  wake_t wake [N_WAKE],
  input  logic  clr_en   [2],
  input  preg_t clr_preg [2],
  input  preg_t rd_preg  [4],
  output logic  rd_ready [4]
);
  logic [NUM_PREGS-1:0] ready;

  always_comb begin
    for (int r = 0; r < 4; r++) begin
      rd_ready[r] = ready[rd_preg[r]] || rd_preg[r] == '0;
      for (int w = 0; w < N_WAKE; w++)
        if (wake[w].valid && wake[w].tag == rd_preg[r]) rd_ready[r] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) ready <= '1;
    else begin
      for (int w = 0; w < N_WAKE; w++)
        if (wake[w].valid) ready[wake[w].tag] <= 1'b1;
      for (int s = 0; s < 2; s++)
        if (clr_en[s]) ready[clr_preg[s]] <= 1'b0;
    end
  end
endmodule
