// rrat: retirement register alias table. It holds the committed mapping of
// every architectural register. When an instruction that writes rd commits,
// the physical register that rd was mapped to before is released to the
// free list and the new mapping is recorded. Two commits per cycle; if both
// write the same rd, the second one frees the first one's register. The
// released registers are output combinationally in the commit cycle.
module rrat
  import ooo_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  commit_en   [2],
  input  areg_t commit_areg [2],
  input  preg_t commit_preg [2],
  output logic  free_en     [2],
  output preg_t free_preg   [2]
);
  preg_t map [32];

  always_comb begin
    for (int s = 0; s < 2; s++) begin
      free_en[s]   = commit_en[s] && commit_areg[s] != '0;
      free_preg[s] = map[commit_areg[s]];
    end
    if (commit_en[0] && commit_en[1] && commit_areg[0] == commit_areg[1])
      free_preg[1] = commit_preg[0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) map[i] <= preg_t'(i);
    end else begin
      for (int s = 0; s < 2; s++)
        if (commit_en[s] && commit_areg[s] != '0) map[commit_areg[s]] <= commit_preg[s];
    end
  end
endmodule
