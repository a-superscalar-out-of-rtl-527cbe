// rat: register alias table, 32 architectural to physical mappings.
// Up to two renames per cycle; the second write wins when both name the same
// register (it is younger). Four source lookups are combinational from the
// table as it was at the start of the cycle (dispatch resolves the dependence
// of slot 1 on slot 0 itself). When a branch is dispatched (ckpt_valid), the
// table including this cycle's writes is copied into checkpoint ckpt_tag;
// a misprediction (restore_valid) copies checkpoint restore_tag back and
// ignores that cycle's writes. Four checkpoints, one per branch mask bit.
// x0 always maps to physical register 0; reset maps x<i> to p<i>.
module rat
  import ooo_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  areg_t rd_areg [4],
  output preg_t rd_preg [4],
  input  logic  wr_en   [2],
  input  areg_t wr_areg [2],
  input  preg_t wr_preg [2],
  input  logic  ckpt_valid,
  input  btag_t ckpt_tag,
  input  logic  restore_valid,
  input  btag_t restore_tag
);
  preg_t map  [32];
  preg_t ckpt [BR_MASK_W][32];
  preg_t map_next [32];

  always_comb begin
    for (int i = 0; i < 4; i++) rd_preg[i] = map[rd_areg[i]];
    map_next = map;
    for (int s = 0; s < 2; s++)
      if (wr_en[s] && wr_areg[s] != '0) map_next[wr_areg[s]] = wr_preg[s];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) map[i] <= preg_t'(i);
    end else if (restore_valid) begin
      map <= ckpt[restore_tag];
    end else begin
      map <= map_next;
      if (ckpt_valid) ckpt[ckpt_tag] <= map_next;
    end
  end
endmodule
