// br_mask_alloc: branch mask allocation for early branch resolution.
// Each unresolved conditional branch or jalr owns one of BR_MASK_W mask bits.
// busy is the set of bits in use, which is also the mask given to every
// instruction dispatched now (all of them are younger than every unresolved
// branch). free_avail/free_tag name the lowest free bit. On dispatch of a
// branch (alloc) the bit becomes busy and the branch's checkpoint records the
// older busy bits, the global history seen before its prediction and the
// return address stack state. On a correct resolution the bit is freed; on a
// misprediction the bit and every younger bit are freed (busy becomes the
// checkpointed older bits that are still busy) and the history and RAS state
// are read out of the checkpoint for fetch to restore. A resolved bit is
// removed from every checkpointed mask, since it may be handed to a younger
// branch before an older one resolves.
module br_mask_alloc
  import ooo_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  br_t         br,
  output bmask_t      cur_mask,     // busy bits after this cycle's resolution
  output logic        free_avail,
  output btag_t       free_tag,
  input  logic        alloc,
  input  ghr_t        alloc_ghr,
  input  ras_ptr_t    alloc_ras_ptr,
  input  logic [31:0] alloc_ras_top,
  // checkpoint of the resolving branch
  output ghr_t        rs_ghr,
  output ras_ptr_t    rs_ras_ptr,
  output logic [31:0] rs_ras_top
);
  bmask_t      busy;
  bmask_t      ck_mask [BR_MASK_W];
  ghr_t        ck_ghr  [BR_MASK_W];
  ras_ptr_t    ck_ptr  [BR_MASK_W];
  logic [31:0] ck_top  [BR_MASK_W];

  assign cur_mask   = bm_upd(busy, br);
  assign rs_ghr     = ck_ghr[br.tag];
  assign rs_ras_ptr = ck_ptr[br.tag];
  assign rs_ras_top = ck_top[br.tag];

  always_comb begin
    free_avail = 1'b0;
    free_tag   = '0;
    for (int i = BR_MASK_W-1; i >= 0; i--)
      if (!busy[i]) begin free_avail = 1'b1; free_tag = btag_t'(i); end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= '0;
    end else if (br.valid && br.mispredict) begin
      busy <= busy & ck_mask[br.tag];
    end else begin
      // a resolved bit may be reused by a younger branch: drop it from every
      // checkpointed older-branch mask
      for (int i = 0; i < BR_MASK_W; i++) ck_mask[i] <= bm_upd(ck_mask[i], br);
      busy <= cur_mask | ((alloc && free_avail) ? bmask_t'(1) << free_tag : '0);
      if (alloc && free_avail) begin
        ck_mask[free_tag] <= cur_mask;
        ck_ghr[free_tag]  <= alloc_ghr;
        ck_ptr[free_tag]  <= alloc_ras_ptr;
        ck_top[free_tag]  <= alloc_ras_top;
      end
    end
  end
endmodule
