// issue_queue: one distributed scheduler (the core has one each for ALU,
// branch, multiply/divide and memory instructions).
// Up to two entries are written per cycle by dispatch into the lowest free
// slots, with the ready bits of both sources as dispatch saw them. Wakeup
// ports compare their tag with every waiting source and set its ready bit.
// Select picks the lowest-numbered entry whose sources are both ready, when
// the functional unit can take it (fu_ready), and removes it. The branch mask
// of each entry is updated on every branch resolution: entries of a
// mispredicted branch's wrong path are dropped, and an instruction selected in
// the cycle it is squashed is not issued. free_cnt is combinational.
module issue_queue
  import ooo_pkg::*;
#(
  parameter int DEPTH  = 8,
  parameter int N_WAKE = 4
) (
  input  logic clk,
  input  logic rst,
  input  logic  wr_en   [2],
  input  iss_t  wr_data [2],
  input  logic  wr_rdy1 [2],
  input  logic  wr_rdy2 [2],
  output logic [$clog2(DEPTH):0] free_cnt,
  input  wake_t wake [N_WAKE],
  input  br_t   br,
  input  logic  fu_ready,
  output logic  iss_valid,
  output iss_t  iss_data
);
  localparam int AW = $clog2(DEPTH);
  logic [DEPTH-1:0] valid;
  logic [DEPTH-1:0] rdy1, rdy2;
  iss_t             ent [DEPTH];
  logic [AW-1:0]    sel, slot [2];
  logic             sel_found;
  logic             slot_ok [2];

  always_comb begin
    free_cnt = '0;
    for (int i = 0; i < DEPTH; i++) free_cnt = free_cnt + (AW+1)'(!valid[i]);
    sel_found = 1'b0; sel = '0;
    for (int i = DEPTH-1; i >= 0; i--)
      if (valid[i] && rdy1[i] && rdy2[i]) begin sel_found = 1'b1; sel = AW'(i); end
    slot_ok[0] = 1'b0; slot[0] = '0;
    for (int i = DEPTH-1; i >= 0; i--)
      if (!valid[i]) begin slot_ok[0] = 1'b1; slot[0] = AW'(i); end
    slot_ok[1] = 1'b0; slot[1] = '0;
    for (int i = DEPTH-1; i >= 0; i--)
      if (!valid[i] && !(slot_ok[0] && AW'(i) == slot[0])) begin slot_ok[1] = 1'b1; slot[1] = AW'(i); end
  end

  always_comb begin
    iss_data       = ent[sel];
    iss_data.bmask = bm_upd(ent[sel].bmask, br);
    iss_valid      = sel_found && fu_ready && !bm_killed(ent[sel].bmask, br);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (valid[i]) begin
          for (int w = 0; w < N_WAKE; w++) begin
            if (wake[w].valid && wake[w].tag == ent[i].ps1) rdy1[i] <= 1'b1;
            if (wake[w].valid && wake[w].tag == ent[i].ps2) rdy2[i] <= 1'b1;
          end
          ent[i].bmask <= bm_upd(ent[i].bmask, br);
          if (bm_killed(ent[i].bmask, br)) valid[i] <= 1'b0;
        end
      end
      if (sel_found && fu_ready) valid[sel] <= 1'b0;
      if (!(br.valid && br.mispredict)) begin
        // write the second request into the first free slot when only it is valid
        if (wr_en[0]) begin
          valid[slot[0]] <= 1'b1;
          ent[slot[0]]   <= wr_data[0];
          ent[slot[0]].bmask <= bm_upd(wr_data[0].bmask, br);
          rdy1[slot[0]]  <= wr_rdy1[0];
          rdy2[slot[0]]  <= wr_rdy2[0];
        end
        if (wr_en[1]) begin
          valid[slot[wr_en[0] ? 1 : 0]] <= 1'b1;
          ent[slot[wr_en[0] ? 1 : 0]]   <= wr_data[1];
          ent[slot[wr_en[0] ? 1 : 0]].bmask <= bm_upd(wr_data[1].bmask, br);
          rdy1[slot[wr_en[0] ? 1 : 0]]  <= wr_rdy1[1];
          rdy2[slot[wr_en[0] ? 1 : 0]]  <= wr_rdy2[1];
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst)
      (wr_en[0] && wr_en[1]) |-> free_cnt >= 2)
    else $error("issue_queue overflow");
endmodule
