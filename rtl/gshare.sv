// gshare: GShare conditional-branch direction predictor.
// The pattern history table holds one 2-bit saturating counter per entry and is
// indexed by PC[GHR_W+1:2] XOR the global history register (GHR), both 9 bits
// wide as in the design description. A separate flip-flop array of valid bits
// tells initialised entries from uninitialised ones: an uninitialised entry
// predicts not-taken and is written to weakly-taken / weakly-not-taken on its
// first update (that initial value is this implementation's choice).
// Timing: lookup is combinational from pred_pc and the current GHR; the GHR
// shifts in a predicted direction (spec_valid) at the clock edge, is restored
// on a misprediction (restore_valid wins), and the PHT is written at the edge
// when update_valid is high.
module gshare
  import ooo_pkg::*;
#(
  parameter int HIST_W = GHR_W
) (
  input  logic              clk,
  input  logic              rst,
  // lookup
  input  logic [31:0]       pred_pc,
  output logic              pred_taken,
  output logic [HIST_W-1:0] ghr_out,
  // speculative history update from fetch
  input  logic              spec_valid,
  input  logic              spec_taken,
  // restore after a misprediction
  input  logic              restore_valid,
  input  logic [HIST_W-1:0] restore_ghr,
  // training from the branch unit
  input  logic              update_valid,
  input  logic [HIST_W-1:0] update_idx,
  input  logic              update_taken
);
  localparam int ENTRIES = 1 << HIST_W;

  logic [1:0]        pht [ENTRIES];
  logic [ENTRIES-1:0] pht_valid;
  logic [HIST_W-1:0] ghr;
  logic [HIST_W-1:0] idx;

  assign ghr_out    = ghr;
  assign idx        = pred_pc[HIST_W+1:2] ^ ghr;
  assign pred_taken = pht_valid[idx] & pht[idx][1];

  always_ff @(posedge clk) begin
    if (rst) begin
      ghr       <= '0;
      pht_valid <= '0;
    end else begin
      if (restore_valid)   ghr <= restore_ghr;
      else if (spec_valid) ghr <= {ghr[HIST_W-2:0], spec_taken};
      if (update_valid) begin
        pht_valid[update_idx] <= 1'b1;
        if (!pht_valid[update_idx])
          pht[update_idx] <= update_taken ? 2'b10 : 2'b01;
        else if (update_taken && pht[update_idx] != 2'b11)
          pht[update_idx] <= pht[update_idx] + 2'b01;
        else if (!update_taken && pht[update_idx] != 2'b00)
          pht[update_idx] <= pht[update_idx] - 2'b01;
      end
    end
  end
endmodule
