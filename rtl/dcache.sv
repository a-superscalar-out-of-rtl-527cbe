// dcache: data cache, 4-way set-associative with 256-bit lines, per-line valid
// and dirty bits and tree pseudo-LRU replacement (3 bits per set), as in the
// design description. Requests are 32-bit words with a byte write mask and
// carry a request ID that is returned with the answer.
// Timing: a request is registered when req_valid && req_ready and looked up in
// the next cycle; a hit answers in that cycle (resp_valid, resp_id, resp_rdata;
// a write updates the line and marks it dirty) and a new request can be taken
// at the same time. On a miss the victim (an invalid way, else the pseudo-LRU
// way) is copied to a one-line writeback buffer if dirty, the buffer is written
// to memory, the missing line is read, installed clean, and the lookup then
// hits and answers.
// This cache keeps one miss outstanding: the miss status holding registers and
// the merging of several misses to one line that the design description
// mentions are not built here. The number of sets (16) is this
// implementation's choice.
module dcache
  import ooo_pkg::*;
#(
  parameter int SETS = 16,
  parameter int WAYS = 4,
  parameter int ID_W = LDQ_W + 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            req_valid,
  output logic            req_ready,
  input  logic [31:0]     req_addr,
  input  logic            req_we,
  input  logic [3:0]      req_wmask,
  input  logic [31:0]     req_wdata,
  input  logic [ID_W-1:0] req_id,
  output logic            resp_valid,
  output logic [31:0]     resp_rdata,
  output logic [ID_W-1:0] resp_id,
  // line port to the cacheline adapter
  output logic            mem_req_valid,
  output logic            mem_req_we,
  output logic [31:0]     mem_req_addr,
  output logic [LINE_BITS-1:0] mem_req_wdata,
  input  logic            mem_req_ready,
  input  logic            mem_resp_valid,
  input  logic [LINE_BITS-1:0] mem_resp_data,
  output logic            stat_miss,
  output logic            stat_writeback
);
  localparam int IW = $clog2(SETS);
  localparam int TW = 32 - 5 - IW;

  logic [LINE_BITS-1:0] data  [WAYS][SETS];
  logic [TW-1:0]        tags  [WAYS][SETS];
  logic [SETS-1:0]      valid [WAYS];
  logic [SETS-1:0]      dirty [WAYS];
  logic [2:0]           plru  [SETS];

  typedef enum logic [1:0] {S_RUN, S_WB, S_RD, S_WAIT} state_e;
  state_e state;

  logic            s_valid, s_we;
  logic [31:0]     s_addr, s_wdata;
  logic [3:0]      s_wmask;
  logic [ID_W-1:0] s_id;
  logic [IW-1:0]   idx;
  logic [TW-1:0]   tg;
  logic            hit;
  logic [1:0]      hit_way, victim;
  logic [LINE_BITS-1:0] line;
  logic [LINE_BITS-1:0] wb_data;
  logic [31:0]     wb_addr;

  assign idx = s_addr[5+IW-1:5];
  assign tg  = s_addr[31:5+IW];

  always_comb begin
    hit = 1'b0; hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[w][idx] && tags[w][idx] == tg) begin hit = 1'b1; hit_way = 2'(w); end
    line = data[hit_way][idx];
    victim = plru[idx][0] ? (plru[idx][2] ? 2'd3 : 2'd2) : (plru[idx][1] ? 2'd1 : 2'd0);
    for (int w = WAYS-1; w >= 0; w--)
      if (!valid[w][idx]) victim = 2'(w);
  end

  assign req_ready  = state == S_RUN && (!s_valid || hit);
  assign resp_valid = state == S_RUN && s_valid && hit;
  assign resp_rdata = line[32*s_addr[4:2] +: 32];
  assign resp_id    = s_id;

  always_comb begin
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = {s_addr[31:5], 5'b0};
    mem_req_wdata = wb_data;
    if (state == S_WB) begin
      mem_req_valid = 1'b1; mem_req_we = 1'b1; mem_req_addr = wb_addr;
    end else if (state == S_RD) begin
      mem_req_valid = 1'b1;
    end
  end

  assign stat_miss      = state == S_RUN && s_valid && !hit;
  assign stat_writeback = stat_miss && valid[victim][idx] && dirty[victim][idx];

  function automatic logic [2:0] plru_touch(logic [2:0] p, logic [1:0] w);
    logic [2:0] n;
    n = p;
    n[0] = !w[1];
    if (!w[1]) n[1] = !w[0];
    else       n[2] = !w[0];
    return n;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_RUN;
      s_valid <= 1'b0;
      for (int w = 0; w < WAYS; w++) begin valid[w] <= '0; dirty[w] <= '0; end
      for (int i = 0; i < SETS; i++) plru[i] <= '0;
    end else begin
      unique case (state)
        S_RUN: begin
          if (s_valid && hit) begin
            plru[idx] <= plru_touch(plru[idx], hit_way);
            if (s_we) begin
              for (int b = 0; b < 4; b++)
                if (s_wmask[b]) data[hit_way][idx][32*s_addr[4:2] + 8*b +: 8] <= s_wdata[8*b +: 8];
              dirty[hit_way][idx] <= 1'b1;
            end
          end
          if (s_valid && !hit) begin
            if (valid[victim][idx] && dirty[victim][idx]) begin
              wb_data <= data[victim][idx];
              wb_addr <= {tags[victim][idx], idx, 5'b0};
              state   <= S_WB;
            end else begin
              state   <= S_RD;
            end
          end else if (req_ready) begin
            s_valid <= req_valid;
            s_addr  <= req_addr;
            s_we    <= req_we;
            s_wmask <= req_wmask;
            s_wdata <= req_wdata;
            s_id    <= req_id;
          end
        end
        S_WB: if (mem_req_ready) state <= S_RD;
        S_RD: if (mem_req_ready) state <= S_WAIT;
        S_WAIT: if (mem_resp_valid) begin
          data[victim][idx]  <= mem_resp_data;
          tags[victim][idx]  <= tg;
          valid[victim][idx] <= 1'b1;
          dirty[victim][idx] <= 1'b0;
          state <= S_RUN;
        end
        default: state <= S_RUN;
      endcase
    end
  end
endmodule
