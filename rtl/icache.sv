// icache: instruction cache, 2-way set-associative with 256-bit lines, as in
// the design description. One access returns the 32-bit word at the requested
// PC and the following word, and says whether that second word lies in the
// same line (resp_second_valid), so fetch can build a two-instruction bundle.
// Replacement uses one bit per set pointing at the way to replace next.
// A next-line prefetcher sits beside the arrays: after a demand miss is
// serviced the following line becomes the pending prefetch target; when the
// memory port is idle that line is read into a single-entry prefetch buffer,
// and a later demand miss that matches the buffer installs the line from it
// without going to memory.
// Timing: a request is registered when req_valid && req_ready; the lookup
// happens in the next cycle and a hit answers then (resp_valid). On a miss
// req_ready drops until the line is installed and the answer given. req_tag is
// returned unchanged with the answer so fetch can drop stale answers.
// The number of sets (16) is this implementation's choice.
module icache
  import ooo_pkg::*;
#(
  parameter int SETS = 16,
  parameter int WAYS = 2
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           req_valid,
  input  logic [31:0]    req_pc,
  input  logic           req_tag,
  output logic           req_ready,
  output logic           resp_valid,
  output logic [31:0]    resp_pc,
  output logic           resp_tag,
  output logic [31:0]    resp_instr0,
  output logic [31:0]    resp_instr1,
  output logic           resp_second_valid,
  // line port to the cacheline adapter (one outstanding read)
  output logic           mem_req_valid,
  output logic [31:0]    mem_req_addr,
  input  logic           mem_req_ready,
  input  logic           mem_resp_valid,
  input  logic [LINE_BITS-1:0] mem_resp_data,
  // statistics
  output logic           stat_miss,
  output logic           stat_pf_hit
);
  localparam int IW = $clog2(SETS);
  localparam int TW = 32 - 5 - IW;

  logic [LINE_BITS-1:0] data  [WAYS][SETS];
  logic [TW-1:0]        tags  [WAYS][SETS];
  logic [SETS-1:0]      valid [WAYS];
  logic [SETS-1:0]      repl;   // way to replace next (WAYS == 2)

  logic        s_valid;
  logic [31:0] s_pc;
  logic        s_tag;

  logic [IW-1:0] s_idx;
  logic [TW-1:0] s_tg;
  logic          hit;
  logic          hit_way;
  logic [LINE_BITS-1:0] line;

  assign s_idx = s_pc[5+IW-1:5];
  assign s_tg  = s_pc[31:5+IW];

  always_comb begin
    hit = 1'b0; hit_way = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (valid[w][s_idx] && tags[w][s_idx] == s_tg) begin hit = 1'b1; hit_way = 1'(w); end
    line = data[hit_way][s_idx];
  end

  assign req_ready         = !s_valid || hit;
  assign resp_valid        = s_valid && hit;
  assign resp_pc           = s_pc;
  assign resp_tag          = s_tag;
  assign resp_instr0       = line[32*s_pc[4:2] +: 32];
  assign resp_second_valid = (s_pc[4:2] != 3'b111);
  assign resp_instr1       = resp_second_valid ? line[32*(32'(s_pc[4:2]) + 1) +: 32] : 32'h13;

  // miss handling and prefetch
  typedef enum logic [1:0] {M_IDLE, M_DEMAND, M_PREFETCH} mstate_e;
  mstate_e       mstate;
  logic          pf_pending;
  logic [26:0]   pf_target;     // line address of the pending prefetch
  logic          pf_buf_valid;
  logic [26:0]   pf_buf_addr;
  logic [LINE_BITS-1:0] pf_buf_data;
  logic [26:0]   inflight_addr;

  logic        miss;
  logic [26:0] miss_line;
  logic        pf_buf_match, pf_target_cached;

  assign miss              = s_valid && !hit;
  assign miss_line         = s_pc[31:5];
  assign pf_buf_match      = pf_buf_valid && pf_buf_addr == miss_line;

  always_comb begin
    pf_target_cached = 1'b0;
    for (int w = 0; w < WAYS; w++)
      if (valid[w][pf_target[IW-1:0]] && tags[w][pf_target[IW-1:0]] == pf_target[26:IW])
        pf_target_cached = 1'b1;
  end

  always_comb begin
    mem_req_valid = 1'b0;
    mem_req_addr  = '0;
    if (mstate == M_IDLE) begin
      if (miss && !pf_buf_match) begin
        mem_req_valid = 1'b1; mem_req_addr = {miss_line, 5'b0};
      end else if (!miss && pf_pending && !pf_target_cached) begin
        mem_req_valid = 1'b1; mem_req_addr = {pf_target, 5'b0};
      end
    end
  end

  assign stat_miss   = miss && mstate == M_IDLE && !pf_buf_match && mem_req_valid && mem_req_ready;
  assign stat_pf_hit = miss && mstate == M_IDLE && pf_buf_match;

  task automatic install(input logic [26:0] la, input logic [LINE_BITS-1:0] d);
    logic w;
    w = repl[la[IW-1:0]];
    data[w][la[IW-1:0]]  <= d;
    tags[w][la[IW-1:0]]  <= la[26:IW];
    valid[w][la[IW-1:0]] <= 1'b1;
    repl[la[IW-1:0]]     <= ~w;
  endtask

  always_ff @(posedge clk) begin
    if (rst) begin
      s_valid      <= 1'b0;
      s_pc         <= '0;
      s_tag        <= 1'b0;
      for (int w = 0; w < WAYS; w++) valid[w] <= '0;
      repl         <= '0;
      mstate       <= M_IDLE;
      pf_pending   <= 1'b0;
      pf_target    <= '0;
      pf_buf_valid <= 1'b0;
      pf_buf_addr  <= '0;
      inflight_addr <= '0;
    end else begin
      if (req_ready) begin
        s_valid <= req_valid;
        s_pc    <= req_pc;
        s_tag   <= req_tag;
      end
      if (hit && s_valid) repl[s_idx] <= ~hit_way;
      unique case (mstate)
        M_IDLE: begin
          if (miss && pf_buf_match) begin
            install(miss_line, pf_buf_data);
            pf_buf_valid <= 1'b0;
            pf_pending   <= 1'b1;
            pf_target    <= miss_line + 1'b1;
          end else if (mem_req_valid && mem_req_ready) begin
            inflight_addr <= mem_req_addr[31:5];
            mstate        <= miss ? M_DEMAND : M_PREFETCH;
            if (!miss) pf_pending <= 1'b0;
          end else if (!miss && pf_pending && pf_target_cached) begin
            pf_pending <= 1'b0;
          end
        end
        M_DEMAND: if (mem_resp_valid) begin
          install(inflight_addr, mem_resp_data);
          pf_pending <= 1'b1;
          pf_target  <= inflight_addr + 1'b1;
          mstate     <= M_IDLE;
        end
        M_PREFETCH: if (mem_resp_valid) begin
          pf_buf_valid <= 1'b1;
          pf_buf_addr  <= inflight_addr;
          pf_buf_data  <= mem_resp_data;
          mstate       <= M_IDLE;
        end
        default: mstate <= M_IDLE;
      endcase
    end
  end
endmodule
