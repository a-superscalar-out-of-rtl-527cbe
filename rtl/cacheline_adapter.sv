// cacheline_adapter: non-blocking bridge between the two caches and a DRAM
// port that moves 64-bit beats, four beats per 256-bit line.
// The instruction cache may have one line read outstanding. The data cache
// pushes tagged requests into a small in-order queue (reads and writebacks);
// reads it has sent wait in a table of outstanding requests. A writeback is
// serialised into four 64-bit beats on consecutive accepted cycles. Read data
// comes back as four consecutive beats tagged with the line address (raddr);
// the adapter collects them and hands the line to the I-cache if its
// outstanding address matches, otherwise to the data-cache table entry with
// that address, returning that entry's ID. Answers are registered.
// DRAM protocol (this implementation's assumption): a read is one cycle with
// dram_read and dram_ready high; a write is four cycles with dram_write high,
// a beat advancing when dram_ready is high. Requests from the two caches are
// granted in round-robin order; the I-cache read and the D-cache queue head
// compete, and a write holds the port until its last beat.
module cacheline_adapter
  import ooo_pkg::*;
#(
  parameter int DQ_DEPTH = 2,
  parameter int D_TBL    = 4,
  parameter int ID_W     = 2
) (
  input  logic                 clk,
  input  logic                 rst,
  // I-cache side
  input  logic                 i_req_valid,
  input  logic [31:0]          i_req_addr,
  output logic                 i_req_ready,
  output logic                 i_resp_valid,
  output logic [LINE_BITS-1:0] i_resp_data,
  // D-cache side
  input  logic                 d_req_valid,
  input  logic                 d_req_we,
  input  logic [31:0]          d_req_addr,
  input  logic [LINE_BITS-1:0] d_req_wdata,
  input  logic [ID_W-1:0]      d_req_id,
  output logic                 d_req_ready,
  output logic                 d_resp_valid,
  output logic [LINE_BITS-1:0] d_resp_data,
  output logic [ID_W-1:0]      d_resp_id,
  // DRAM side
  output logic [31:0]          dram_addr,
  output logic                 dram_read,
  output logic                 dram_write,
  output logic [63:0]          dram_wdata,
  input  logic                 dram_ready,
  input  logic [31:0]          dram_raddr,
  input  logic [63:0]          dram_rdata,
  input  logic                 dram_rvalid
);
  typedef struct packed {
    logic                 we;
    logic [31:0]          addr;
    logic [LINE_BITS-1:0] wdata;
    logic [ID_W-1:0]      id;
  } dreq_t;

  localparam int QW = $clog2(DQ_DEPTH);
  localparam int TW = $clog2(D_TBL);

  dreq_t          dq [DQ_DEPTH];
  logic [QW:0]    dq_rd, dq_wr;
  logic           dq_empty, dq_full;
  dreq_t          dh;

  logic           i_out;
  logic [31:0]    i_addr;
  logic [D_TBL-1:0] t_valid;
  logic [31:0]    t_addr [D_TBL];
  logic [ID_W-1:0] t_id  [D_TBL];
  logic           t_free_ok;
  logic [TW-1:0]  t_free;

  logic           wr_active;
  logic [1:0]     wr_beat;
  logic [LINE_BITS-1:0] wr_data;
  logic [31:0]    wr_addr;
  logic           rr;           // 1: D-cache has priority this time

  assign dq_empty    = dq_rd == dq_wr;
  assign dq_full     = (dq_wr - dq_rd) == (QW+1)'(DQ_DEPTH);
  assign dh          = dq[dq_rd[QW-1:0]];
  assign d_req_ready = !dq_full;

  always_comb begin
    t_free_ok = 1'b0; t_free = '0;
    for (int i = D_TBL-1; i >= 0; i--)
      if (!t_valid[i]) begin t_free_ok = 1'b1; t_free = TW'(i); end
  end

  // arbitration
  logic d_can, i_can, grant_d, grant_i;
  assign d_can   = !wr_active && !dq_empty && (dh.we || t_free_ok);
  assign i_can   = !wr_active && i_req_valid && !i_out;
  assign grant_d = d_can && (rr || !i_can);
  assign grant_i = i_can && !grant_d;

  always_comb begin
    dram_read  = 1'b0;
    dram_write = 1'b0;
    dram_addr  = '0;
    dram_wdata = '0;
    if (wr_active) begin
      dram_write = 1'b1;
      dram_addr  = wr_addr;
      dram_wdata = wr_data[64*wr_beat +: 64];
    end else if (grant_d) begin
      dram_addr = dh.addr;
      if (dh.we) begin
        dram_write = 1'b1;
        dram_wdata = dh.wdata[63:0];
      end else begin
        dram_read  = 1'b1;
      end
    end else if (grant_i) begin
      dram_read = 1'b1;
      dram_addr = i_req_addr;
    end
  end
  assign i_req_ready = grant_i && dram_ready;

  // read-data collection
  logic [1:0]   r_beat;
  logic [191:0] r_buf;
  logic         r_done;
  logic [LINE_BITS-1:0] r_line;
  logic         r_to_i;
  logic         r_hit_ok;
  logic [TW-1:0] r_hit;
  assign r_done = dram_rvalid && r_beat == 2'd3;
  assign r_line = {dram_rdata, r_buf};
  assign r_to_i = i_out && i_addr == dram_raddr;
  always_comb begin
    r_hit_ok = 1'b0; r_hit = '0;
    for (int i = D_TBL-1; i >= 0; i--)
      if (t_valid[i] && t_addr[i] == dram_raddr) begin r_hit_ok = 1'b1; r_hit = TW'(i); end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dq_rd <= '0; dq_wr <= '0;
      i_out <= 1'b0;
      t_valid <= '0;
      wr_active <= 1'b0;
      wr_beat <= '0;
      rr <= 1'b0;
      r_beat <= '0;
      i_resp_valid <= 1'b0;
      d_resp_valid <= 1'b0;
    end else begin
      if (d_req_valid && d_req_ready) begin
        dq[dq_wr[QW-1:0]] <= '{we: d_req_we, addr: d_req_addr, wdata: d_req_wdata, id: d_req_id};
        dq_wr <= dq_wr + 1'b1;
      end
      if (wr_active) begin
        if (dram_ready) begin
          wr_beat <= wr_beat + 1'b1;
          if (wr_beat == 2'd3) wr_active <= 1'b0;
        end
      end else if (grant_d && dram_ready) begin
        dq_rd <= dq_rd + 1'b1;
        rr    <= 1'b0;
        if (dh.we) begin
          wr_active <= 1'b1;
          wr_beat   <= 2'd1;
          wr_data   <= dh.wdata;
          wr_addr   <= dh.addr;
        end else begin
          t_valid[t_free] <= 1'b1;
          t_addr[t_free]  <= dh.addr;
          t_id[t_free]    <= dh.id;
        end
      end else if (grant_i && dram_ready) begin
        i_out  <= 1'b1;
        i_addr <= i_req_addr;
        rr     <= 1'b1;
      end

      i_resp_valid <= 1'b0;
      d_resp_valid <= 1'b0;
      if (dram_rvalid) begin
        r_beat <= r_beat + 1'b1;
        r_buf  <= {dram_rdata, r_buf[191:64]};
        if (r_done) begin
          if (r_to_i) begin
            i_out        <= 1'b0;
            i_resp_valid <= 1'b1;
            i_resp_data  <= r_line;
          end else if (r_hit_ok) begin
            t_valid[r_hit] <= 1'b0;
            d_resp_valid   <= 1'b1;
            d_resp_data    <= r_line;
            d_resp_id      <= t_id[r_hit];
          end
        end
      end
    end
  end
endmodule
