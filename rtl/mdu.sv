// mdu: multiply/divide unit for the RV32M instructions.
// It accepts one instruction when ready is high. Multiplies (mul, mulh,
// mulhsu, mulhu) compute a 64-bit product from sign- or zero-extended operands
// and deliver it one cycle after the input register. Divides and remainders
// use a radix-2 restoring divider that takes 32 iterations on the magnitudes
// and fixes the signs at the end; division by zero and the overflow case give
// the results the RISC-V specification requires. The instruction in flight
// keeps its branch mask up to date and is abandoned if squashed. The result is
// held on the multiply/divide result bus for one cycle.
// The latencies and the divider algorithm are this implementation's choice.
module mdu
  import ooo_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  br_t  br,
  input  exe_t in,
  output logic ready,
  output cdb_t out
);
  typedef enum logic [1:0] {S_IDLE, S_MUL, S_DIV, S_DONE} state_e;
  state_e      state;
  iss_t        cur;
  logic [31:0] a, b;
  logic [5:0]  cnt;
  logic [31:0] quo, rem, dvs;
  logic        neg_q, neg_r;
  logic [31:0] result;

  logic [63:0] prod;
  logic [32:0] rem_shift, rem_sub;
  logic        a_neg, b_neg;
  logic [31:0] a_abs, b_abs;

  assign ready = (state == S_IDLE) || (state == S_DONE);

  always_comb begin
    unique case (cur.uop.op[1:0])
      2'b00:   prod = a * b;
      2'b01:   prod = 64'($signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}));
      2'b10:   prod = 64'($signed({{32{a[31]}}, a}) * $signed({32'b0, b}));
      default: prod = {32'b0, a} * {32'b0, b};
    endcase
    rem_shift = {rem, quo[31]};
    rem_sub   = rem_shift - {1'b0, dvs};
    a_neg = in.i.uop.op[2:0] inside {3'b100, 3'b110} && in.a[31];
    b_neg = in.i.uop.op[2:0] inside {3'b100, 3'b110} && in.b[31];
    a_abs = a_neg ? -in.a : in.a;
    b_abs = b_neg ? -in.b : in.b;
  end

  logic killed;
  assign killed = bm_killed(cur.bmask, br);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
    end else begin
      cur.bmask <= bm_upd(cur.bmask, br);
      unique case (state)
        S_IDLE, S_DONE: begin
          state <= S_IDLE;
          if (in.valid && !bm_killed(in.i.bmask, br)) begin
            cur       <= in.i;
            cur.bmask <= bm_upd(in.i.bmask, br);
            a <= in.a;
            b <= in.b;
            if (in.i.uop.op[2]) begin
              state <= S_DIV;
              cnt   <= '0;
              quo   <= a_abs;
              rem   <= '0;
              dvs   <= b_abs;
              neg_q <= (a_neg ^ b_neg) && in.b != 0;
              neg_r <= a_neg;
            end else begin
              state <= S_MUL;
            end
          end
        end
        S_MUL: begin
          if (killed) state <= S_IDLE;
          else begin
            result <= (cur.uop.op[1:0] == 2'b00) ? prod[31:0] : prod[63:32];
            state  <= S_DONE;
          end
        end
        S_DIV: begin
          if (killed) state <= S_IDLE;
          else if (cnt == 6'd32) begin
            if (b == 0)
              result <= cur.uop.op[1] ? a : 32'hFFFF_FFFF;
            else if (cur.uop.op[1])
              result <= neg_r ? -rem : rem;
            else
              result <= neg_q ? -quo : quo;
            state <= S_DONE;
          end else begin
            cnt <= cnt + 1'b1;
            if (!rem_sub[32]) begin
              rem <= rem_sub[31:0];
              quo <= {quo[30:0], 1'b1};
            end else begin
              rem <= rem_shift[31:0];
              quo <= {quo[30:0], 1'b0};
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign out = '{valid: state == S_DONE, wr: cur.uop.writes_rd, pd: cur.pd, rob: cur.rob,
                 data: result};
endmodule
