// tb_bru: random branches and jalr with random predictions; checks the
// resolution broadcast (valid, misprediction, mask bit), the correct next
// PC, the link value for jalr and the predictor training outputs, all one
// cycle after issue.
module tb_bru;
  import ooo_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  br_t br_in, br_out;
  exe_t in;
  cdb_t out;
  logic [31:0] redirect_pc;
  logic bp_update_valid, bp_update_taken, is_cond;
  ghr_t bp_update_idx;
  bru dut (.*);
  int checks = 0, failures = 0;
  int n_mis = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic taken;
    logic [31:0] nxt, pred;
    br_in = '0; in = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in = '0;
      in.valid = 1;
      in.i.uop.is_jalr = ($urandom_range(0, 3) == 0);
      in.i.uop.is_branch = !in.i.uop.is_jalr;
      in.i.uop.op = in.i.uop.is_jalr ? 4'd0 : 4'({$urandom_range(0, 1) ? 2'b11 : 2'b10, 1'b0} | $urandom_range(0, 1));
      if (!in.i.uop.is_jalr && $urandom_range(0, 2) == 0) in.i.uop.op = 4'($urandom_range(0, 1));
      in.i.uop.pc = $urandom() & ~32'd3;
      in.i.uop.imm = 32'($signed($urandom_range(0, 4095)) - 2048) & ~32'd1;
      in.i.uop.ghr = ghr_t'($urandom());
      in.i.uop.writes_rd = in.i.uop.is_jalr;
      in.i.btag = btag_t'($urandom());
      in.a = $urandom_range(0, 3) == 0 ? 32'h8000_0000 : $urandom_range(0, 5);
      in.b = $urandom_range(0, 5);
      case (in.i.uop.op[2:0])
        3'b000: taken = in.a == in.b;
        3'b001: taken = in.a != in.b;
        3'b100: taken = $signed(in.a) < $signed(in.b);
        3'b101: taken = $signed(in.a) >= $signed(in.b);
        3'b110: taken = in.a < in.b;
        default: taken = in.a >= in.b;
      endcase
      if (in.i.uop.is_jalr) nxt = (in.a + in.i.uop.imm) & ~32'd1;
      else nxt = taken ? in.i.uop.pc + in.i.uop.imm : in.i.uop.pc + 4;
      in.i.uop.pred_taken = $urandom_range(0, 1);
      in.i.uop.pred_target = $urandom_range(0, 1) ? nxt : $urandom();
      pred = in.i.uop.pred_taken ? in.i.uop.pred_target : in.i.uop.pc + 4;
      @(negedge clk);
      checks += 4;
      if (!br_out.valid || br_out.mispredict !== (pred != nxt) || br_out.onehot !== (bmask_t'(1) << in.i.btag)) begin
        failures++; $display("resolution wrong");
      end
      if (redirect_pc !== nxt) begin failures++; $display("next pc %h vs %h", redirect_pc, nxt); end
      if (in.i.uop.is_jalr && (out.data !== in.i.uop.pc + 4 || !out.wr)) begin failures++; $display("link wrong"); end
      if (bp_update_valid !== in.i.uop.is_branch ||
          (in.i.uop.is_branch && (bp_update_taken !== taken ||
           bp_update_idx !== (in.i.uop.pc[10:2] ^ in.i.uop.ghr)))) begin
        failures++; $display("training wrong");
      end
      n_mis += int'(br_out.mispredict);
    end
    checks++;
    if (n_mis == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
