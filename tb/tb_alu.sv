// tb_alu: random operations of every ALU kind against a reference; the
// result must appear on the result bus one cycle after issue, and an
// instruction squashed at issue must not produce a result.
module tb_alu;
  import ooo_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  br_t br;
  exe_t in;
  cdb_t out;
  alu dut (.*);
  int checks = 0, failures = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_alu(alu_op_e op, logic [31:0] a, logic [31:0] b, logic [31:0] pc);
    case (op)
      ALU_ADD:  return a + b;
      ALU_SUB:  return a - b;
      ALU_SLL:  return a << b[4:0];
      ALU_SLT:  return ($signed(a) < $signed(b)) ? 1 : 0;
      ALU_SLTU: return (a < b) ? 1 : 0;
      ALU_XOR:  return a ^ b;
      ALU_SRL:  return a >> b[4:0];
      ALU_SRA:  return 32'($signed(a) >>> b[4:0]);
      ALU_OR:   return a | b;
      ALU_AND:  return a & b;
      default:  return pc + 4;
    endcase
  endfunction

  initial begin
    logic [31:0] exp;
    bit exp_valid;
    in = '0; br = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in = '0;
      in.valid = 1;
      in.i.uop.op = 4'($urandom_range(0, 10));
      in.i.uop.use_imm = $urandom_range(0, 1);
      in.i.uop.use_pc = $urandom_range(0, 3) == 0;
      in.i.uop.imm = $urandom();
      in.i.uop.pc = $urandom();
      in.i.uop.writes_rd = 1;
      in.i.pd = preg_t'($urandom());
      in.i.bmask = bmask_t'($urandom_range(0, 1));
      in.a = $urandom(); in.b = $urandom();
      if ($urandom_range(0, 1)) in.b = 32'($urandom_range(0, 40));
      br = '0;
      if ($urandom_range(0, 7) == 0) begin br.valid = 1; br.mispredict = 1; br.onehot = 4'b0001; end
      exp = ref_alu(alu_op_e'(in.i.uop.op), in.i.uop.use_pc ? in.i.uop.pc : in.a,
                    in.i.uop.use_imm ? in.i.uop.imm : in.b, in.i.uop.pc);
      exp_valid = !(br.valid && in.i.bmask[0]);
      @(negedge clk);
      checks++;
      if (out.valid !== exp_valid || (exp_valid && (out.data !== exp || out.pd !== in.i.pd))) begin
        failures++; $display("op %0d: got %h expected %h", in.i.uop.op, out.data, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
