// tb_mdu: all eight RV32M operations on random and corner-case operands
// (zero divisor, most negative dividend over -1) against a reference. Checks
// the latency: a multiply answers two cycles after issue, a divide 34. Also
// checks that a squashed divide produces no result.
module tb_mdu;
  import ooo_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  br_t br;
  exe_t in;
  logic ready;
  cdb_t out;
  mdu dut (.*);
  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_md(logic [2:0] f, logic [31:0] a, logic [31:0] b);
    logic signed [63:0] p;
    case (f)
      3'b000: return a * b;
      3'b001: begin p = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}); return p[63:32]; end
      3'b010: begin p = $signed({{32{a[31]}}, a}) * $signed({32'b0, b}); return p[63:32]; end
      3'b011: begin p = {32'b0, a} * {32'b0, b}; return p[63:32]; end
      3'b100: return (b == 0) ? '1 : (a == 32'h8000_0000 && b == '1) ? a : 32'($signed(a) / $signed(b));
      3'b101: return (b == 0) ? '1 : a / b;
      3'b110: return (b == 0) ? a : (a == 32'h8000_0000 && b == '1) ? '0 : 32'($signed(a) % $signed(b));
      default: return (b == 0) ? a : a % b;
    endcase
  endfunction

  initial begin
    int lat, exp_lat;
    logic [31:0] exp;
    bit kill;
    br = '0; in = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      in = '0;
      in.valid = 1;
      in.i.uop.op = 4'($urandom_range(0, 7));
      in.i.uop.writes_rd = 1;
      in.i.pd = preg_t'($urandom());
      in.i.bmask = 4'b0100;
      in.a = $urandom(); in.b = $urandom();
      case ($urandom_range(0, 5))
        0: in.b = 0;
        1: begin in.a = 32'h8000_0000; in.b = '1; end
        2: in.b = $urandom_range(1, 9);
        3: in.a = -$urandom_range(1, 1000);
        default: ;
      endcase
      exp = ref_md(in.i.uop.op[2:0], in.a, in.b);
      exp_lat = in.i.uop.op[2] ? 34 : 2;
      kill = in.i.uop.op[2] && ($urandom_range(0, 9) == 0);
      @(negedge clk);
      in.valid = 0;
      lat = 1;
      if (kill) begin
        br.valid = 1; br.mispredict = 1; br.onehot = 4'b0100;
        @(negedge clk);
        br = '0;
        repeat (40) begin
          @(negedge clk);
          if (out.valid) begin failures++; $display("squashed divide produced a result"); end
        end
        checks++;
        continue;
      end
      while (!out.valid && lat < 60) begin @(negedge clk); lat++; end
      checks += 2;
      if (out.data !== exp || out.pd !== in.i.pd) begin
        failures++; $display("op %0d a %h b %h: got %h expected %h", in.i.uop.op, in.a, in.b, out.data, exp);
      end
      if (lat != exp_lat) begin failures++; $display("latency %0d expected %0d", lat, exp_lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
