// rv_ref: reference RV32IM instruction-set simulator for the testbenches.
// step() executes one instruction from its own word-addressed memory and
// reports the PC, the destination register and the value written, so that
// a testbench can compare the core's retirement trace against it.
package rv_ref;
class rv_iss;
  logic [31:0] x [32];
  logic [31:0] pc;
  logic [31:0] mem [];   // word addressed

  function new(int words);
    mem = new[words];
    foreach (mem[i]) mem[i] = '0;
    foreach (x[i]) x[i] = '0;
    pc = '0;
  endfunction

  function automatic logic [31:0] rd32(logic [31:0] a);
    return mem[a[31:2] % mem.size()];
  endfunction

  function automatic void wr(logic [31:0] a, logic [31:0] d, logic [3:0] m);
    logic [31:0] w;
    w = mem[a[31:2] % mem.size()];
    for (int b = 0; b < 4; b++) if (m[b]) w[8*b +: 8] = d[8*b +: 8];
    mem[a[31:2] % mem.size()] = w;
  endfunction

  // returns 1 if rd (out_rd) is written with out_val
  function automatic logic step(output logic [31:0] out_pc, output logic [4:0] out_rd,
                                output logic [31:0] out_val);
    logic [31:0] ins, a, b, res, npc, addr, w;
    logic [4:0]  rd;
    logic [2:0]  f3;
    logic        we;
    logic signed [63:0] p;
    ins = rd32(pc);
    a = x[ins[19:15]]; b = x[ins[24:20]];
    rd = ins[11:7]; f3 = ins[14:12];
    npc = pc + 4; we = 1'b0; res = '0;
    unique case (ins[6:0])
      7'b0110111: begin we = 1; res = {ins[31:12], 12'b0}; end
      7'b0010111: begin we = 1; res = pc + {ins[31:12], 12'b0}; end
      7'b1101111: begin we = 1; res = pc + 4;
        npc = pc + {{12{ins[31]}}, ins[19:12], ins[20], ins[30:21], 1'b0}; end
      7'b1100111: begin we = 1; res = pc + 4; npc = (a + {{20{ins[31]}}, ins[31:20]}) & ~32'd1; end
      7'b1100011: begin
        logic t;
        case (f3)
          3'b000: t = a == b;
          3'b001: t = a != b;
          3'b100: t = $signed(a) < $signed(b);
          3'b101: t = $signed(a) >= $signed(b);
          3'b110: t = a < b;
          default: t = a >= b;
        endcase
        if (t) npc = pc + {{20{ins[31]}}, ins[7], ins[30:25], ins[11:8], 1'b0};
      end
      7'b0000011: begin
        addr = a + {{20{ins[31]}}, ins[31:20]};
        w = rd32(addr) >> (8 * addr[1:0]);
        we = 1;
        case (f3)
          3'b000: res = {{24{w[7]}}, w[7:0]};
          3'b001: res = {{16{w[15]}}, w[15:0]};
          3'b100: res = {24'b0, w[7:0]};
          3'b101: res = {16'b0, w[15:0]};
          default: res = w;
        endcase
      end
      7'b0100011: begin
        addr = a + {{20{ins[31]}}, ins[31:25], ins[11:7]};
        case (f3)
          3'b000: wr(addr, b << (8 * addr[1:0]), 4'b0001 << addr[1:0]);
          3'b001: wr(addr, b << (8 * addr[1:0]), 4'b0011 << addr[1:0]);
          default: wr(addr, b, 4'b1111);
        endcase
      end
      7'b0010011, 7'b0110011: begin
        logic [31:0] bb;
        bb = ins[5] ? b : {{20{ins[31]}}, ins[31:20]};
        we = 1;
        if (ins[5] && ins[31:25] == 7'b0000001) begin
          case (f3)
            3'b000: res = a * b;
            3'b001: begin p = $signed({{32{a[31]}}, a}) * $signed({{32{b[31]}}, b}); res = p[63:32]; end
            3'b010: begin p = $signed({{32{a[31]}}, a}) * $signed({32'b0, b}); res = p[63:32]; end
            3'b011: begin p = {32'b0, a} * {32'b0, b}; res = p[63:32]; end
            3'b100: res = (b == 0) ? '1 : (a == 32'h8000_0000 && b == '1) ? a : 32'($signed(a) / $signed(b));
            3'b101: res = (b == 0) ? '1 : a / b;
            3'b110: res = (b == 0) ? a : (a == 32'h8000_0000 && b == '1) ? '0 : 32'($signed(a) % $signed(b));
            default: res = (b == 0) ? a : a % b;
          endcase
        end else begin
          case (f3)
            3'b000: res = (ins[5] && ins[30]) ? a - bb : a + bb;
            3'b001: res = a << bb[4:0];
            3'b010: res = {31'b0, $signed(a) < $signed(bb)};
            3'b011: res = {31'b0, a < bb};
            3'b100: res = a ^ bb;
            3'b101: res = ins[30] ? 32'($signed(a) >>> bb[4:0]) : a >> bb[4:0];
            3'b110: res = a | bb;
            default: res = a & bb;
          endcase
        end
      end
      default: ;
    endcase
    out_pc = pc;
    out_rd = rd;
    out_val = res;
    if (we && rd != 0) x[rd] = res;
    pc = npc;
    return we && rd != 0;
  endfunction
endclass
endpackage
