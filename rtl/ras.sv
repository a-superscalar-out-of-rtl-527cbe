// ras: return address stack, two entries as in the design description,
// updated speculatively in fetch. It is a circular buffer: push advances the
// top pointer and writes the return address, pop returns the top and moves the
// pointer back, so an overflow silently overwrites the oldest entry.
// For recovery each branch checkpoints the top pointer and the top value; a
// restore writes both back. Outputs are combinational; state changes at the
// clock edge, with restore taking priority over push/pop.
module ras
  import ooo_pkg::*;
#(
  parameter int DEPTH = RAS_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     push,
  input  logic [31:0]              push_addr,
  input  logic                     pop,
  output logic [31:0]              top,
  output logic [$clog2(DEPTH)-1:0] ptr_out,
  output logic [31:0]              below_top,   // value that becomes the top after a pop
  input  logic                     restore_valid,
  input  logic [$clog2(DEPTH)-1:0] restore_ptr,
  input  logic [31:0]              restore_top
);
  localparam int PW = $clog2(DEPTH);
  logic [31:0]   stack [DEPTH];
  logic [PW-1:0] ptr;

  assign top       = stack[ptr];
  assign below_top = stack[PW'(ptr - 1'b1)];
  assign ptr_out   = ptr;

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0;
      for (int i = 0; i < DEPTH; i++) stack[i] <= '0;
    end else if (restore_valid) begin
      ptr        <= restore_ptr;
      stack[restore_ptr] <= restore_top;
    end else if (push) begin
      ptr <= PW'(ptr + 1'b1);
      stack[PW'(ptr + 1'b1)] <= push_addr;
    end else if (pop) begin
      ptr <= PW'(ptr - 1'b1);
    end
  end
endmodule
