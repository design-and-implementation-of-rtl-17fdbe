// context_memory: the reloadable context memory (CM).
//
// Holds one context word per step of a task (AES, DES, Montgomery or any new
// sequence of XOR / addition / look-up steps).  The host writes it through
// the controller (we, waddr, wdata); the controller reads the word at the
// program counter combinationally (raddr -> rdata in the same cycle).
// Written as a register array; depth is this design's choice.  Contents are
// not reset: a task must be written before it is started.
module context_memory
  import fp_pkg::*;
#(
  parameter int DEPTH = CM_DEPTH,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  ctx_t          wdata,
  input  logic [AW-1:0] raddr,
  output ctx_t          rdata
);

  ctx_t mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];

endmodule
