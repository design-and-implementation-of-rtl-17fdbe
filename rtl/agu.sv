// agu: address generation unit of the controller.
//
// Five base registers, written by the host through the controller
// (base_we/base_idx/base_wdata), and six address functions selected by the
// context word:
//   AF_BASE     base + imm                       (fixed table or key word)
//   AF_LOOP     base + imm + loop index          (round key of the iteration)
//   AF_LOOP_REV base + imm - loop index          (keys in reverse order)
//   AF_DATA     base + data byte of the tile     (table look-up, per tile)
//   AF_CHUNK    base + imm + chunk number        (sections of a long addition)
//   AF_ABIT     base + imm + loop index / (8*NPE) (word holding multiplier bit)
// rd_addr has one address per tile, identical for all tiles except with
// AF_DATA; wr_addr is always base + wchunk (Montgomery write-back), without
// imm, so a write can share a cycle with a read of another region.
// Combinational except for the base registers, which reset to zero.
// Register count and function count follow the described controller; the
// functions themselves are this design's choice.
module agu
  import fp_pkg::*;
#(
  parameter int NTILE = NUM_TILE,
  parameter int NPE   = NUM_PE,
  parameter int AW    = MU_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          base_we,
  input  logic [2:0]    base_idx,
  input  logic [AW-1:0] base_wdata,
  input  af_e           afn,
  input  logic [2:0]    base_sel,
  input  logic [AW-1:0] imm,
  input  logic [LOOP_W-1:0] loop_idx,
  input  logic [AW-1:0] rchunk,
  input  logic [AW-1:0] wchunk,
  input  byte_t         lut_byte [NTILE],
  output logic [AW-1:0] rd_addr  [NTILE],
  output logic [AW-1:0] wr_addr
);

  logic [AW-1:0] base_q [NUM_BASE];
  logic [AW-1:0] b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_BASE; i++) base_q[i] <= '0;
    end else if (base_we && int'(base_idx) < NUM_BASE) begin
      base_q[base_idx] <= base_wdata;
    end
  end

  assign b = (int'(base_sel) < NUM_BASE) ? base_q[base_sel] : '0;

  always_comb begin
    for (int t = 0; t < NTILE; t++) begin
      unique case (afn)
        AF_BASE:     rd_addr[t] = b + imm;
        AF_LOOP:     rd_addr[t] = b + imm + AW'(loop_idx);
        AF_LOOP_REV: rd_addr[t] = b + imm - AW'(loop_idx);
        AF_DATA:     rd_addr[t] = b + AW'(lut_byte[t]);
        AF_CHUNK:    rd_addr[t] = b + imm + rchunk;
        AF_ABIT:     rd_addr[t] = b + imm + AW'(loop_idx / LOOP_W'(8 * NPE));
        default:     rd_addr[t] = b + imm;
      endcase
    end
    wr_addr = b + wchunk;
  end

endmodule
