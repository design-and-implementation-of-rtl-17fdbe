// tile_buffer: one tile of the memory unit (MU).
//
// A tile serves LPT neighbouring PE lanes.  It holds a single-port-read,
// single-port-write SRAM whose word carries SLOTS bytes for each lane, and a
// preload buffer: the register that receives the word read in the previous
// cycle.  In Montgomery mode one read brings the four bytes a lane needs for
// its next 8-bit addition (N, B, B+N and the running result T) and the write
// port puts back one byte (T) using the byte enables; the preload register
// hides the SRAM access so the adders never wait.  In AES/DES mode the same
// SRAM holds the 8-bit look-up tables (S-box in slot 0, inverse S-box in slot
// 1, addressed by the data byte) and the precomputed round keys.
//
// Timing: rd_en/rd_addr in cycle t, pre_data valid from cycle t+1 and held
// until the next read.  A write to the address being read in the same cycle
// returns the old data.  The SRAM is not reset; the preload register is.
// SRAM depth and word layout are this design's choices.
module tile_buffer
  import fp_pkg::*;
#(
  parameter int DEPTH = MU_DEPTH,
  parameter int LANES = LPT,
  localparam int AW   = $clog2(DEPTH),
  localparam int NB   = LANES * SLOTS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output byte_t         pre_data [NB],
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [NB-1:0] wr_be,
  input  byte_t         wr_data  [NB]
);

  logic [NB*8-1:0] mem [DEPTH];
  byte_t           pre_q [NB];

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int i = 0; i < NB; i++)
        if (wr_be[i]) mem[wr_addr][i*8 +: 8] <= wr_data[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NB; i++) pre_q[i] <= '0;
    end else if (rd_en) begin
      for (int i = 0; i < NB; i++) pre_q[i] <= mem[rd_addr][i*8 +: 8];
    end
  end

  assign pre_data = pre_q;

endmodule
