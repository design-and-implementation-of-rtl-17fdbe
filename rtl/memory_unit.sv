// memory_unit: the memory unit (MU), NTILE tile buffers side by side.
//
// Lane k of the computation unit is served by tile k / LPT.  Every tile has
// its own read address, so the MU performs NTILE independent table look-ups
// per cycle (16 AES S-box look-ups take two cycles, even lanes then odd
// lanes) or, with all tiles given the same address, reads one wide word of
// SLOTS bytes per lane for Montgomery mode.  Writes share one address and use
// a lane mask and a slot mask, so a single byte slot of any set of lanes can
// be written (Montgomery write-back of T, or a host filling a table).
//
// Timing: as tile_buffer, read data appears the cycle after rd_en.
// Outputs are per lane: rd_data[k][s] is byte slot s of lane k.
//
// Eight tile buffers, eight look-ups per cycle and the four-byte preload for
// Montgomery follow the document.  The depth, the mask-based write port and
// keeping the inverse S-box in a second byte slot are this design's own.
module memory_unit
  import fp_pkg::*;
#(
  parameter int NTILE = NUM_TILE,
  parameter int NPE   = NUM_PE,
  parameter int DEPTH = MU_DEPTH,
  localparam int AW   = $clog2(DEPTH),
  localparam int L    = NPE / NTILE
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr [NTILE],
  output byte_t         rd_data [NPE][SLOTS],
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [NPE-1:0]   wr_lane,
  input  logic [SLOTS-1:0] wr_slot,
  input  byte_t         wr_data [NPE][SLOTS]
);

  for (genvar t = 0; t < NTILE; t++) begin : g_tile
    byte_t         pd [L*SLOTS];
    byte_t         wd [L*SLOTS];
    logic [L*SLOTS-1:0] be;

    always_comb
      for (int l = 0; l < L; l++)
        for (int s = 0; s < SLOTS; s++) begin
          wd[l*SLOTS+s] = wr_data[t*L+l][s];
          be[l*SLOTS+s] = wr_lane[t*L+l] & wr_slot[s];
        end

    tile_buffer #(.DEPTH(DEPTH), .LANES(L)) u_tile (
      .clk, .rst_n,
      .rd_en, .rd_addr(rd_addr[t]), .pre_data(pd),
      .wr_en, .wr_addr, .wr_be(be), .wr_data(wd)
    );

    always_comb
      for (int l = 0; l < L; l++)
        for (int s = 0; s < SLOTS; s++)
          rd_data[t*L+l][s] = pd[l*SLOTS+s];
  end

endmodule
