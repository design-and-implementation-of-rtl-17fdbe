// pcu2: permutation & combination unit 2 (PCU-2).
//
// Applies the DES inverse initial permutation IP^-1 to the pre-output
// {R16, L16} of each DES block and spreads the result over the byte lanes
// (block b to lanes 8b..8b+7, most significant byte first), ready to be
// written into the PE register files.  Purely combinational.
//
// Placing IP^-1 in a second permutation unit follows the document; the table
// is the DES standard's and the lane order is this design's own.
module pcu2
  import fp_pkg::*;
  import des_pkg::*;
#(
  parameter int NPE = NUM_PE,
  parameter int NB  = NUM_DES
) (
  input  logic [63:0] preout [NB],
  output byte_t       lanes  [NPE]
);

  always_comb begin
    for (int k = 0; k < NPE; k++) lanes[k] = '0;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 8; i++)
        if (8*b+i < NPE) lanes[8*b+i] = des_iip(preout[b])[63-8*i -: 8];
  end

endmodule
