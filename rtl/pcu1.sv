// pcu1: permutation & combination unit 1 (PCU-1).
//
// Fixed wiring between the register files and the DES / computation units:
//   * AES byte rotate: the ShiftRows (inv = 0) or InvShiftRows (inv = 1)
//     permutation of the 16-byte state, lane k holding row k%4 of column
//     k/4; row r is rotated left (encryption) or right (decryption) by r;
//   * DES initial permutation IP of each of the NB 64-bit blocks; block b is
//     lanes 8b..8b+7 with lane 8b as the most significant byte;
//   * DES permuted choice 1 (PC-1) of the 64-bit key.
// Purely combinational; no flexible permutation network is provided, only
// the fixed permutations the three ciphers need.
// The rotate output is loaded into the PE registers (CX_ROT) or, in the top,
// used as the S-box look-up addresses (CX_SBOXR), which performs SubBytes
// and ShiftRows in one context word.
//
// The document assigns AES byte rotate, DES IP and PC-1 to this unit as fixed
// wiring; the tables themselves are the DES and AES standards'.  Byte lane
// order is this design's own.
module pcu1
  import fp_pkg::*;
  import des_pkg::*;
#(
  parameter int NPE = NUM_PE,
  parameter int NB  = NUM_DES
) (
  input  byte_t        blk  [NPE],
  input  logic         inv,
  input  logic [63:0]  key,
  output byte_t        rot  [NPE],
  output logic [63:0]  ip   [NB],
  output logic [55:0]  pc1
);

  // source lane of output lane k for the byte rotate
  function automatic int rot_src(int k, logic dir);
    int r, c, s;
    r = k % 4;
    c = (k % 16) / 4;
    s = dir ? 4 * ((c - r + 4) % 4) + r : 4 * ((c + r) % 4) + r;
    return (k / 16) * 16 + s;
  endfunction

  function automatic logic [63:0] block(input byte_t v [NPE], int b);
    logic [63:0] w;
    for (int i = 0; i < 8; i++)
      w[63-8*i -: 8] = (8*b+i < NPE) ? v[8*b+i] : 8'h00;
    return w;
  endfunction

  always_comb
    for (int k = 0; k < NPE; k++)
      rot[k] = (rot_src(k, inv) < NPE) ? blk[rot_src(k, inv)] : blk[k];

  always_comb
    for (int b = 0; b < NB; b++) ip[b] = des_ip(block(blk, b));

  assign pc1 = des_pc1(key);

endmodule
