// pe: 8-bit processing element of the computation unit.
//
// Each PE owns a small register file (six 8-bit registers) and one operator
// that covers the operation classes the three ciphers need: XOR (two or three
// inputs), X_TIME followed by XOR (AES MixColumn), and 8-bit addition with
// carry (the long additions of Montgomery multiplication).  Operands a, b, c
// are chosen outside the PE by the computation unit, so a PE can also read the
// registers of the other PEs of its AES column.
//
//   op = PE_LOGIC   : y = a ^ b ^ c
//   op = PE_XTLOGIC : y = xtime(a ^ b) ^ c
//   op = PE_ADD     : {cout, y} = a + b + cin
//
// The operator is combinational (y, cout valid in the same cycle); when we is
// high y is written to register rd at the clock edge.  A separate load port
// (ld_en, ld_rd, ld_data) writes a byte from the memory unit or a permutation
// unit; it takes priority over the operator write.  The register count of six
// follows the chosen PE organisation; the exact operator set is this design's
// reading of it.  Registers reset to zero.
module pe
  import fp_pkg::*;
#(
  parameter int NREG = NUM_REG
) (
  input  logic     clk,
  input  logic     rst_n,
  input  pe_op_e   op,
  input  byte_t    a,
  input  byte_t    b,
  input  byte_t    c,
  input  logic     cin,
  input  logic     we,
  input  reg_idx_t rd,
  input  logic     ld_en,
  input  reg_idx_t ld_rd,
  input  byte_t    ld_data,
  output byte_t    y,
  output logic     cout,
  output byte_t    regs [NREG]
);

  byte_t rf [NREG];

  always_comb begin
    y    = '0;
    cout = 1'b0;
    unique case (op)
      PE_LOGIC:   y = a ^ b ^ c;
      PE_XTLOGIC: y = xtime(a ^ b) ^ c;
      PE_ADD:     {cout, y} = {1'b0, a} + {1'b0, b} + {8'd0, cin};
      default:    y = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) rf[i] <= '0;
    end else if (ld_en) begin
      if (int'(ld_rd) < NREG) rf[ld_rd] <= ld_data;
    end else if (we && op != PE_NOP) begin
      if (int'(rd) < NREG) rf[rd] <= y;
    end
  end

  assign regs = rf;

endmodule
