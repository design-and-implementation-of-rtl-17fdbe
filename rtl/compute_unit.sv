// compute_unit: the computation unit (CU), a 1-D array of 8-bit PEs.
//
// Parallel mode (AES and data moves): every PE executes the same operation,
// taken from ctl, on operands read from its own registers or from the
// registers of the PEs further down the same AES column (PE k holds state
// byte k, so column = k/4, row = k%4).  This is how MixColumn, InvMixColumn
// and AddRoundKey are built from XOR and X_TIME steps.
//
// Propagation mode (Montgomery multiplication, MON): the PEs form one
// NUM_PE*8-bit adder with the carry rippling from PE 0 (least significant
// byte) to PE NUM_PE-1.  A long addition is processed one chunk per cycle
// (mon_chunk), chunk 0 first.  The extra MON circuits are:
//   * operand select: at chunk 0 the quotient bit q = T[0] ^ (a_i & B[0])
//     and the multiplier bit a_i pick the addend {0, B, N, B+N}; the choice
//     is held for the rest of the iteration;
//   * carry chain: the carry out of a chunk enters the next chunk;
//   * shift chain: a chunk's sum is written back one cycle later, shifted
//     right by one with the low bit of the next chunk's sum on top;
//   * overflow adder: the running result T may need n+1 bits (T < 2N), so
//     its top bit is kept here (t_top) and on mon_flush the last carry, t_top
//     and the top bit of B+N (bn_top) are added to form bits n-1 and n.
// Write-back data (wb_data, wb_valid) is combinational in the cycle of the
// next chunk or of the flush.  mon_clear zeroes t_top before a multiplication.
// A final conditional subtraction of N is not done: results stay below 2N.
//
// The PE array, the two modes and the four Montgomery extras (operand select,
// carry chain, shift chain, overflow bit) follow the document.  Rippling the
// carry through all PEs in one cycle, the operand routing and the one-bit
// three-input overflow adder (the document names a half adder; here the top
// bit of B+N needs a third input) are this design's own.
//
// The Verilator lint reports the carry array pcin/pcout as a circular
// combinational path (UNOPTFLAT).  It is not a loop: pcin[k+1] depends only on pcout[k],
// which depends on pcin[k], so the chain is acyclic bit by bit; Verilator
// only sees the whole unpacked array as one signal.
module compute_unit
  import fp_pkg::*;
#(
  parameter int NPE = NUM_PE
) (
  input  logic     clk,
  input  logic     rst_n,
  // parallel mode
  input  cu_ctrl_t ctl,
  input  logic     ld_en   [NPE],
  input  reg_idx_t ld_rd,
  input  byte_t    ld_data [NPE],
  input  reg_idx_t rd_idx,
  output byte_t    rd_data [NPE],
  // propagation mode (MON)
  input  logic     mon_clear,
  input  logic     mon_chunk,
  input  logic     mon_first,
  input  logic     mon_flush,
  input  logic     mon_abit,
  input  logic     bn_top,
  input  byte_t    mon_t   [NPE],
  input  byte_t    mon_b   [NPE],
  input  byte_t    mon_n   [NPE],
  input  byte_t    mon_bn  [NPE],
  output logic     wb_valid,
  output byte_t    wb_data [NPE],
  output logic     t_top,
  output logic [1:0] sel_now,     // addend chosen at chunk 0 (for monitoring)
  output logic     last_carry     // carry out of the newest chunk
);

  byte_t    regs [NPE][NUM_REG];
  byte_t    pa [NPE], pb [NPE], pc [NPE], py [NPE];
  logic     pcin [NPE], pcout [NPE];
  pe_op_e   pop;
  logic     pwe;

  logic [1:0] sel_q, sel;
  logic       carry_q, have_prev, t_top_q;
  byte_t      prev [NPE];

  function automatic byte_t opnd(input byte_t r [NPE][NUM_REG], input int k, input opnd_t s);
    int src;
    src = (k / 4) * 4 + ((k % 4) + int'(s.nbr)) % 4;
    if (s.zero || src >= NPE || int'(s.idx) >= NUM_REG) return '0;
    return r[src][s.idx];
  endfunction

  // operand select for MON
  always_comb begin
    if (mon_first) sel = {mon_t[0][0] ^ (mon_abit & mon_b[0][0]), mon_abit};
    else           sel = sel_q;
  end
  assign sel_now = sel;

  always_comb begin
    pop = mon_chunk ? PE_ADD : (ctl.alu_en ? ctl.pe_op : PE_NOP);
    pwe = !mon_chunk && ctl.alu_en;
    for (int k = 0; k < NPE; k++) begin
      if (mon_chunk) begin
        pa[k] = mon_t[k];
        unique case (sel)
          2'b01:   pb[k] = mon_b[k];
          2'b10:   pb[k] = mon_n[k];
          2'b11:   pb[k] = mon_bn[k];
          default: pb[k] = '0;
        endcase
        pc[k] = '0;
      end else begin
        pa[k] = opnd(regs, k, ctl.sa);
        pb[k] = opnd(regs, k, ctl.sb);
        pc[k] = opnd(regs, k, ctl.sc);
      end
    end
  end

  // carry chain: only in propagation mode
  always_comb begin
    for (int k = 0; k < NPE; k++) begin
      if (k == 0) pcin[k] = (mon_chunk && !mon_first) ? carry_q : 1'b0;
      else        pcin[k] = (mon_chunk || ctl.prop) ? pcout[k-1] : 1'b0;
    end
  end

  for (genvar k = 0; k < NPE; k++) begin : g_pe
    pe u_pe (
      .clk, .rst_n,
      .op(pop), .a(pa[k]), .b(pb[k]), .c(pc[k]), .cin(pcin[k]),
      .we(pwe), .rd(ctl.rd),
      .ld_en(ld_en[k]), .ld_rd, .ld_data(ld_data[k]),
      .y(py[k]), .cout(pcout[k]), .regs(regs[k])
    );
  end

  always_comb
    for (int k = 0; k < NPE; k++)
      rd_data[k] = (int'(rd_idx) < NUM_REG) ? regs[k][rd_idx] : '0;

  // shift chain and overflow adder
  logic [1:0] top_sum;
  always_comb begin
    top_sum = {1'b0, carry_q} + {1'b0, t_top_q} + {1'b0, (sel_q == 2'b11) & bn_top};
    wb_valid = 1'b0;
    for (int k = 0; k < NPE; k++) wb_data[k] = '0;
    if ((mon_chunk && have_prev) || (mon_flush && have_prev)) begin
      wb_valid = 1'b1;
      for (int k = 0; k < NPE; k++) begin
        if (k < NPE - 1) wb_data[k] = {prev[k+1][0], prev[k][7:1]};
        else             wb_data[k] = {mon_flush ? top_sum[0] : py[0][0], prev[k][7:1]};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q     <= '0;
      carry_q   <= 1'b0;
      have_prev <= 1'b0;
      t_top_q   <= 1'b0;
      for (int k = 0; k < NPE; k++) prev[k] <= '0;
    end else begin
      if (mon_clear) begin
        t_top_q   <= 1'b0;
        have_prev <= 1'b0;
      end else if (mon_chunk) begin
        sel_q     <= sel;
        carry_q   <= pcout[NPE-1];
        have_prev <= 1'b1;
        prev      <= py;
      end else if (mon_flush) begin
        t_top_q   <= top_sum[1];
        have_prev <= 1'b0;
      end
    end
  end

  assign t_top      = t_top_q;
  assign last_carry = carry_q;

endmodule
