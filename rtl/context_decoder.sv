// context_decoder: the context decoder (CD).
//
// Turns the current context word and the step number within it into the
// control signals of the computation unit (CU), memory unit (MU), the
// permutation units and the DES unit, and tells the controller which step is
// the last of the word (op_last).  Two decode modes:
//   * parallel mode: every PE and every tile buffer receives the same
//     control (CX_ALU, CX_LDW, CX_ROT, the DES words); CX_SBOX gives each tile
//     its own data-dependent address, lanes k%LPT = 0 first, then 1, ...;
//   * propagation mode: the PEs are chained by their carries (CX_MON, or
//     CX_ALU with PE_ADD).  For CX_MON the addend of every section is chosen
//     by the CU from the computed data (operand select), and the decoder
//     steps through the sections of the long addition.
// Step schedule of the multi-cycle words (step 0 first):
//   CX_SBOX   : LPT+1 steps - read lanes of offset s, load offset s-1
//   CX_SBOXR  : as CX_SBOX; the top takes the look-up bytes through the
//               PCU-1 rotate, so the result is also byte-rotated
//   CX_LDW    : 2 steps     - read word, load slot into rd
//   CX_DES_LD : 2 steps     - read key word, load DES unit via PCU-1
//   CX_DES_RND: 2 steps     - the two cycles of a DES round
//   CX_MON    : C+1 steps   - one iteration of a C-section Montgomery
//               multiplication (C >= 2): step 0 reads the multiplier word
//               (AF_ABIT: base + imm + i/(8*NPE)); step s = 1..C reads section
//               s-1 (AF_CHUNK: base + s-1); step s = 2..C adds section s-2;
//               step s = 3..C writes section s-3 back.  The last two cycles
//               of an iteration (add section C-1 with write-back of C-2, then
//               the flush of C-1) overlap steps 0 and 1 of the next
//               iteration, which use neither the adder nor the write port;
//               every section is written back before the next iteration
//               reads it.  An iteration therefore costs C+1 cycles.
//   CX_MON_END: 2 steps     - those two tail cycles after the last iteration.
// Combinational.  The two decode modes follow the document; the step
// schedule, the overlap of Montgomery iterations and the word encoding are
// this design's own.  In propagation mode the carry crosses all PEs within
// one cycle, so the control is broadcast rather than passed PE to PE.
module context_decoder
  import fp_pkg::*;
#(
  parameter int NPE = NUM_PE,
  parameter int L   = LPT,
  parameter int AW  = MU_AW
) (
  input  logic          valid,
  input  ctx_t          ctx,
  input  logic [7:0]    step,
  input  logic [AW-1:0] chunks,
  input  logic          first_iter,
  output cu_ctrl_t      cu,
  output reg_idx_t      rd_idx,
  output logic          ld_any,
  output logic          ld_lane [NPE],
  output ld_src_e       ld_src,
  output reg_idx_t      ld_rd,
  output logic [1:0]    ld_slot,
  output logic          mu_rd_en,
  output af_e           afn,
  output logic [AW-1:0] imm,
  output logic [7:0]    lut_off,
  output logic          mu_wr_en,
  output logic          mon_clear,
  output logic          mon_chunk,
  output logic          mon_first,
  output logic          mon_flush,
  output logic          abit_cap,
  output logic [AW-1:0] rchunk,
  output logic [AW-1:0] wchunk,
  output logic          des_load,
  output logic          des_start,
  output logic          op_last
);

  logic [8:0] c9;
  assign c9 = 9'(chunks);


  always_comb begin
    cu        = '0;
    rd_idx    = '0;
    ld_any    = 1'b0;
    for (int k = 0; k < NPE; k++) ld_lane[k] = 1'b0;
    ld_src    = LD_MU;
    ld_rd     = ctx.rd;
    ld_slot   = ctx.slot;
    mu_rd_en  = 1'b0;
    afn       = ctx.afn;
    imm       = ctx.imm;
    lut_off   = '0;
    mu_wr_en  = 1'b0;
    mon_clear = 1'b0;
    mon_chunk = 1'b0;
    mon_first = 1'b0;
    mon_flush = 1'b0;
    abit_cap  = 1'b0;
    rchunk    = '0;
    wchunk    = '0;
    des_load  = 1'b0;
    des_start = 1'b0;
    op_last   = 1'b1;

    if (valid) begin
      unique case (ctx.op)
        CX_ALU: begin
          cu.alu_en = 1'b1;
          cu.pe_op  = ctx.pe_op;
          cu.prop   = (ctx.pe_op == PE_ADD);
          cu.rd     = ctx.rd;
          cu.sa     = ctx.sa;
          cu.sb     = ctx.sb;
          cu.sc     = ctx.sc;
        end
        CX_SBOX, CX_SBOXR: begin
          rd_idx   = ctx.rd;
          op_last  = (int'(step) >= L);
          if (int'(step) < L) begin
            mu_rd_en = 1'b1;
            lut_off  = step;
          end
          if (step != 0) begin
            ld_any = 1'b1;
            for (int k = 0; k < NPE; k++) ld_lane[k] = ((k % L) == int'(step) - 1);
          end
        end
        CX_LDW: begin
          op_last = (step != 0);
          if (step == 0) mu_rd_en = 1'b1;
          else begin
            ld_any = 1'b1;
            for (int k = 0; k < NPE; k++) ld_lane[k] = 1'b1;
          end
        end
        CX_ROT: begin
          rd_idx = ctx.rd;
          ld_any = 1'b1;
          ld_src = LD_ROT;
          for (int k = 0; k < NPE; k++) ld_lane[k] = 1'b1;
        end
        CX_DES_LD: begin
          rd_idx  = ctx.rd;
          op_last = (step != 0);
          if (step == 0) mu_rd_en = 1'b1;
          else           des_load = 1'b1;
        end
        CX_DES_RND: begin
          op_last   = (step != 0);
          des_start = (step == 0);
        end
        CX_DES_FIN: begin
          ld_any = 1'b1;
          ld_src = LD_DES;
          for (int k = 0; k < NPE; k++) ld_lane[k] = 1'b1;
        end
        CX_MON: begin
          // own work: multiplier read, section reads, adds and write-backs
          cu.prop  = 1'b1;
          op_last  = ({1'b0, step} == c9);
          afn      = (step == 0) ? AF_ABIT : AF_CHUNK;
          imm      = (step == 0) ? ctx.imm : '0;
          mu_rd_en = ({1'b0, step} <= c9);
          if (step == 0) mon_clear = first_iter;
          else           rchunk    = AW'(step - 8'd1);
          if (step == 8'd1) abit_cap = 1'b1;
          if (step >= 8'd2) begin
            mon_chunk = 1'b1;            // section step-2
            mon_first = (step == 8'd2);
          end
          if (step >= 8'd3) begin
            mu_wr_en = 1'b1;             // gated by the CU's wb_valid
            wchunk   = AW'(step - 8'd3);
          end
          // tail of the previous iteration, overlapped with this head
          if (!first_iter) begin
            // last two cycles of the previous iteration: step 0 adds section
            // C-1 and writes back C-2, step 1 flushes (writes back) C-1
            if (step <= 8'd1) begin
              mu_wr_en  = 1'b1;
              mon_chunk = (step == 8'd0);
              mon_flush = (step == 8'd1);
              wchunk    = (step == 8'd0) ? chunks - AW'(2) : chunks - AW'(1);
            end
          end
        end
        CX_MON_END: begin
          // drains the last iteration: the same two tail cycles
          cu.prop   = 1'b1;
          op_last   = (step != 0);
          mu_wr_en  = 1'b1;
          mon_chunk = (step == 8'd0);
          mon_flush = (step != 8'd0);
          wchunk    = (step == 8'd0) ? chunks - AW'(2) : chunks - AW'(1);
        end
        default: ;
      endcase
    end
  end

endmodule
