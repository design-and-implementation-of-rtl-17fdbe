// ctrl: the central controller (Ctrl).
//
// A five-state machine drives the engine:
//   S_IDLE  - waiting for a host command (cmd_ready high);
//   S_FLOW  - flow register load: writes a control-flow register or one of
//             the AGU base registers (CMD_FLOW, register number in cmd_addr);
//   S_CMW   - context memory write (CMD_CM, word address in cmd_addr);
//   S_START - execution start: in_req asks the host for the input block,
//             which is taken in this cycle; the loop state is initialised;
//   S_EXEC  - task execution: the context word at the program counter is
//             decoded and executed, one step per cycle, until CX_END (done).
// Control-flow registers give one loop (not nested): start and end address,
// iteration count and loop-index step.  When the last step of the word at
// the loop end address finishes and iterations remain, the program counter
// returns to the loop start and the loop index advances by the step.  The
// index feeds the AGU (round keys, multiplier bits).  Two more registers hold
// the number of 128-bit sections of a long addition and bit n of B+N.
// Commands are accepted only in S_IDLE; each takes one extra cycle.
//
// The five states, the single non-nested loop and its four loop registers
// follow the document; register widths, the command encoding and the two
// extra registers for Montgomery are this design's own.
module ctrl
  import fp_pkg::*;
#(
  parameter int AW  = MU_AW,
  parameter int CAW = CM_AW
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cmd_valid,
  input  cmd_e           cmd,
  input  logic [7:0]     cmd_addr,
  input  logic [63:0]    cmd_data,
  output logic           cmd_ready,
  // context memory
  output logic           cm_we,
  output logic [CAW-1:0] cm_waddr,
  output ctx_t           cm_wdata,
  output logic [CAW-1:0] pc,
  input  cx_op_e         cur_op,
  input  logic           op_last,
  // AGU
  output logic           base_we,
  output logic [2:0]     base_idx,
  output logic [AW-1:0]  base_wdata,
  output logic [LOOP_W-1:0] loop_idx,
  output logic           first_iter,
  // execution
  output logic           exec,
  output logic [7:0]     step,
  output logic [AW-1:0]  chunks,
  output logic           bn_top,
  output logic           in_req,
  output logic           done,
  output logic           busy
);

  typedef enum logic [2:0] {S_IDLE, S_FLOW, S_CMW, S_START, S_EXEC} state_e;
  state_e state_q;

  logic [7:0]        caddr_q;
  logic [63:0]       cdata_q;
  logic [CAW-1:0]    pc_q, lstart_q, lend_q;
  logic [LOOP_W-1:0] lcount_q, lrem_q, lstep_q, lidx_q;
  logic [AW-1:0]     chunks_q;
  logic              bntop_q;
  logic [7:0]        step_q;
  logic              done_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      caddr_q  <= '0;
      cdata_q  <= '0;
      pc_q     <= '0;
      lstart_q <= '0;
      lend_q   <= '0;
      lcount_q <= '0;
      lrem_q   <= '0;
      lstep_q  <= '0;
      lidx_q   <= '0;
      chunks_q <= '0;
      bntop_q  <= 1'b0;
      step_q   <= '0;
      done_q   <= 1'b0;
    end else begin
      done_q <= 1'b0;
      unique case (state_q)
        S_IDLE: if (cmd_valid) begin
          caddr_q <= cmd_addr;
          cdata_q <= cmd_data;
          unique case (cmd)
            CMD_FLOW:  state_q <= S_FLOW;
            CMD_CM:    state_q <= S_CMW;
            CMD_START: state_q <= S_START;
            default:   state_q <= S_IDLE;
          endcase
        end
        S_FLOW: begin
          unique case (caddr_q[3:0])
            FR_LSTART: lstart_q <= cdata_q[CAW-1:0];
            FR_LEND:   lend_q   <= cdata_q[CAW-1:0];
            FR_LCOUNT: lcount_q <= cdata_q[LOOP_W-1:0];
            FR_LSTEP:  lstep_q  <= cdata_q[LOOP_W-1:0];
            FR_CHUNKS: chunks_q <= cdata_q[AW-1:0];
            FR_BNTOP:  bntop_q  <= cdata_q[0];
            default: ;  // base registers live in the AGU
          endcase
          state_q <= S_IDLE;
        end
        S_CMW: state_q <= S_IDLE;
        S_START: begin
          pc_q    <= '0;
          step_q  <= '0;
          lidx_q  <= '0;
          lrem_q  <= (lcount_q == 0) ? LOOP_W'(1) : lcount_q;
          state_q <= S_EXEC;
        end
        S_EXEC: begin
          if (cur_op == CX_END) begin
            done_q  <= 1'b1;
            state_q <= S_IDLE;
          end else if (op_last) begin
            step_q <= '0;
            if (pc_q == lend_q && lrem_q > 1) begin
              pc_q   <= lstart_q;
              lrem_q <= lrem_q - 1'b1;
              lidx_q <= lidx_q + lstep_q;
            end else begin
              pc_q <= pc_q + 1'b1;
            end
          end else begin
            step_q <= step_q + 8'd1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign cmd_ready  = (state_q == S_IDLE);
  assign cm_we      = (state_q == S_CMW);
  assign cm_waddr   = caddr_q[CAW-1:0];
  assign cm_wdata   = ctx_t'(cdata_q[CTX_W-1:0]);
  assign base_we    = (state_q == S_FLOW) && (caddr_q[3:0] < 4'(NUM_BASE));
  assign base_idx   = caddr_q[2:0];
  assign base_wdata = cdata_q[AW-1:0];
  assign pc         = pc_q;
  assign loop_idx   = lidx_q;
  assign first_iter = (lidx_q == 0);
  assign exec       = (state_q == S_EXEC);
  assign step       = step_q;
  assign chunks     = chunks_q;
  assign bn_top     = bntop_q;
  assign in_req     = (state_q == S_START);
  assign done       = done_q;
  assign busy       = (state_q != S_IDLE);

endmodule
