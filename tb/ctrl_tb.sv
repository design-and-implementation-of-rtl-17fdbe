// ctrl_tb: drives the controller's host commands and plays the part of the
// context memory and decoder (a table of word types and step counts).
// Checks the five-state sequence (flow load, context write, start with
// in_req, execution, done), the context-memory and base-register write
// strobes, and the executed (pc, step, loop index) trace of a program with a
// loop of three iterations against a model of the loop rules.
module ctrl_tb;
  import fp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, cm_we, base_we, first_iter, exec, bn_top, in_req, done, busy, op_last;
  cmd_e cmd;
  logic [7:0] cmd_addr, step;
  logic [63:0] cmd_data;
  logic [CM_AW-1:0] cm_waddr, pc;
  ctx_t cm_wdata;
  cx_op_e cur_op;
  logic [2:0] base_idx;
  logic [MU_AW-1:0] base_wdata, chunks;
  logic [LOOP_W-1:0] loop_idx;
  int checks = 0, failures = 0;

  ctrl dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // program: word types and their step counts
  cx_op_e prog [6] = '{CX_ALU, CX_LDW, CX_ALU, CX_SBOX, CX_ALU, CX_END};
  int     len  [6] = '{1, 2, 1, 3, 1, 1};
  assign cur_op  = prog[pc < 6 ? pc : 5];
  assign op_last = (int'(step) == len[pc < 6 ? pc : 5] - 1);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic send(cmd_e c, int a, logic [63:0] d);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd = c; cmd_addr = 8'(a); cmd_data = d;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  int tr_pc [$], tr_step [$], tr_idx [$];
  int e_pc [$], e_step [$], e_idx [$];
  int cycles, saw_cm_we, saw_base_we, saw_in_req;

  always @(posedge clk) if (rst_n) begin
    if (exec && cur_op != CX_END) begin
      tr_pc.push_back(pc); tr_step.push_back(step); tr_idx.push_back(loop_idx);
    end
    if (cm_we) begin
      saw_cm_we++;
      check("cm addr", cm_waddr, 9); check("cm data", cm_wdata, 64'h1234);
    end
    if (base_we) begin
      saw_base_we++;
      check("base idx", base_idx, 3); check("base data", base_wdata, 77);
    end
    if (in_req) saw_in_req++;
  end

  initial begin
    cmd_valid = 0; cmd = CMD_FLOW; cmd_addr = 0; cmd_data = 0;
    saw_cm_we = 0; saw_base_we = 0; saw_in_req = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    send(CMD_CM, 9, 64'h1234);
    send(CMD_FLOW, 3, 77);            // base register 3
    send(CMD_FLOW, FR_LSTART, 1);
    send(CMD_FLOW, FR_LEND, 3);
    send(CMD_FLOW, FR_LCOUNT, 3);
    send(CMD_FLOW, FR_LSTEP, 2);
    send(CMD_FLOW, FR_CHUNKS, 5);
    send(CMD_FLOW, FR_BNTOP, 1);
    @(negedge clk);
    check("chunks", chunks, 5); check("bn_top", bn_top, 1);
    check("cm write", saw_cm_we, 1); check("base write", saw_base_we, 1);
    // expected trace
    e_pc.push_back(0); e_step.push_back(0); e_idx.push_back(0);
    for (int it = 0; it < 3; it++)
      for (int p = 1; p <= 3; p++)
        for (int s = 0; s < len[p]; s++) begin
          e_pc.push_back(p); e_step.push_back(s); e_idx.push_back(2 * it);
        end
    e_pc.push_back(4); e_step.push_back(0); e_idx.push_back(4);
    send(CMD_START, 0, 0);
    cycles = 0;
    while (!done && cycles < 200) begin @(negedge clk); cycles++; end
    check("done", done, 1);
    check("in_req cycles", saw_in_req, 1);
    check("trace length", tr_pc.size(), e_pc.size());
    for (int i = 0; i < e_pc.size() && i < tr_pc.size(); i++) begin
      check($sformatf("pc %0d", i), tr_pc[i], e_pc[i]);
      check($sformatf("step %0d", i), tr_step[i], e_step[i]);
      check($sformatf("idx %0d", i), tr_idx[i], e_idx[i]);
    end
    @(negedge clk);
    check("back to idle", {busy, cmd_ready}, 2'b01);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
