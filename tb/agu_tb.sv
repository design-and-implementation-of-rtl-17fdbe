// agu_tb: loads the five base registers and checks each of the six address
// functions (and the write address) against arithmetic done here, with
// random immediates, loop indices, section numbers and look-up bytes.
module agu_tb;
  import fp_pkg::*;

  logic clk = 0, rst_n = 0;
  logic base_we;
  logic [2:0] base_idx, base_sel;
  logic [MU_AW-1:0] base_wdata, imm, rchunk, wchunk, wr_addr;
  af_e afn;
  logic [LOOP_W-1:0] loop_idx;
  byte_t lut_byte [NUM_TILE];
  logic [MU_AW-1:0] rd_addr [NUM_TILE];
  logic [MU_AW-1:0] bases [NUM_BASE];
  int checks = 0, failures = 0;

  agu dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    base_we = 0; base_idx = 0; base_wdata = 0; base_sel = 0; imm = 0;
    rchunk = 0; wchunk = 0; afn = AF_BASE; loop_idx = 0;
    for (int t = 0; t < NUM_TILE; t++) lut_byte[t] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NUM_BASE; i++) begin
      @(negedge clk);
      base_we = 1; base_idx = 3'(i); base_wdata = $urandom; bases[i] = base_wdata;
    end
    @(negedge clk); base_we = 0;
    for (int n = 0; n < 500; n++) begin
      int b, e;
      base_sel = $urandom_range(0, NUM_BASE - 1);
      afn = af_e'($urandom_range(0, 5));
      imm = $urandom; loop_idx = $urandom; rchunk = $urandom; wchunk = $urandom;
      for (int t = 0; t < NUM_TILE; t++) lut_byte[t] = $urandom;
      #1;
      b = bases[base_sel];
      for (int t = 0; t < NUM_TILE; t++) begin
        unique case (afn)
          AF_BASE:     e = b + imm;
          AF_LOOP:     e = b + imm + loop_idx;
          AF_LOOP_REV: e = b + imm - loop_idx;
          AF_DATA:     e = b + lut_byte[t];
          AF_CHUNK:    e = b + imm + rchunk;
          default:     e = b + imm + loop_idx / 128;
        endcase
        check($sformatf("fn %0d tile %0d", afn, t), int'(rd_addr[t]), ((e % MU_DEPTH) + MU_DEPTH) % MU_DEPTH);
      end
      check("wr_addr", int'(wr_addr), (b + wchunk) % MU_DEPTH);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
