// context_decoder_tb: walks each context word type through its steps and
// checks the decoded controls: parallel-mode ALU fields, the two-pass S-box
// schedule (even lanes then odd lanes; plain and through the rotate), the word load, rotate and DES
// sequences, and the Montgomery schedule for 2, 3 and 5 sections: three
// overlapped iterations plus the drain word are compared cycle by cycle with
// the plain one-iteration schedule (reads, section adds, write-back, flush,
// operand-select mode and last step) shifted by C+1 cycles per iteration.
module context_decoder_tb;
  import fp_pkg::*;

  logic valid, first_iter;
  ctx_t ctx;
  logic [7:0] step, lut_off;
  logic [MU_AW-1:0] chunks, rchunk, wchunk, imm;
  cu_ctrl_t cu;
  reg_idx_t rd_idx, ld_rd;
  logic ld_any, mu_rd_en, mu_wr_en, mon_clear, mon_chunk, mon_first, mon_flush;
  logic abit_cap, des_load, des_start, op_last;
  logic ld_lane [NUM_PE];
  ld_src_e ld_src;
  logic [1:0] ld_slot;
  af_e afn;
  int checks = 0, failures = 0;

  context_decoder dut (.*);

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

  function automatic int lanes();
    int m = 0;
    for (int k = 0; k < NUM_PE; k++) if (ld_lane[k]) m |= (1 << k);
    return m;
  endfunction

  initial begin
    valid = 1; first_iter = 0; step = 0; chunks = 2; ctx = '0;
    // ALU word
    ctx.op = CX_ALU; ctx.pe_op = PE_XTLOGIC; ctx.rd = 3; ctx.sa = '{1'b0, 2'd1, 3'd2};
    #1;
    check("alu_en", cu.alu_en, 1); check("pe_op", cu.pe_op, PE_XTLOGIC);
    check("alu rd", cu.rd, 3); check("alu sa", cu.sa, ctx.sa); check("alu prop", cu.prop, 0);
    check("alu last", op_last, 1);
    ctx.pe_op = PE_ADD; #1;
    check("add is propagation", cu.prop, 1);
    // S-box, plain and through the byte rotate (same schedule)
    for (int v = 0; v < 2; v++) begin
      ctx = '0; ctx.op = v ? CX_SBOXR : CX_SBOX; ctx.rd = 2; ctx.slot = 1;
      step = 0; #1;
      check("sbox s0 read", mu_rd_en, 1); check("sbox s0 off", lut_off, 0);
      check("sbox s0 ld", ld_any, 0); check("sbox s0 last", op_last, 0); check("rd_idx", rd_idx, 2);
      step = 1; #1;
      check("sbox s1 read", mu_rd_en, 1); check("sbox s1 off", lut_off, 1);
      check("sbox s1 lanes", lanes(), 32'h5555); check("sbox s1 last", op_last, 0);
      check("sbox slot", ld_slot, 1); check("sbox src", ld_src, LD_MU);
      step = 2; #1;
      check("sbox s2 read", mu_rd_en, 0); check("sbox s2 lanes", lanes(), 32'hAAAA);
      check("sbox s2 last", op_last, 1);
    end
    // word load
    ctx.op = CX_LDW; step = 0; #1;
    check("ldw s0", {mu_rd_en, ld_any, op_last}, 3'b100);
    step = 1; #1;
    check("ldw s1", {mu_rd_en, ld_any, op_last}, 3'b011); check("ldw lanes", lanes(), 32'hFFFF);
    // rotate, DES
    ctx.op = CX_ROT; step = 0; #1;
    check("rot", {ld_any, op_last}, 2'b11); check("rot src", ld_src, LD_ROT);
    ctx.op = CX_DES_LD; step = 0; #1;
    check("desld s0", {mu_rd_en, des_load, op_last}, 3'b100);
    step = 1; #1;
    check("desld s1", {mu_rd_en, des_load, op_last}, 3'b011);
    ctx.op = CX_DES_RND; step = 0; #1;
    check("desrnd s0", {des_start, op_last}, 2'b10);
    step = 1; #1;
    check("desrnd s1", {des_start, op_last}, 2'b01);
    ctx.op = CX_DES_FIN; step = 0; #1;
    check("desfin", {ld_any, op_last}, 2'b11); check("desfin src", ld_src, LD_DES);
    // Montgomery: three overlapped iterations and the drain word, compared
    // cycle by cycle with the plain (non-overlapped) per-iteration schedule
    // shifted by C+1 cycles per iteration
    for (int c = 2; c <= 8; c = c * 2 - 1) begin
      int P, tot;
      int e_rd [64], e_rc [64], e_ch [64], e_fi [64], e_fl [64], e_wr [64], e_wc [64], e_ab [64];
      P = c + 1;
      tot = 3 * P + 2;
      for (int t = 0; t < 64; t++) begin
        e_rd[t] = 0; e_rc[t] = -1; e_ch[t] = 0; e_fi[t] = 0; e_fl[t] = 0;
        e_wr[t] = 0; e_wc[t] = -1; e_ab[t] = 0;
      end
      for (int i = 0; i < 3; i++) begin
        int t0;
        t0 = i * P;
        e_rd[t0] = 1; e_ab[t0 + 1] = 1;
        for (int j = 0; j < c; j++) begin
          e_rd[t0 + j + 1] = 1; e_rc[t0 + j + 1] = j;
          e_ch[t0 + j + 2] = 1; e_fi[t0 + j + 2] = (j == 0);
          if (j >= 1) begin e_wr[t0 + j + 2] = 1; e_wc[t0 + j + 2] = j - 1; end
        end
        e_fl[t0 + c + 2] = 1; e_wr[t0 + c + 2] = 1; e_wc[t0 + c + 2] = c - 1;
      end
      chunks = MU_AW'(c);
      for (int t = 0; t < tot; t++) begin
        int it, st;
        it = t / P; st = t % P;
        ctx = '0; ctx.imm = 9'd7;
        if (it < 3) begin ctx.op = CX_MON; step = 8'(st); first_iter = (it == 0); end
        else begin ctx.op = CX_MON_END; step = 8'(t - 3 * P); first_iter = 0; end
        #1;
        check("mon prop", cu.prop, 1);
        check("mon read", mu_rd_en, e_rd[t]);
        if (it < 3 && st == 0) check("mon abit word", {afn, imm}, {AF_ABIT, 9'd7});
        if (e_rc[t] >= 0) check("mon rchunk", {afn, imm, rchunk}, {AF_CHUNK, 9'd0, 9'(e_rc[t])});
        check("mon abit", abit_cap, e_ab[t]);
        check("mon chunk", mon_chunk, e_ch[t]);
        check("mon first", mon_first, e_fi[t]);
        check("mon flush", mon_flush, e_fl[t]);
        check("mon write", mu_wr_en, e_wr[t]);
        if (e_wc[t] >= 0) check("mon wchunk", wchunk, e_wc[t]);
        check("mon clear", mon_clear, (t == 0) ? 1 : 0);
        check("mon last", op_last, (it < 3) ? (st == c) : (t == tot - 1));
      end
    end
    // invalid
    valid = 0; ctx.op = CX_ALU; ctx.pe_op = PE_LOGIC; #1;
    check("idle", {cu.alu_en, ld_any, mu_rd_en, mu_wr_en}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
