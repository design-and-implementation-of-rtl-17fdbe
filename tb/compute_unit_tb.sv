// compute_unit_tb: checks both modes of the computation unit.
//  * parallel mode: AES MixColumns (two PE steps, operands taken from the
//    PEs of the same column) against a GF(2^8) model, and the FIPS-197
//    column example db 13 53 45 -> 8e 4d a1 bc;
//  * propagation mode: a complete 256-bit Montgomery multiplication (two
//    128-bit sections, 256 iterations).  Each iteration's write-back is
//    compared with T' = (T + a_i*B + q*N) / 2 computed with wide integers,
//    and the end result with T * 2^256 = A * B (mod N).  Counts how often the
//    four addends and a carry out of the top section occur.
module compute_unit_tb;
  import fp_pkg::*;
  localparam int NB = 256, C = NB / 128;

  logic clk = 0, rst_n = 0;
  cu_ctrl_t ctl;
  logic ld_en [NUM_PE];
  reg_idx_t ld_rd, rd_idx;
  byte_t ld_data [NUM_PE], rd_data [NUM_PE];
  logic mon_clear, mon_chunk, mon_first, mon_flush, mon_abit, bn_top;
  byte_t mon_t [NUM_PE], mon_b [NUM_PE], mon_n [NUM_PE], mon_bn [NUM_PE];
  logic wb_valid, t_top, last_carry;
  byte_t wb_data [NUM_PE];
  logic [1:0] sel_now;
  int checks = 0, failures = 0;
  int sel_cnt [4];
  int carry_cnt = 0;

  compute_unit dut (.*);

  always #5 clk = ~clk;
  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic opnd_t op_r(int nbr, int idx);
    return '{zero: 1'b0, nbr: 2'(nbr), idx: 3'(idx)};
  endfunction

  byte_t st [NUM_PE];
  logic [NB:0]   T, Tn;
  logic [NB-1:0] A, B, N, Bv, Nv;
  logic [NB:0]   BN;
  logic [NB+1:0] S;
  logic [NB-1:0] got_t;
  logic [3*NB:0] lhs, rhs;

  task automatic alu(pe_op_e op, int rd, opnd_t a, opnd_t b, opnd_t c);
    @(negedge clk);
    ctl = '0; ctl.alu_en = 1; ctl.pe_op = op; ctl.rd = 3'(rd);
    ctl.sa = a; ctl.sb = b; ctl.sc = c;
    @(negedge clk);
    ctl = '0;
  endtask

  task automatic put_chunk(int j);
    for (int k = 0; k < NUM_PE; k++) begin
      mon_t[k]  = T[128*j + 8*k +: 8];
      mon_b[k]  = Bv[128*j + 8*k +: 8];
      mon_n[k]  = Nv[128*j + 8*k +: 8];
      mon_bn[k] = BN[128*j + 8*k +: 8];
    end
  endtask

  task automatic grab(int j);
    if (!wb_valid) begin
      failures++; checks++;
      $display("FAIL no write-back for section %0d", j);
    end
    for (int k = 0; k < NUM_PE; k++) got_t[128*j + 8*k +: 8] = wb_data[k];
  endtask

  initial begin
    ctl = '0; ld_rd = 0; rd_idx = 0;
    mon_clear = 0; mon_chunk = 0; mon_first = 0; mon_flush = 0; mon_abit = 0; bn_top = 0;
    for (int k = 0; k < NUM_PE; k++) begin
      ld_en[k] = 0; ld_data[k] = 0; mon_t[k] = 0; mon_b[k] = 0; mon_n[k] = 0; mon_bn[k] = 0;
    end
    for (int i = 0; i < 4; i++) sel_cnt[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // ---- parallel mode: MixColumns ----
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      for (int k = 0; k < NUM_PE; k++) begin
        ld_en[k] = 1;
        st[k] = (n == 0) ? ((k % 4 == 0) ? 8'hdb : (k % 4 == 1) ? 8'h13 : (k % 4 == 2) ? 8'h53 : 8'h45)
                         : byte_t'($urandom);
        ld_data[k] = st[k];
      end
      ld_rd = 0;
      @(negedge clk);
      for (int k = 0; k < NUM_PE; k++) ld_en[k] = 0;
      alu(PE_XTLOGIC, 1, op_r(0, 0), op_r(1, 0), op_r(1, 0));
      alu(PE_LOGIC,   1, op_r(0, 1), op_r(2, 0), op_r(3, 0));
      rd_idx = 1; #1;
      for (int k = 0; k < NUM_PE; k++) begin
        int c0, r;
        byte_t e;
        c0 = (k / 4) * 4;
        r = k % 4;
        e = gmul(8'h02, st[c0 + r]) ^ gmul(8'h03, st[c0 + (r+1)%4]) ^ st[c0 + (r+2)%4] ^ st[c0 + (r+3)%4];
        check($sformatf("mixcol lane %0d", k), 128'(rd_data[k]), 128'(e));
        if (n == 0) check("fips column", 128'(rd_data[k]),
                          128'((r == 0) ? 8'h8e : (r == 1) ? 8'h4d : (r == 2) ? 8'ha1 : 8'hbc));
      end
      rd_idx = 0;
    end

    // ---- propagation mode: 256-bit Montgomery multiplication ----
    for (int rep = 0; rep < 3; rep++) begin
      N = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      N[NB-1] = 1'b1; N[0] = 1'b1;
      if (rep == 0) N[NB-2:NB-32] = '1;           // large modulus: top carries happen
      A = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom} % N;
      B = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom} % N;
      Bv = B; Nv = N; BN = {1'b0, B} + {1'b0, N};
      bn_top = BN[NB];
      T = '0;
      @(negedge clk); mon_clear = 1;
      @(negedge clk); mon_clear = 0;
      for (int i = 0; i < NB; i++) begin
        logic q;
        mon_abit = A[i];
        q = T[0] ^ (A[i] & B[0]);
        S = {1'b0, T} + (A[i] ? {2'b0, B} : '0) + (q ? {2'b0, N} : '0);
        Tn = S[NB+1:1];
        for (int j = 0; j < C; j++) begin
          put_chunk(j);
          mon_chunk = 1; mon_first = (j == 0);
          #1;
          if (j == 0) sel_cnt[sel_now]++;
          if (j == 0) check("operand select", 128'(sel_now), 128'({q, A[i]}));
          if (j > 0) grab(j - 1);
          @(negedge clk);
        end
        mon_chunk = 0; mon_first = 0; mon_flush = 1;
        if (last_carry) carry_cnt++;
        #1;
        grab(C - 1);
        @(negedge clk);
        mon_flush = 0;
        check("t_top", 128'(t_top), 128'(Tn[NB]));
        check("iteration", got_t[127:0], Tn[127:0]);
        check("iteration hi", got_t[NB-1:128], Tn[NB-1:128]);
        T = {t_top, got_t};
      end
      lhs = ((3*NB+1)'(T) << NB) % (3*NB+1)'(N);
      rhs = ((3*NB+1)'(A) * (3*NB+1)'(B)) % (3*NB+1)'(N);
      check("montgomery result", lhs[127:0], rhs[127:0]);
      check("below 2N", 128'(T < {N, 1'b0}), 128'(1));
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (sel_cnt[i] == 0) begin failures++; $display("FAIL addend %0d never selected", i); end
    end
    checks++;
    if (carry_cnt == 0) begin failures++; $display("FAIL no top carry seen"); end
    $display("addend counts 0/B/N/B+N: %0d %0d %0d %0d, top carries %0d",
             sel_cnt[0], sel_cnt[1], sel_cnt[2], sel_cnt[3], carry_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
