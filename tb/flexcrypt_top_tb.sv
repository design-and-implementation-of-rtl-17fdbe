// flexcrypt_top_tb: end-to-end test of the whole engine at its default sizes.
//
// The testbench acts as the host: it computes the AES S-box and inverse
// S-box (multiplicative inverse in GF(2^8) followed by the affine map),
// expands the AES keys, writes tables and keys into the memory unit, loads
// context programs and flow registers, starts each task and checks the
// result against models written here:
//   * AES-128, -192 and -256 encryption and decryption (FIPS-197 vectors),
//     and AES-128 on random blocks against a reference cipher;
//   * DES encryption of two 64-bit blocks at once (published vector in
//     block 0) and decryption back; three-key 3DES (E-D-E) with the three
//     passes unrolled into 55 context words;
//   * Montgomery multiplication A*B*2^-n mod N for n = 256 ... 4096: the
//     result is compared bit for bit with a bit-serial model, and for n up
//     to 1024 also checked with wide-integer arithmetic (T*2^n = A*B mod N).
// Each task's cycle count is checked against the step schedule of its
// program.  Mechanisms counted (each must occur): byte rotate forward and
// inverse, S-box and inverse S-box look-ups, look-ups through the rotate, loop-backs, parallel and
// propagation mode, the four Montgomery addends, a carry out of the top
// section, both DES directions, context memory reloads.
// Memory map: S-boxes at 0, AES round keys at 256, DES keys at 272,
// Montgomery sections at 300 and multiplier words at 340.
module flexcrypt_top_tb;
  import fp_pkg::*;
  import des_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, hm_we, hm_re, in_req, done, busy, mon_t_top;
  cmd_e cmd;
  logic [7:0] cmd_addr;
  logic [63:0] cmd_data;
  logic [MU_AW-1:0] hm_addr;
  logic [NUM_PE-1:0] hm_lane;
  logic [SLOTS-1:0] hm_slot;
  logic [31:0] hm_wdata;
  byte_t hm_rdata [NUM_PE][SLOTS];
  logic [127:0] din, dout;
  int checks = 0, failures = 0;

  flexcrypt_top u_dut (.*);

  always #5 clk = ~clk;
  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory map (base registers)
  localparam int SBOX_BASE = 0, KEY_BASE = 256, DESKEY = 272, MON_BASE = 300, A_OFF = 40;

  task automatic check(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // ---------------- event counters ----------------
  int ev_rot_f, ev_rot_i, ev_sbox, ev_isbox, ev_loop, ev_par, ev_prop, ev_carry, ev_cmw;
  int ev_fused;   // look-ups through the byte rotate (CX_SBOXR)
  int ev_sel [4];
  int ev_des_e, ev_des_d;
  always @(posedge clk) if (rst_n) begin
    if (u_dut.exec) begin
      if (u_dut.ctx.op == CX_ROT) begin if (u_dut.ctx.inv) ev_rot_i++; else ev_rot_f++; end
      if (u_dut.ctx.op == CX_SBOXR && u_dut.step == 0) ev_fused++;
      if ((u_dut.ctx.op == CX_SBOX || u_dut.ctx.op == CX_SBOXR) && u_dut.step == 0) begin
        if (u_dut.ctx.slot == 1) ev_isbox++; else ev_sbox++;
      end
      if (u_dut.op_last && u_dut.pc == u_dut.u_ctrl.lend_q && u_dut.u_ctrl.lrem_q > 1) ev_loop++;
      if (u_dut.cu_ctl.alu_en) ev_par++;
      if (u_dut.mon_chunk) ev_prop++;
      if (u_dut.mon_first) ev_sel[u_dut.u_cu.sel_now]++;
      if (u_dut.mon_flush && u_dut.u_cu.last_carry) ev_carry++;
      if (u_dut.des_load) begin if (u_dut.ctx.inv) ev_des_d++; else ev_des_e++; end
    end
    if (u_dut.cm_we) ev_cmw++;
  end

  // ---------------- host helpers ----------------
  task automatic send(cmd_e c, int a, logic [63:0] d);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd = c; cmd_addr = 8'(a); cmd_data = d;
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic mwrite(int a, logic [NUM_PE-1:0] lanes, logic [SLOTS-1:0] slots, logic [31:0] d);
    @(negedge clk);
    hm_we = 1; hm_addr = MU_AW'(a); hm_lane = lanes; hm_slot = slots; hm_wdata = d;
    @(negedge clk);
    hm_we = 0;
  endtask

  task automatic mread(int a);
    @(negedge clk);
    hm_re = 1; hm_addr = MU_AW'(a);
    @(negedge clk);
    hm_re = 0;
  endtask

  function automatic opnd_t R(int nbr, int idx);
    return '{zero: 1'b0, nbr: 2'(nbr), idx: 3'(idx)};
  endfunction
  localparam opnd_t Z = '{zero: 1'b1, nbr: 2'd0, idx: 3'd0};

  function automatic ctx_t W(cx_op_e op, int rd = 0, pe_op_e pop = PE_NOP,
                             opnd_t sa = '0, opnd_t sb = '0, opnd_t sc = '0,
                             logic inv = 0, int slot = 0, af_e afn = AF_BASE,
                             int base = 0, int imm = 0);
    ctx_t c;
    c = '0;
    c.op = op; c.rd = 3'(rd); c.pe_op = pop; c.sa = sa; c.sb = sb; c.sc = sc;
    c.inv = inv; c.slot = 2'(slot); c.afn = afn; c.base = 3'(base); c.imm = MU_AW'(imm);
    return c;
  endfunction

  function automatic int steps(ctx_t c, int chunks);
    unique case (c.op)
      CX_SBOX, CX_SBOXR: return LPT + 1;
      CX_LDW, CX_DES_LD, CX_DES_RND, CX_MON_END: return 2;
      CX_MON:    return chunks + 1;
      default:   return 1;
    endcase
  endfunction

  ctx_t prog [$];
  int   lstart, lend, lcount;

  // load a program, its loop registers and run it on din; returns cycles
  task automatic run(int chunks, output int cycles, output int expect_cycles);
    for (int i = 0; i < prog.size(); i++) send(CMD_CM, i, 64'(prog[i]));
    send(CMD_FLOW, FR_LSTART, lstart);
    send(CMD_FLOW, FR_LEND, lend);
    send(CMD_FLOW, FR_LCOUNT, lcount);
    send(CMD_FLOW, FR_LSTEP, 1);
    send(CMD_FLOW, FR_CHUNKS, chunks);
    expect_cycles = 1;                              // S_START
    for (int i = 0; i < prog.size(); i++) begin
      int reps;
      reps = (i >= lstart && i <= lend) ? lcount : 1;
      expect_cycles += reps * steps(prog[i], chunks);
    end
    send(CMD_START, 0, 0);
    cycles = 1;
    while (!done && cycles < 1000000) begin @(negedge clk); cycles++; end
    cycles = cycles - 1;
  endtask

  // ---------------- AES model ----------------
  byte_t sbox [256], isbox [256];
  byte_t rk [15][16];

  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic byte_t ginv(byte_t a);     // a^254
    byte_t r = 1;
    for (int i = 0; i < 254; i++) r = gmul(r, a);
    return r;
  endfunction

  task automatic make_sbox();
    for (int x = 0; x < 256; x++) begin
      byte_t b, s;
      b = ginv(8'(x));
      for (int i = 0; i < 8; i++)
        s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ ((8'h63 >> i) & 1);
      sbox[x] = s;
      isbox[s] = 8'(x);
    end
  endtask

  // key expansion for nk = 4, 6 or 8 key words (AES-128/192/256)
  task automatic expand_key(logic [255:0] key, int nk);
    logic [31:0] w [60];
    byte_t rc;
    int nr;
    nr = nk + 6;
    rc = 8'h01;
    for (int i = 0; i < nk; i++) w[i] = key[255-32*i -: 32];
    for (int i = nk; i < 4 * (nr + 1); i++) begin
      logic [31:0] t;
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox[t[31:24]], sbox[t[23:16]], sbox[t[15:8]], sbox[t[7:0]]} ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        t = {sbox[t[31:24]], sbox[t[23:16]], sbox[t[15:8]], sbox[t[7:0]]};
      end
      w[i] = w[i-nk] ^ t;
    end
    for (int r = 0; r <= nr; r++)
      for (int k = 0; k < 16; k++) rk[r][k] = w[4*r + k/4][31-8*(k%4) -: 8];
    for (int r = 0; r <= nr; r++)
      for (int k = 0; k < 16; k++) mwrite(KEY_BASE + r, NUM_PE'(1) << k, 4'b0001, 32'(rk[r][k]));
  endtask

  function automatic logic [127:0] aes_enc_ref(logic [127:0] pt, int nr);
    byte_t s [16], t [16];
    for (int k = 0; k < 16; k++) s[k] = pt[127-8*k -: 8] ^ rk[0][k];
    for (int r = 1; r <= nr; r++) begin
      for (int k = 0; k < 16; k++) t[k] = sbox[s[4*(((k/4) + (k%4)) % 4) + k%4]];
      for (int c = 0; c < 4; c++)
        for (int i = 0; i < 4; i++)
          s[4*c+i] = (r == nr) ? t[4*c+i] :
                     gmul(2, t[4*c+i]) ^ gmul(3, t[4*c+(i+1)%4]) ^ t[4*c+(i+2)%4] ^ t[4*c+(i+3)%4];
      for (int k = 0; k < 16; k++) s[k] ^= rk[r][k];
    end
    for (int k = 0; k < 16; k++) aes_enc_ref[127-8*k -: 8] = s[k];
  endfunction

  // ---------------- DES model (standard tables, textbook structure) -------
  function automatic logic [63:0] des_ref(logic [63:0] blk, logic [63:0] key, logic dec);
    logic [27:0] c, d;
    logic [47:0] ks [16];
    logic [31:0] l, r, t;
    {c, d} = des_pc1(key);
    for (int i = 0; i < 16; i++) begin
      for (int s = 0; s < SHIFT_T[i]; s++) begin c = {c[26:0], c[27]}; d = {d[26:0], d[27]}; end
      ks[i] = des_pc2({c, d});
    end
    {l, r} = des_ip(blk);
    for (int i = 0; i < 16; i++) begin
      t = r;
      r = l ^ des_p(des_sbox(des_e(r) ^ ks[dec ? 15 - i : i]));
      l = t;
    end
    return des_iip({r, l});
  endfunction

  // ---------------- tasks on the engine ----------------
  task automatic aes_programs(logic dec, int nr);
    prog.delete();
    if (!dec) begin
      prog.push_back(W(CX_LDW, 2, PE_NOP, '0, '0, '0, 0, 0, AF_BASE, 0, 0));
      prog.push_back(W(CX_ALU, 0, PE_LOGIC, R(0, 0), R(0, 2), Z));
      prog.push_back(W(CX_SBOXR, 0, PE_NOP, '0, '0, '0, 0, 0, AF_DATA, 1, 0));
      prog.push_back(W(CX_LDW, 2, PE_NOP, '0, '0, '0, 0, 0, AF_LOOP, 0, 1));
      prog.push_back(W(CX_ALU, 1, PE_XTLOGIC, R(0, 0), R(1, 0), R(1, 0)));
      prog.push_back(W(CX_ALU, 1, PE_LOGIC, R(0, 1), R(2, 0), R(3, 0)));
      prog.push_back(W(CX_ALU, 0, PE_LOGIC, R(0, 1), R(0, 2), Z));
      prog.push_back(W(CX_SBOX, 0, PE_NOP, '0, '0, '0, 0, 0, AF_DATA, 1, 0));
      prog.push_back(W(CX_ROT, 0, PE_NOP, '0, '0, '0, 0));
      prog.push_back(W(CX_LDW, 2, PE_NOP, '0, '0, '0, 0, 0, AF_BASE, 0, nr));
      prog.push_back(W(CX_ALU, 0, PE_LOGIC, R(0, 0), R(0, 2), Z));
      prog.push_back(W(CX_END));
      lstart = 2; lend = 6; lcount = nr - 1;
    end else begin
      prog.push_back(W(CX_LDW, 2, PE_NOP, '0, '0, '0, 0, 0, AF_BASE, 0, nr));
      prog.push_back(W(CX_ALU, 0, PE_LOGIC, R(0, 0), R(0, 2), Z));
      prog.push_back(W(CX_SBOXR, 0, PE_NOP, '0, '0, '0, 1, 1, AF_DATA, 1, 0));
      prog.push_back(W(CX_LDW, 2, PE_NOP, '0, '0, '0, 1, 0, AF_LOOP_REV, 0, nr - 1));
      prog.push_back(W(CX_ALU, 0, PE_LOGIC, R(0, 0), R(0, 2), Z));
      prog.push_back(W(CX_ALU, 3, PE_XTLOGIC, R(0, 0), R(2, 0), Z));
      prog.push_back(W(CX_ALU, 3, PE_XTLOGIC, R(0, 3), Z, R(0, 0)));
      prog.push_back(W(CX_ALU, 0, PE_XTLOGIC, R(0, 3), R(1, 3), R(1, 3)));
      prog.push_back(W(CX_ALU, 0, PE_LOGIC, R(0, 0), R(2, 3), R(3, 3)));
      prog.push_back(W(CX_ROT, 0, PE_NOP, '0, '0, '0, 1));
      prog.push_back(W(CX_SBOX, 0, PE_NOP, '0, '0, '0, 1, 1, AF_DATA, 1, 0));
      prog.push_back(W(CX_LDW, 2, PE_NOP, '0, '0, '0, 1, 0, AF_BASE, 0, 0));
      prog.push_back(W(CX_ALU, 0, PE_LOGIC, R(0, 0), R(0, 2), Z));
      prog.push_back(W(CX_END));
      lstart = 2; lend = 8; lcount = nr - 1;
    end
  endtask

  task automatic aes_run(logic dec, int nr, logic [127:0] in, logic [127:0] exp, string what);
    int cyc, ecyc;
    aes_programs(dec, nr);
    din = in;
    run(0, cyc, ecyc);
    check(what, dout, exp);
    check({what, " cycles"}, 128'(cyc), 128'(ecyc));
    $display("%s: %0d cycles", what, cyc);
  endtask

  task automatic des_run(logic dec, logic [63:0] key, logic [127:0] in, string what);
    int cyc, ecyc;
    logic [127:0] exp;
    for (int i = 0; i < 8; i++) mwrite(DESKEY, NUM_PE'(1) << i, 4'b0001, 32'(key[63-8*i -: 8]));
    prog.delete();
    prog.push_back(W(CX_DES_LD, 0, PE_NOP, '0, '0, '0, dec, 0, AF_BASE, 2, 0));
    prog.push_back(W(CX_DES_RND, 0, PE_NOP, '0, '0, '0, dec));
    prog.push_back(W(CX_DES_FIN, 0, PE_NOP, '0, '0, '0, dec));
    prog.push_back(W(CX_END));
    lstart = 1; lend = 1; lcount = 16;
    din = in;
    exp = {des_ref(in[127:64], key, dec), des_ref(in[63:0], key, dec)};
    run(0, cyc, ecyc);
    check(what, dout, exp);
    check({what, " cycles"}, 128'(cyc), 128'(ecyc));
    $display("%s: %0d cycles", what, cyc);
  endtask

  // three-key 3DES (encrypt, decrypt, encrypt): the three passes are unrolled
  // because the controller has a single loop; keys in DESKEY+0..2
  task automatic tdes_run(logic [63:0] k1, logic [63:0] k2, logic [63:0] k3,
                          logic [127:0] in, string what);
    int cyc, ecyc;
    logic [63:0] ks [3];
    logic [127:0] exp;
    ks = '{k1, k2, k3};
    for (int p = 0; p < 3; p++)
      for (int i = 0; i < 8; i++)
        mwrite(DESKEY + p, NUM_PE'(1) << i, 4'b0001, 32'(ks[p][63-8*i -: 8]));
    prog.delete();
    for (int p = 0; p < 3; p++) begin
      logic d;
      d = (p == 1);
      prog.push_back(W(CX_DES_LD, 0, PE_NOP, '0, '0, '0, d, 0, AF_BASE, 2, p));
      for (int r = 0; r < 16; r++) prog.push_back(W(CX_DES_RND, 0, PE_NOP, '0, '0, '0, d));
      prog.push_back(W(CX_DES_FIN, 0, PE_NOP, '0, '0, '0, d));
    end
    prog.push_back(W(CX_END));
    lstart = 0; lend = 0; lcount = 1;
    din = in;
    for (int b = 0; b < 2; b++)
      exp[127-64*b -: 64] = des_ref(des_ref(des_ref(in[127-64*b -: 64], k1, 0), k2, 1), k3, 0);
    run(0, cyc, ecyc);
    check(what, dout, exp);
    check({what, " cycles"}, 128'(cyc), 128'(ecyc));
    $display("%s: %0d cycles (%0d context words)", what, cyc, prog.size());
  endtask

  localparam int MAXN = 4096, MAXW = 1024;
  task automatic mon_run(int n);
    logic [MAXN-1:0] A, B, N, T;
    logic [MAXN:0]   BN;
    logic [3*MAXW:0] lhs, rhs, Nw, Tw;
    logic [MAXN+1:0] Texp;
    logic [MAXN-1:0] diff;
    int cyc, ecyc, c;
    c = n / 128;
    for (int i = 0; i < MAXN / 32; i++) begin
      N[32*i +: 32] = $urandom; A[32*i +: 32] = $urandom; B[32*i +: 32] = $urandom;
    end
    N = N & ((MAXN'(1) << n) - 1);
    N[n-1] = 1; N[0] = 1;
    N[n-2 -: 16] = '1;                     // large modulus
    A = A % N; B = B % N;
    BN = {1'b0, B} + {1'b0, N};
    for (int j = 0; j < c; j++)
      for (int k = 0; k < NUM_PE; k++) begin
        mwrite(MON_BASE + j, NUM_PE'(1) << k, 4'b1111,
               {8'h00, BN[128*j+8*k +: 8], B[128*j+8*k +: 8], N[128*j+8*k +: 8]});
      end
    for (int w = 0; w < (n + 127) / 128; w++)
      for (int k = 0; k < NUM_PE; k++)
        mwrite(MON_BASE + A_OFF + w, NUM_PE'(1) << k, 4'b0001, 32'(A[128*w+8*k +: 8]));
    send(CMD_FLOW, FR_BNTOP, 64'(BN[n]));
    prog.delete();
    prog.push_back(W(CX_MON, 0, PE_NOP, '0, '0, '0, 0, 0, AF_CHUNK, 3, A_OFF));
    prog.push_back(W(CX_MON_END, 0, PE_NOP, '0, '0, '0, 0, 0, AF_CHUNK, 3, 0));
    prog.push_back(W(CX_END));
    lstart = 0; lend = 0; lcount = n;
    run(c, cyc, ecyc);
    T = '0;
    for (int j = 0; j < c; j++) begin
      mread(MON_BASE + j);
      for (int k = 0; k < NUM_PE; k++) T[128*j+8*k +: 8] = hm_rdata[k][SLOT_T];
    end
    // bit-serial model of the same algorithm: exact expected T for every n
    Texp = '0;
    for (int i = 0; i < n; i++) begin
      logic q;
      q = Texp[0] ^ (A[i] & B[0]);
      Texp = (Texp + (A[i] ? (MAXN+2)'(B) : '0) + (q ? (MAXN+2)'(N) : '0)) >> 1;
    end
    diff = (T ^ Texp[MAXN-1:0]) & ((MAXN'(1) << n) - 1);
    check($sformatf("MON-%0d", n), 128'(diff) | 128'(|diff), 128'(0));
    check($sformatf("MON-%0d top bit", n), 128'(mon_t_top), 128'(Texp[n]));
    // independent check T * 2^n = A * B (mod N) where the wide arithmetic fits
    if (n <= MAXW) begin
      Tw = (3*MAXW+1)'(T) | ((3*MAXW+1)'(mon_t_top) << n);
      Nw = (3*MAXW+1)'(N);
      lhs = (Tw << n) % Nw;
      rhs = ((3*MAXW+1)'(A) * (3*MAXW+1)'(B)) % Nw;
      check($sformatf("MON-%0d mod N", n), lhs[127:0], rhs[127:0]);
      check($sformatf("MON-%0d mod N hi", n), lhs[MAXW-1:128], rhs[MAXW-1:128]);
      check($sformatf("MON-%0d below 2N", n), 128'(Tw < 2 * Nw), 128'(1));
    end
    check($sformatf("MON-%0d cycles", n), 128'(cyc), 128'(ecyc));
    $display("MON-%0d: %0d cycles", n, cyc);
  endtask

  initial begin
    logic [127:0] key, pt, ct;
    cmd_valid = 0; cmd = CMD_FLOW; cmd_addr = 0; cmd_data = 0;
    hm_we = 0; hm_re = 0; hm_addr = 0; hm_lane = 0; hm_slot = 0; hm_wdata = 0; din = 0;
    ev_rot_f = 0; ev_rot_i = 0; ev_sbox = 0; ev_isbox = 0; ev_loop = 0; ev_par = 0;
    ev_prop = 0; ev_carry = 0; ev_cmw = 0; ev_fused = 0; ev_des_e = 0; ev_des_d = 0;
    for (int i = 0; i < 4; i++) ev_sel[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // base registers
    send(CMD_FLOW, 0, KEY_BASE);
    send(CMD_FLOW, 1, SBOX_BASE);
    send(CMD_FLOW, 2, DESKEY);
    send(CMD_FLOW, 3, MON_BASE);
    // S-box (slot 0) and inverse S-box (slot 1) in every lane
    make_sbox();
    for (int x = 0; x < 256; x++) mwrite(SBOX_BASE + x, '1, 4'b0011, {16'h0, isbox[x], sbox[x]});

    // ---- AES-128/192/256, FIPS-197 appendix C ----
    pt = 128'h00112233445566778899aabbccddeeff;
    expand_key({128'h000102030405060708090a0b0c0d0e0f, 128'h0}, 4);
    aes_run(0, 10, pt, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, "AES-128 enc FIPS");
    aes_run(1, 10, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, pt, "AES-128 dec FIPS");
    expand_key({192'h000102030405060708090a0b0c0d0e0f1011121314151617, 64'h0}, 6);
    aes_run(0, 12, pt, 128'hdda97ca4864cdfe06eaf70a0ec0d7191, "AES-192 enc FIPS");
    aes_run(1, 12, 128'hdda97ca4864cdfe06eaf70a0ec0d7191, pt, "AES-192 dec FIPS");
    expand_key(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f, 8);
    aes_run(0, 14, pt, 128'h8ea2b7ca516745bfeafc49904b496089, "AES-256 enc FIPS");
    aes_run(1, 14, 128'h8ea2b7ca516745bfeafc49904b496089, pt, "AES-256 dec FIPS");
    // random key and blocks
    key = {$urandom, $urandom, $urandom, $urandom};
    expand_key({key, 128'h0}, 4);
    for (int n = 0; n < 2; n++) begin
      pt = {$urandom, $urandom, $urandom, $urandom};
      ct = aes_enc_ref(pt, 10);
      aes_run(0, 10, pt, ct, "AES-128 enc random");
      aes_run(1, 10, ct, pt, "AES-128 dec random");
    end

    // ---- DES, two blocks in parallel ----
    des_run(0, 64'h133457799BBCDFF1, {64'h0123456789ABCDEF, 64'h8787878787878787}, "DES enc");
    check("DES FIPS block", dout[127:64], 64'h85E813540F0AB405);
    des_run(1, 64'h133457799BBCDFF1, dout, "DES dec");
    check("DES round trip", dout, {64'h0123456789ABCDEF, 64'h8787878787878787});
    tdes_run(64'h0123456789ABCDEF, 64'h23456789ABCDEF01, 64'h456789ABCDEF0123,
             {64'h5468652071756663, 64'h6B2062726F776E20}, "3DES EDE");

    // ---- Montgomery multiplication ----
    for (int n = 256; n <= MAXN; n *= 2) mon_run(n);

    // ---- mechanisms ----
    begin
      string nm [14];
      int    ct_ [14];
      nm = '{"rotate fwd", "rotate inv", "sbox", "inv sbox", "loop back", "parallel mode",
             "propagation mode", "addend 0", "addend B", "addend N", "addend B+N",
             "top carry", "context reload", "sbox+rotate"};
      ct_ = '{ev_rot_f, ev_rot_i, ev_sbox, ev_isbox, ev_loop, ev_par, ev_prop,
              ev_sel[0], ev_sel[1], ev_sel[2], ev_sel[3], ev_carry, ev_cmw, ev_fused};
      for (int i = 0; i < 14; i++) begin
        $display("  %-16s %0d", nm[i], ct_[i]);
        checks++;
        if (ct_[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", nm[i]); end
      end
      $display("  des enc/dec      %0d %0d", ev_des_e, ev_des_d);
      checks++;
      if (ev_des_e == 0 || ev_des_d == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
