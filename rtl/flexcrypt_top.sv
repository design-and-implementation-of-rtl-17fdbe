// flexcrypt_top: flexible AES / DES / RSA (Montgomery) engine.
//
// One datapath serves all three ciphers by splitting their work into three
// operation classes, each handled by its own unit:
//   * permutation & combination: PCU-1 (AES byte rotate, DES IP and PC-1)
//     and PCU-2 (DES IP^-1), fixed wiring;
//   * computation: the CU, NUM_PE 8-bit PEs doing XOR, X_TIME and carry-
//     chained addition; AES MixColumn/AddRoundKey run on it in parallel mode
//     and Montgomery multiplication in propagation mode;
//   * memory: the MU, NUM_TILE tile buffers holding the AES S-boxes, round
//     keys, the DES key and Montgomery operands, with a preload buffer.
// A dedicated DES unit per 64-bit block performs the DES rounds with
// on-the-fly key generation.  The controller (ctrl) steps through context
// words stored in the context memory; the context decoder turns each word
// into unit controls.  A task is therefore a program: the host writes the
// tables and keys into the MU (hm_* port), the flow/base registers and the
// context words (cmd_* port), then issues CMD_START, supplies the input
// block when in_req is high, and reads dout when done pulses.
//
// Host memory port (only while busy is low): hm_we writes byte slot s of
// every lane selected in hm_lane with hm_wdata[8s+7:8s] for each s set in
// hm_slot, at hm_addr; hm_re reads hm_addr, data on hm_rdata next cycle.
// Data block byte k (din/dout[127-8k -: 8]) sits in PE k register 0.
// For Montgomery, lane k holds byte k of each 128-bit section (little
// endian); mon_t_top is bit n of the result.
//
// The split into PCU-1/PCU-2, CU, MU, DES unit, context memory/decoder and
// controller, the 16 PE : 8 tile ratio and the two DES blocks follow the
// document.  The host ports, memory map and byte order are this design's
// own; AES round keys are expanded by the host and stored in the MU, while
// DES keys are generated on the fly.
module flexcrypt_top
  import fp_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // host command port
  input  logic          cmd_valid,
  input  cmd_e          cmd,
  input  logic [7:0]    cmd_addr,
  input  logic [63:0]   cmd_data,
  output logic          cmd_ready,
  // host memory port
  input  logic          hm_we,
  input  logic          hm_re,
  input  logic [MU_AW-1:0] hm_addr,
  input  logic [NUM_PE-1:0] hm_lane,
  input  logic [SLOTS-1:0]  hm_slot,
  input  logic [31:0]   hm_wdata,
  output byte_t         hm_rdata [NUM_PE][SLOTS],
  // data
  output logic          in_req,
  input  logic [127:0]  din,
  output logic [127:0]  dout,
  output logic          done,
  output logic          busy,
  output logic          mon_t_top
);

  // ---------------- controller, context memory, decoder ----------------
  logic [CM_AW-1:0]  pc, cm_waddr;
  ctx_t              ctx, cm_wdata;
  logic              cm_we, base_we, first_iter, exec, bn_top, op_last;
  logic [2:0]        base_idx;
  logic [MU_AW-1:0]  base_wdata, chunks;
  logic [LOOP_W-1:0] loop_idx;
  logic [7:0]        step;

  ctrl u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd, .cmd_addr, .cmd_data, .cmd_ready,
    .cm_we, .cm_waddr, .cm_wdata, .pc, .cur_op(ctx.op), .op_last,
    .base_we, .base_idx, .base_wdata, .loop_idx, .first_iter,
    .exec, .step, .chunks, .bn_top, .in_req, .done, .busy
  );

  context_memory u_cm (
    .clk, .we(cm_we), .waddr(cm_waddr), .wdata(cm_wdata),
    .raddr(pc), .rdata(ctx)
  );

  cu_ctrl_t         cu_ctl;
  reg_idx_t         rd_idx, ld_rd;
  logic             ld_any, mu_rd_en, mu_wr_en;
  logic             ld_lane [NUM_PE];
  ld_src_e          ld_src;
  logic [1:0]       ld_slot;
  af_e              afn;
  logic [MU_AW-1:0] imm, rchunk, wchunk;
  logic [7:0]       lut_off;
  logic             mon_clear, mon_chunk, mon_first, mon_flush, abit_cap;
  logic             des_load, des_start;

  context_decoder u_cd (
    .valid(exec), .ctx, .step, .chunks, .first_iter,
    .cu(cu_ctl), .rd_idx, .ld_any, .ld_lane, .ld_src, .ld_rd, .ld_slot,
    .mu_rd_en, .afn, .imm, .lut_off, .mu_wr_en,
    .mon_clear, .mon_chunk, .mon_first, .mon_flush, .abit_cap,
    .rchunk, .wchunk, .des_load, .des_start, .op_last
  );

  // ---------------- memory unit and address generation ----------------
  byte_t            mu_rd [NUM_PE][SLOTS];
  byte_t            mu_wd [NUM_PE][SLOTS];
  logic [MU_AW-1:0] agu_rd [NUM_TILE];
  logic [MU_AW-1:0] mu_ra  [NUM_TILE];
  logic [MU_AW-1:0] agu_wr, mu_wa;
  logic [NUM_PE-1:0] mu_wl;
  logic [SLOTS-1:0]  mu_ws;
  logic             mu_we, mu_re;
  byte_t            lut_byte [NUM_TILE];
  byte_t            cu_rd [NUM_PE];
  byte_t            rot [NUM_PE];       // PCU-1 byte rotate of cu_rd
  byte_t            wb_data [NUM_PE];
  logic             wb_valid;

  always_comb
    for (int t = 0; t < NUM_TILE; t++)
      lut_byte[t] = (ctx.op == CX_SBOXR) ? rot[t * LPT + (int'(lut_off) % LPT)]
                                         : cu_rd[t * LPT + (int'(lut_off) % LPT)];

  agu u_agu (
    .clk, .rst_n,
    .base_we, .base_idx, .base_wdata,
    .afn, .base_sel(ctx.base), .imm, .loop_idx, .rchunk, .wchunk,
    .lut_byte, .rd_addr(agu_rd), .wr_addr(agu_wr)
  );

  always_comb begin
    mu_re = busy ? mu_rd_en : hm_re;
    for (int t = 0; t < NUM_TILE; t++) mu_ra[t] = busy ? agu_rd[t] : hm_addr;
    mu_we = busy ? (mu_wr_en && wb_valid) : hm_we;
    mu_wa = busy ? agu_wr : hm_addr;
    mu_wl = busy ? '1 : hm_lane;
    mu_ws = busy ? SLOTS'(1 << SLOT_T) : hm_slot;
    for (int k = 0; k < NUM_PE; k++)
      for (int s = 0; s < SLOTS; s++)
        mu_wd[k][s] = busy ? wb_data[k] : hm_wdata[8*s +: 8];
  end

  memory_unit u_mu (
    .clk, .rst_n,
    .rd_en(mu_re), .rd_addr(mu_ra), .rd_data(mu_rd),
    .wr_en(mu_we), .wr_addr(mu_wa), .wr_lane(mu_wl), .wr_slot(mu_ws),
    .wr_data(mu_wd)
  );

  assign hm_rdata = mu_rd;

  // ---------------- permutation units and DES ----------------
  byte_t       des_lanes [NUM_PE];
  logic [63:0] ip [NUM_DES];
  logic [63:0] preout [NUM_DES];
  logic [55:0] pc1;
  logic [63:0] des_key;

  always_comb
    for (int i = 0; i < 8; i++) des_key[63-8*i -: 8] = mu_rd[i][ld_slot];

  pcu1 u_pcu1 (.blk(cu_rd), .inv(ctx.inv), .key(des_key), .rot, .ip, .pc1);

  for (genvar b = 0; b < NUM_DES; b++) begin : g_des
    logic       d_done;
    logic [4:0] d_rounds;
    des_unit u_des (
      .clk, .rst_n,
      .load(des_load), .l0r0(ip[b]), .cd0(pc1), .dec(ctx.inv),
      .start(des_start), .done(d_done), .rounds(d_rounds), .preout(preout[b])
    );
  end

  pcu2 u_pcu2 (.preout, .lanes(des_lanes));

  // ---------------- computation unit ----------------
  logic  ld_en [NUM_PE];
  byte_t ld_data [NUM_PE];
  byte_t mon_t [NUM_PE], mon_b [NUM_PE], mon_n [NUM_PE], mon_bn [NUM_PE];
  logic  abit_q;
  logic  [1:0] sel_now;
  logic  last_carry;

  always_comb begin
    for (int k = 0; k < NUM_PE; k++) begin
      ld_en[k] = in_req || (ld_any && ld_lane[k]);
      unique case (ld_src)
        LD_ROT:  ld_data[k] = rot[k];
        LD_DES:  ld_data[k] = des_lanes[k];
        default: ld_data[k] = mu_rd[k][ld_slot];
      endcase
      if (in_req) ld_data[k] = din[127-8*k -: 8];
      mon_t[k]  = mu_rd[k][SLOT_T];
      mon_b[k]  = mu_rd[k][SLOT_B];
      mon_n[k]  = mu_rd[k][SLOT_N];
      mon_bn[k] = mu_rd[k][SLOT_BN];
    end
  end

  // multiplier bit a_i of iteration i = loop index: lane (i/8) % NUM_PE, bit i % 8
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) abit_q <= 1'b0;
    else if (abit_cap)
      abit_q <= mu_rd[(int'(loop_idx) / 8) % NUM_PE][SLOT_N][loop_idx[2:0]];
  end

  compute_unit u_cu (
    .clk, .rst_n,
    .ctl(cu_ctl), .ld_en, .ld_rd(in_req ? reg_idx_t'(0) : ld_rd), .ld_data,
    .rd_idx, .rd_data(cu_rd),
    .mon_clear, .mon_chunk, .mon_first, .mon_flush, .mon_abit(abit_q),
    .bn_top, .mon_t, .mon_b, .mon_n, .mon_bn,
    .wb_valid, .wb_data, .t_top(mon_t_top), .sel_now, .last_carry
  );

  always_comb
    for (int k = 0; k < NUM_PE; k++) dout[127-8*k -: 8] = cu_rd[k];

endmodule
