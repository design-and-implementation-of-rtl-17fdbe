// des_unit: dedicated DES round unit with on-the-fly key generation.
//
// load (one cycle) takes the block after IP (l0r0 = {L0, R0}), the key after
// PC-1 (cd0 = {C0, D0}) and the direction, and clears the round counter.
// start begins one round, which takes two cycles:
//   cycle 1 (start high): the key generator rotates C and D (left by the
//     round's shift count for encryption; right, with no rotation before the
//     first round, for decryption), PC-2 forms the round key, R is expanded
//     by E and XORed with it; the 48-bit result is registered;
//   cycle 2 (done high): the eight S-box look-ups and P form f, and
//     L, R <= R, L ^ f.
// After sixteen rounds preout = {R16, L16} is the input of IP^-1 (PCU-2).
// start is ignored while a round is in flight.  The two-cycle round and the
// key generation structure follow the described DES unit; the register
// arrangement is this design's own.
module des_unit
  import des_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [63:0] l0r0,
  input  logic [55:0] cd0,
  input  logic        dec,
  input  logic        start,
  output logic        done,
  output logic [4:0]  rounds,
  output logic [63:0] preout
);

  logic [31:0] l_q, r_q;
  logic [27:0] c_q, d_q;
  logic [47:0] x_q;
  logic        dec_q, phase_q;
  logic [4:0]  rnd_q;

  function automatic logic [27:0] rotl(logic [27:0] v, int s);
    return (s == 2) ? {v[25:0], v[27:26]} : {v[26:0], v[27]};
  endfunction
  function automatic logic [27:0] rotr(logic [27:0] v, int s);
    return (s == 2) ? {v[1:0], v[27:2]} : {v[0], v[27:1]};
  endfunction

  logic [27:0] c_n, d_n;
  logic [47:0] k_n;
  always_comb begin
    c_n = c_q;
    d_n = d_q;
    if (!dec_q) begin
      c_n = rotl(c_q, SHIFT_T[rnd_q[3:0]]);
      d_n = rotl(d_q, SHIFT_T[rnd_q[3:0]]);
    end else if (rnd_q != 0) begin
      // before decryption round j (j = rnd_q + 1) undo the shift of round 18-j
      c_n = rotr(c_q, SHIFT_T[16 - int'(rnd_q)]);
      d_n = rotr(d_q, SHIFT_T[16 - int'(rnd_q)]);
    end
    k_n = des_pc2({c_n, d_n});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_q <= '0; r_q <= '0; c_q <= '0; d_q <= '0; x_q <= '0;
      dec_q <= 1'b0; phase_q <= 1'b0; rnd_q <= '0;
    end else if (load) begin
      {l_q, r_q} <= l0r0;
      {c_q, d_q} <= cd0;
      dec_q      <= dec;
      phase_q    <= 1'b0;
      rnd_q      <= '0;
    end else if (phase_q) begin
      l_q     <= r_q;
      r_q     <= l_q ^ des_p(des_sbox(x_q));
      phase_q <= 1'b0;
      rnd_q   <= rnd_q + 5'd1;
    end else if (start && rnd_q < 5'd16) begin
      c_q     <= c_n;
      d_q     <= d_n;
      x_q     <= des_e(r_q) ^ k_n;
      phase_q <= 1'b1;
    end
  end

  assign done   = phase_q;
  assign rounds = rnd_q;
  assign preout = {r_q, l_q};

endmodule
