// des_unit_tb: runs full 16-round DES encryptions and decryptions through the
// round unit (IP / PC-1 / IP^-1 applied here with the standard tables) and
// compares with published test vectors and, for random keys and blocks, with
// a textbook model that stores the key schedule; checks that every round
// takes two cycles (32 cycles for a block).
module des_unit_tb;
  import des_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load, dec, start, done;
  logic [63:0] l0r0, preout;
  logic [55:0] cd0;
  logic [4:0]  rounds;
  int checks = 0, failures = 0;

  des_unit dut (.*);

  always #5 clk = ~clk;
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic run(logic [63:0] key, logic [63:0] din, logic d, logic [63:0] dexp);
    int cyc;
    @(negedge clk);
    load = 1; l0r0 = des_ip(din); cd0 = des_pc1(key); dec = d;
    @(negedge clk);
    load = 0;
    cyc = 0;
    while (rounds != 16 && cyc < 100) begin
      start = 1;
      @(negedge clk); cyc++;
      start = 0;
      while (!done) begin @(negedge clk); cyc++; end
      @(negedge clk); cyc++;
    end
    check($sformatf("des dec=%0d", d), des_iip(preout), dexp);
    check("cycles", 64'(cyc), 64'd32);
  endtask

  // textbook DES with a stored key schedule (left rotations only)
  function automatic logic [63:0] des_ref(logic [63:0] blk, logic [63:0] key, logic d);
    logic [27:0] c, dd;
    logic [47:0] ks [16];
    logic [31:0] l, r, t;
    {c, dd} = des_pc1(key);
    for (int i = 0; i < 16; i++) begin
      for (int k = 0; k < SHIFT_T[i]; k++) begin c = {c[26:0], c[27]}; dd = {dd[26:0], dd[27]}; end
      ks[i] = des_pc2({c, dd});
    end
    {l, r} = des_ip(blk);
    for (int i = 0; i < 16; i++) begin
      t = r;
      r = l ^ des_p(des_sbox(des_e(r) ^ ks[d ? 15 - i : i]));
      l = t;
    end
    return des_iip({r, l});
  endfunction

  initial begin
    load = 0; start = 0; dec = 0; l0r0 = 0; cd0 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 0, 64'h85E813540F0AB405);
    run(64'h133457799BBCDFF1, 64'h85E813540F0AB405, 1, 64'h0123456789ABCDEF);
    run(64'h0E329232EA6D0D73, 64'h8787878787878787, 0, 64'h0000000000000000);
    run(64'h0E329232EA6D0D73, 64'h0000000000000000, 1, 64'h8787878787878787);
    // random keys and blocks, both directions, against the stored-schedule model
    for (int n = 0; n < 100; n++) begin
      logic [63:0] k, p;
      k = {$urandom, $urandom}; p = {$urandom, $urandom};
      run(k, p, 0, des_ref(p, k, 0));
      run(k, p, 1, des_ref(p, k, 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
