// pcu2_tb: PCU-2 applies IP^-1: the DES pre-output 0A4CD995 43423234 of the
// classic worked example must give 85E813540F0AB405; a second block checks
// the lane placement, and random blocks check IP^-1(IP(x)) = x.
module pcu2_tb;
  import fp_pkg::*;
  import des_pkg::*;

  logic [63:0] preout [NUM_DES];
  byte_t lanes [NUM_PE];
  int checks = 0, failures = 0;

  pcu2 dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] blk(int b);
    logic [63:0] w;
    for (int i = 0; i < 8; i++) w[63-8*i -: 8] = lanes[8*b+i];
    return w;
  endfunction

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    preout[0] = 64'h0A4CD99543423234;
    preout[1] = 64'hCC00CCFFF0AAF0AA;
    #1;
    check("example", blk(0), 64'h85E813540F0AB405);
    check("iip(ip(x))", blk(1), 64'h0123456789ABCDEF);
    for (int n = 0; n < 100; n++) begin
      logic [63:0] x [NUM_DES];
      for (int b = 0; b < NUM_DES; b++) begin
        x[b] = {$urandom, $urandom};
        preout[b] = des_ip(x[b]);
      end
      #1;
      for (int b = 0; b < NUM_DES; b++) check("random", blk(b), x[b]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
