// pcu1_tb: checks PCU-1 against published values: the AES ShiftRows lane
// map (state byte k = k), InvShiftRows undoing it on random data, the DES IP
// of 0123456789ABCDEF (CC00CCFF F0AAF0AA, in both 64-bit blocks) and PC-1 of
// key 133457799BBCDFF1 (F0CCAAF 556678F).
module pcu1_tb;
  import fp_pkg::*;

  byte_t blk [NUM_PE], rot [NUM_PE], fwd [NUM_PE];
  logic inv;
  logic [63:0] key;
  logic [63:0] ip [NUM_DES];
  logic [55:0] pc1;
  int checks = 0, failures = 0;
  localparam int SR [16] = '{0, 5, 10, 15, 4, 9, 14, 3, 8, 13, 2, 7, 12, 1, 6, 11};

  pcu1 dut (.*);

  initial begin
    #100000;
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

  initial begin
    inv = 0; key = 64'h133457799BBCDFF1;
    for (int k = 0; k < NUM_PE; k++) blk[k] = 8'(k);
    #1;
    for (int k = 0; k < NUM_PE; k++) check($sformatf("shiftrows %0d", k), 64'(rot[k]), 64'(SR[k]));
    check("pc1", 64'(pc1), 64'h00F0CCAAF556678F);
    for (int n = 0; n < 50; n++) begin
      inv = 0;
      for (int k = 0; k < NUM_PE; k++) blk[k] = $urandom;
      #1;
      fwd = rot;
      for (int k = 0; k < NUM_PE; k++) check("fwd map", 64'(fwd[k]), 64'(blk[SR[k]]));
      blk = fwd; inv = 1;
      #1;
      for (int k = 0; k < NUM_PE; k++) check("inv map", 64'(rot[SR[k]]), 64'(blk[k]));
    end
    inv = 0;
    for (int b = 0; b < NUM_DES; b++)
      for (int i = 0; i < 8; i++) blk[8*b+i] = 8'(64'h0123456789ABCDEF >> (56 - 8*i));
    #1;
    for (int b = 0; b < NUM_DES; b++) check("ip", ip[b], 64'hCC00CCFFF0AAF0AA);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
