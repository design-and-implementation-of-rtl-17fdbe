// pe_tb: self-checking testbench of the 8-bit processing element.
// Random operands and operations are compared with a model written here
// (xtime by shift-and-reduce); register writes, the load port and its
// priority over the operator write are checked by reading the registers.
module pe_tb;
  import fp_pkg::*;

  logic clk = 0, rst_n = 0;
  pe_op_e op;
  byte_t a, b, c, ld_data, y;
  logic cin, we, ld_en, cout;
  reg_idx_t rd, ld_rd;
  byte_t regs [NUM_REG];
  byte_t model [NUM_REG];
  int checks = 0, failures = 0;

  pe dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic byte_t xt_ref(byte_t v);
    logic [8:0] w;
    w = {v, 1'b0};
    if (w[8]) w = w ^ 9'h11b;
    return w[7:0];
  endfunction

  task automatic check(string what, logic [8:0] got, logic [8:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    op = PE_NOP; a = 0; b = 0; c = 0; cin = 0; we = 0; rd = 0;
    ld_en = 0; ld_rd = 0; ld_data = 0;
    for (int i = 0; i < NUM_REG; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      op  = pe_op_e'($urandom_range(0, 3));
      a = $urandom; b = $urandom; c = $urandom; cin = $urandom;
      we = $urandom; rd = $urandom_range(0, NUM_REG - 1);
      ld_en = ($urandom_range(0, 3) == 0); ld_rd = $urandom_range(0, NUM_REG - 1);
      ld_data = $urandom;
      #1;
      unique case (op)
        PE_LOGIC:   check("xor3", {cout, y}, {1'b0, a ^ b ^ c});
        PE_XTLOGIC: check("xtx",  {cout, y}, {1'b0, xt_ref(a ^ b) ^ c});
        PE_ADD:     check("add",  {cout, y}, 9'(a) + 9'(b) + 9'(cin));
        default:    check("nop",  {cout, y}, 9'd0);
      endcase
      if (ld_en) model[ld_rd] = ld_data;
      else if (we && op != PE_NOP) model[rd] = y;
      @(posedge clk); #1;
      for (int i = 0; i < NUM_REG; i++) check($sformatf("reg%0d", i), {1'b0, regs[i]}, {1'b0, model[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
