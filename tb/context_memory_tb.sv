// context_memory_tb: writes random context words to every address, reads
// them back in random order, and checks that a rewrite (reload) replaces a
// word.
module context_memory_tb;
  import fp_pkg::*;

  logic clk = 0, we;
  logic [CM_AW-1:0] waddr, raddr;
  ctx_t wdata, rdata;
  ctx_t model [CM_DEPTH];
  int checks = 0, failures = 0;

  context_memory dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctx_t rnd();
    return ctx_t'({$urandom, $urandom});
  endfunction

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int a = 0; a < CM_DEPTH; a++) begin
        @(negedge clk);
        if (pass == 0 || a % 3 == 0) begin
          we = 1; waddr = CM_AW'(a); wdata = rnd(); model[a] = wdata;
        end else we = 0;
      end
      @(negedge clk); we = 0;
      for (int n = 0; n < 200; n++) begin
        raddr = $urandom; #1;
        checks++;
        if (rdata !== model[raddr]) begin
          failures++;
          $display("FAIL addr %0d got %h exp %h", raddr, rdata, model[raddr]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
