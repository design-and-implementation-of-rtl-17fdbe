// tile_buffer_tb: random byte-enabled writes and reads of one tile buffer
// against an array model; checks the one-cycle read latency of the preload
// register and that it holds its value while no read is issued.
module tile_buffer_tb;
  import fp_pkg::*;
  localparam int DEPTH = 32, NB = LPT * SLOTS;

  logic clk = 0, rst_n = 0;
  logic rd_en, wr_en;
  logic [4:0] rd_addr, wr_addr;
  logic [NB-1:0] wr_be;
  byte_t wr_data [NB], pre_data [NB];
  byte_t model [DEPTH][NB];
  byte_t exp_q [NB];
  int checks = 0, failures = 0;

  tile_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = 0; wr_addr = 0; wr_be = 0;
    for (int i = 0; i < NB; i++) begin wr_data[i] = 0; exp_q[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 5'(a); wr_be = '1;
      for (int i = 0; i < NB; i++) begin wr_data[i] = $urandom; model[a][i] = wr_data[i]; end
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      rd_en = $urandom; rd_addr = $urandom;
      wr_en = $urandom; wr_addr = $urandom; wr_be = $urandom;
      for (int i = 0; i < NB; i++) wr_data[i] = $urandom;
      if (rd_en) for (int i = 0; i < NB; i++) exp_q[i] = model[rd_addr][i];
      if (wr_en) for (int i = 0; i < NB; i++) if (wr_be[i]) model[wr_addr][i] = wr_data[i];
      @(posedge clk); #1;
      for (int i = 0; i < NB; i++) begin
        checks++;
        if (pre_data[i] !== exp_q[i]) begin
          failures++;
          $display("FAIL byte %0d got %h exp %h", i, pre_data[i], exp_q[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
