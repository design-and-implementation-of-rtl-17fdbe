// memory_unit_tb: lane- and slot-masked writes and independent per-tile read
// addresses of the memory unit, checked against a lane/slot array model.
module memory_unit_tb;
  import fp_pkg::*;
  localparam int DEPTH = 16;

  logic clk = 0, rst_n = 0;
  logic rd_en, wr_en;
  logic [3:0] rd_addr [NUM_TILE];
  logic [3:0] wr_addr;
  logic [NUM_PE-1:0] wr_lane;
  logic [SLOTS-1:0] wr_slot;
  byte_t rd_data [NUM_PE][SLOTS], wr_data [NUM_PE][SLOTS];
  byte_t model [DEPTH][NUM_PE][SLOTS];
  byte_t expd [NUM_PE][SLOTS];
  int checks = 0, failures = 0;

  memory_unit #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; wr_addr = 0; wr_lane = 0; wr_slot = 0;
    for (int t = 0; t < NUM_TILE; t++) rd_addr[t] = 0;
    for (int k = 0; k < NUM_PE; k++) for (int s = 0; s < SLOTS; s++) begin
      wr_data[k][s] = 0; expd[k][s] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 4'(a); wr_lane = '1; wr_slot = '1;
      for (int k = 0; k < NUM_PE; k++) for (int s = 0; s < SLOTS; s++) begin
        wr_data[k][s] = $urandom; model[a][k][s] = wr_data[k][s];
      end
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      rd_en = 1;
      for (int t = 0; t < NUM_TILE; t++) rd_addr[t] = $urandom;
      wr_en = $urandom; wr_addr = $urandom; wr_lane = $urandom; wr_slot = $urandom;
      for (int k = 0; k < NUM_PE; k++) for (int s = 0; s < SLOTS; s++) wr_data[k][s] = $urandom;
      for (int k = 0; k < NUM_PE; k++) for (int s = 0; s < SLOTS; s++)
        expd[k][s] = model[rd_addr[k / LPT]][k][s];
      if (wr_en) for (int k = 0; k < NUM_PE; k++) for (int s = 0; s < SLOTS; s++)
        if (wr_lane[k] && wr_slot[s]) model[wr_addr][k][s] = wr_data[k][s];
      @(posedge clk); #1;
      for (int k = 0; k < NUM_PE; k++) for (int s = 0; s < SLOTS; s++) begin
        checks++;
        if (rd_data[k][s] !== expd[k][s]) begin
          failures++;
          $display("FAIL lane %0d slot %0d got %h exp %h", k, s, rd_data[k][s], expd[k][s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
