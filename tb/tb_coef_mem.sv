// Self-checking test of coef_mem: after reset every word reads zero; random
// single-word writes must show on the parallel read port from the next
// cycle, leaving all other words unchanged.
module tb_coef_mem;
  import uwb_pkg::*;
  localparam int unsigned A_W = $clog2(N_COEF);
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [A_W-1:0] wr_addr = '0;
  logic signed [C_W-1:0] wr_data = '0;
  logic signed [C_W-1:0] coef [N_COEF];
  int ref_mem [N_COEF];
  int checks = 0, failures = 0;

  coef_mem dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .coef);

  always #5 clk = ~clk;

  task automatic compare_all(input int tag);
    for (int i = 0; i < int'(N_COEF); i++) begin
      checks++;
      if (int'(coef[i]) != ref_mem[i]) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d word %0d got %0d exp %0d", tag, i, coef[i], ref_mem[i]);
      end
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(N_COEF); i++) ref_mem[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    compare_all(-1);
    for (int s = 0; s < 400; s++) begin
      @(negedge clk);
      wr_en   = ($urandom_range(0, 3) != 0);
      wr_addr = A_W'($urandom);
      wr_data = C_W'($urandom);
      @(posedge clk); #1;
      if (wr_en) ref_mem[wr_addr] = int'(wr_data);
      compare_all(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
