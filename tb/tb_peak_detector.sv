// Self-checking test of the peak detector: random 15-bit signed inputs
// (some sets with forced ties, all-equal and all-minimum sets) are applied
// with idle cycles; one cycle later max_val must be the largest value and
// max_addr the 1-based index of its first occurrence.
module tb_peak_detector;
  import uwb_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [PMF_W-1:0] din [N_OFF];
  logic out_valid;
  logic signed [PMF_W-1:0] max_val;
  logic [ADDR_W-1:0] max_addr;
  int checks = 0, failures = 0;
  int ev = 0, ea = 0, pv = 0;

  peak_detector dut (.clk, .rst_n, .in_valid, .din, .out_valid, .max_val, .max_addr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(N_OFF); i++) din[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      int mode;
      @(negedge clk);
      checks++;
      if (out_valid !== 1'(pv)) begin failures++; $display("FAIL out_valid t=%0d", t); end
      if (pv != 0) begin
        checks++;
        if (int'(max_val) != ev || int'(max_addr) != ea) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d got %0d@%0d exp %0d@%0d", t, max_val, max_addr, ev, ea);
        end
      end
      in_valid = (t < 4) || ($urandom_range(0, 3) != 0);
      mode = $urandom_range(0, 5);
      for (int i = 0; i < int'(N_OFF); i++) begin
        if (t == 0)        din[i] = PMF_W'(-(1 << (PMF_W - 1)));
        else if (t == 1)   din[i] = PMF_W'(123);
        else if (mode == 0) din[i] = PMF_W'($urandom_range(0, 3));  // many ties
        else               din[i] = PMF_W'($urandom);
      end
      pv = int'(in_valid);
      if (in_valid) begin
        ev = int'(din[0]); ea = 1;
        for (int i = 1; i < int'(N_OFF); i++)
          if (int'(din[i]) > ev) begin ev = int'(din[i]); ea = i + 1; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
