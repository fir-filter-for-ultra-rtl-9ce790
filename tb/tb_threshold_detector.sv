// Self-checking test of the threshold detector: random peak values and
// thresholds (with equality cases) must give detected = value > threshold
// one cycle later, with the value and address passed through; outputs hold
// while in_valid is low.
module tb_threshold_detector;
  import uwb_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [PMF_W-1:0] max_val = '0, threshold = '0, peak_val;
  logic [ADDR_W-1:0] max_addr = '0, peak_addr;
  logic det_valid, detected;
  int checks = 0, failures = 0;
  int ed = 0, ev = 0, ea = 0, pv = 0, n_det = 0, n_nodet = 0;

  threshold_detector dut (.clk, .rst_n, .in_valid, .max_val, .max_addr, .threshold,
                          .det_valid, .detected, .peak_val, .peak_addr);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      checks++;
      if (det_valid !== 1'(pv)) begin failures++; $display("FAIL det_valid t=%0d", t); end
      if (t > 0) begin
        checks++;
        if (int'(detected) != ed || int'(peak_val) != ev || int'(peak_addr) != ea) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d got %0d %0d %0d exp %0d %0d %0d",
                                      t, detected, peak_val, peak_addr, ed, ev, ea);
        end
      end
      in_valid  = ($urandom_range(0, 3) != 0);
      max_val   = PMF_W'($urandom);
      max_addr  = ADDR_W'($urandom_range(1, N_OFF));
      threshold = ($urandom_range(0, 4) == 0) ? max_val : PMF_W'($urandom);
      pv = int'(in_valid);
      if (in_valid) begin
        ed = (int'(max_val) > int'(threshold)) ? 1 : 0;
        ev = int'(max_val); ea = int'(max_addr);
        if (ed != 0) n_det++; else n_nodet++;
      end
    end
    checks++;
    if (n_det == 0 || n_nodet == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
