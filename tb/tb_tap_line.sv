// Self-checking test of tap_line: random frames, with idle cycles, are
// shifted in; after every cycle the window must hold exactly the last
// N_TAPS samples of the stream (zeros before the stream), oldest first,
// and taps_valid must follow in_valid by one cycle.
module tb_tap_line;
  import uwb_pkg::*;
  localparam int unsigned NT = N_TAPS, B = N_OFF;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [X_W-1:0] in_samples [B];
  logic taps_valid;
  logic signed [X_W-1:0] taps [NT];
  int checks = 0, failures = 0;
  int hist [$];   // every accepted sample, in order

  tap_line dut (.clk, .rst_n, .in_valid, .in_samples, .taps_valid, .taps);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < int'(B); j++) in_samples[j] = '0;
    for (int i = 0; i < int'(NT); i++) hist.push_back(0);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 200; cyc++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int j = 0; j < int'(B); j++) in_samples[j] = X_W'($urandom);
      if (in_valid)
        for (int j = 0; j < int'(B); j++) hist.push_back(int'(in_samples[j]));
      @(posedge clk); #1;
      checks++;
      if (taps_valid !== in_valid) begin
        failures++; $display("FAIL taps_valid at cycle %0d", cyc);
      end
      for (int i = 0; i < int'(NT); i++) begin
        checks++;
        if (int'(taps[i]) != hist[hist.size() - NT + i]) begin
          failures++;
          if (failures < 10) $display("FAIL cyc %0d tap %0d got %0d exp %0d",
                                      cyc, i, taps[i], hist[hist.size() - NT + i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
