// Self-checking test of the pulse-matched filter at its full size: random
// 4-bit taps and 5-bit coefficients (extremes included) are applied every
// cycle, with idle cycles; each of the 16 outputs must equal the integer
// dot product of taps k..k+63 with the coefficients, exactly PIPELINE+1
// cycles after its inputs, with out_valid marking it.
module tb_pmf;
  import uwb_pkg::*;
  localparam int unsigned NO = N_TAPS - N_COEF + 1;
  localparam int LAT = 2;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [X_W-1:0] taps [N_TAPS];
  logic signed [C_W-1:0] coef [N_COEF];
  logic out_valid;
  logic signed [PMF_W-1:0] pmf_out [NO];
  int checks = 0, failures = 0;
  int exp_q [$];  // expected outputs, NO per valid input set
  int vld_q [$];  // in_valid history
  int cyc = 0;

  pmf dut (.clk, .rst_n, .in_valid, .taps, .coef, .out_valid, .pmf_out);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < int'(N_TAPS); i++) taps[i] = '0;
    for (int i = 0; i < int'(N_COEF); i++) coef[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 300; cyc++) begin
      @(negedge clk);
      // out_valid / pmf_out now reflect inputs applied LAT cycles ago
      if (vld_q.size() >= LAT) begin
        checks++;
        if (out_valid !== 1'(vld_q[vld_q.size() - LAT])) begin
          failures++; $display("FAIL out_valid cycle %0d", cyc);
        end
        if (vld_q[vld_q.size() - LAT] != 0) begin
          for (int k = 0; k < int'(NO); k++) begin
            int e;
            e = exp_q.pop_front();
            checks++;
            if (int'(pmf_out[k]) != e) begin
              failures++;
              if (failures < 10) $display("FAIL cyc %0d off %0d got %0d exp %0d", cyc, k, pmf_out[k], e);
            end
          end
        end
      end
      in_valid = (cyc < 3) || ($urandom_range(0, 4) != 0);
      for (int i = 0; i < int'(N_TAPS); i++)
        taps[i] = (cyc < 3) ? -8 : X_W'($urandom);
      for (int i = 0; i < int'(N_COEF); i++)
        coef[i] = (cyc < 2) ? -16 : (cyc < 3) ? 15 : C_W'($urandom);
      vld_q.push_back(int'(in_valid));
      if (in_valid)
        for (int k = 0; k < int'(NO); k++) begin
          int s;
          s = 0;
          for (int i = 0; i < int'(N_COEF); i++) s += int'(taps[k + i]) * int'(coef[i]);
          exp_q.push_back(s);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
