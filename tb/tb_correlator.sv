// Self-checking test of the correlator at its default size (16 lanes,
// 15-bit inputs, 16 inputs per symbol): random PMF values, with extremes,
// and a fresh random PN code per symbol are applied with idle cycles. A
// reference accumulates sign * value per lane in integers, divides by 16
// (floor) and saturates; out_valid must pulse exactly one cycle after the
// 16th accepted input, once per symbol, and chip_idx must count inputs.
module tb_correlator;
  import uwb_pkg::*;
  localparam int unsigned NL = N_OFF, NA = N_ACC;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [PMF_W-1:0] pmf_in [NL];
  logic [NA-1:0] pn_code = '0;
  logic [$clog2(NA)-1:0] chip_idx;
  logic sym_last, out_valid;
  logic signed [PMF_W-1:0] corr_out [NL];
  int checks = 0, failures = 0;
  int acc [NL];
  int cnt = 0, symbols = 0, pending = 0, n_neg = 0, n_pos = 0;
  int exp_out [NL];

  correlator dut (.clk, .rst_n, .in_valid, .pmf_in, .pn_code, .chip_idx,
                  .sym_last, .out_valid, .corr_out);

  always #5 clk = ~clk;

  function automatic int floor_div(input int a, input int b);
    int q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q -= 1;
    return q;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < int'(NL); l++) begin pmf_in[l] = '0; acc[l] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      @(negedge clk);
      // check what the last edge produced
      checks++;
      if (out_valid !== (pending != 0)) begin
        failures++; $display("FAIL out_valid cycle %0d", cyc);
      end
      if (pending != 0) begin
        for (int l = 0; l < int'(NL); l++) begin
          checks++;
          if (int'(corr_out[l]) != exp_out[l]) begin
            failures++;
            if (failures < 10) $display("FAIL sym %0d lane %0d got %0d exp %0d", symbols, l, corr_out[l], exp_out[l]);
          end
        end
      end
      pending = 0;
      checks++;
      if (int'(chip_idx) != cnt) begin failures++; $display("FAIL chip_idx %0d exp %0d", chip_idx, cnt); end
      // new inputs
      if (cnt == 0) pn_code = (symbols == 0) ? '1 : (symbols == 1) ? '0 : NA'($urandom);
      in_valid = ($urandom_range(0, 3) != 0);
      for (int l = 0; l < int'(NL); l++)
        pmf_in[l] = (symbols < 2) ? PMF_W'(-(1 << (PMF_W - 1))) : PMF_W'($urandom);
      if (in_valid) begin
        int sgn;
        sgn = pn_code[cnt] ? -1 : 1;
        if (sgn < 0) n_neg++; else n_pos++;
        for (int l = 0; l < int'(NL); l++) acc[l] += sgn * int'(pmf_in[l]);
        cnt++;
        if (cnt == int'(NA)) begin
          for (int l = 0; l < int'(NL); l++) begin
            int v;
            v = floor_div(acc[l], NA);
            if (v > (1 << (PMF_W - 1)) - 1) v = (1 << (PMF_W - 1)) - 1;
            if (v < -(1 << (PMF_W - 1))) v = -(1 << (PMF_W - 1));
            exp_out[l] = v;
            acc[l] = 0;
          end
          cnt = 0; pending = 1; symbols++;
        end
      end
      #1;
      checks++;
      if (sym_last !== (pending != 0)) begin failures++; $display("FAIL sym_last cycle %0d", cyc); end
    end
    checks++;
    if (symbols < 20 || n_neg == 0 || n_pos == 0) begin
      failures++; $display("FAIL coverage symbols=%0d neg=%0d pos=%0d", symbols, n_neg, n_pos);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
