// Self-checking test of pn_gen: the code word after reset and after each
// seed load must equal the first 16 outputs of a 7-bit LFSR with taps at
// bits 0 and 1 (x^7 + x + 1 style feedback into bit 6), computed here with
// integer arithmetic; the reference sequence is also checked to have
// period 127.
module tb_pn_gen;
  import uwb_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  logic [PN_W-1:0] seed = '0;
  logic [N_ACC-1:0] code;
  int checks = 0, failures = 0;

  pn_gen dut (.clk, .rst_n, .load, .seed, .code);

  always #5 clk = ~clk;

  function automatic int next_state(input int s);
    int fb;
    fb = (s & 1) ^ ((s >> 1) & 1);
    return (s >> 1) | (fb << 6);
  endfunction

  function automatic int ref_code(input int s0);
    int s, c;
    s = s0; c = 0;
    for (int i = 0; i < int'(N_ACC); i++) begin
      c |= (s & 1) << i;
      s = next_state(s);
    end
    return c;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, period;
    s = 1; period = 0;
    do begin s = next_state(s); period++; end while (s != 1 && period < 1000);
    checks++;
    if (period != 127) begin failures++; $display("FAIL reference period %0d", period); end

    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (int'(code) != ref_code(1)) begin failures++; $display("FAIL reset code %h exp %h", code, ref_code(1)); end
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int prev_code;
      @(negedge clk);
      prev_code = int'(code);
      load = ($urandom_range(0, 1) != 0);
      seed = PN_W'($urandom);
      @(posedge clk); #1;
      checks++;
      if (load ? (int'(code) != ref_code(int'(seed))) : (int'(code) != prev_code)) begin
        failures++;
        $display("FAIL load=%0d seed=%h code=%h exp=%h", load, seed, code, load ? ref_code(int'(seed)) : prev_code);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
