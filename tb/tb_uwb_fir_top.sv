// End-to-end test of the UWB correlator chain at its default size.
//
// The test loads a random 64-word pulse template through the coefficient
// port and a PN seed, then streams frames of 16 samples. In "signal"
// phases every frame carries a copy of the template (halved to fit 4 bits)
// at a fixed offset, with the sign of that frame's PN chip, plus noise; in
// "noise" phases the frames hold small noise only. An integer reference
// model of the whole chain (79-sample window, 16 dot products, PN-signed
// accumulation of 16 frames divided by 16, maximum with first-index
// tie rule, threshold compare) predicts every PMF output, every
// correlator output and every detection result, and the cycle on which
// each must appear (3, 4 and 6 cycles after the accepted frame). Every
// symbol of a signal phase must also be detected at the offset where the
// template was placed.
// Coverage counters require each mechanism to occur: idle (stall) cycles
// inside a symbol, +1 and -1 chips, detections and non-detections,
// coefficient reloads and PN reloads.
module tb_uwb_fir_top;
  import uwb_pkg::*;
  localparam int A_W = $clog2(N_COEF);
  localparam int LAT_PMF = 3, LAT_CORR = 4, LAT_DET = 6;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [X_W-1:0] in_samples [N_OFF];
  logic coef_wr_en = 0;
  logic [A_W-1:0] coef_wr_addr = '0;
  logic signed [C_W-1:0] coef_wr_data = '0;
  logic pn_load = 0;
  logic [PN_W-1:0] pn_seed = '0;
  logic signed [PMF_W-1:0] threshold = '0;
  logic pmf_valid, corr_valid, det_valid, detected;
  logic signed [PMF_W-1:0] pmf_out [N_OFF];
  logic signed [PMF_W-1:0] corr_out [N_OFF];
  logic signed [PMF_W-1:0] peak_val;
  logic [ADDR_W-1:0] peak_addr;

  uwb_fir_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  // reference state
  int coef_r [N_COEF];
  int hist [$];
  int acc [N_OFF];
  int chip_cnt = 0;
  int code_r = 0;
  // expected results: values and due cycles
  int pmf_exp [$], pmf_due [$];
  int corr_exp [$], corr_due [$];
  int det_exp [$], det_due [$];   // packed {detected, addr, value}
  // coverage
  int sig_addr = 0;     // offset (1..16) the template is placed at, 0 in noise phases
  int n_addr_ok = 0;
  int n_stall = 0, n_neg = 0, n_pos = 0, n_det = 0, n_nodet = 0, n_coef_load = 0, n_pn_load = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic int next_state(input int s);
    return (s >> 1) | (((s & 1) ^ ((s >> 1) & 1)) << 6);
  endfunction
  function automatic int code_of(input int s0);
    int s, c;
    s = s0; c = 0;
    for (int i = 0; i < int'(N_ACC); i++) begin c |= (s & 1) << i; s = next_state(s); end
    return c;
  endfunction
  function automatic int floor_div(input int a, input int b);
    int q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q -= 1;
    return q;
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL cycle %0d: %s", cycle, msg);
  endtask

  // Monitor: compares outputs at the negative edge.
  always @(negedge clk) if (rst_n) begin
    if (pmf_valid) begin
      checks++;
      if (pmf_due.size() == 0) fail("unexpected pmf_valid");
      else begin
        int due;
        due = pmf_due.pop_front();
        if (due != cycle) fail($sformatf("pmf latency: due %0d", due));
        for (int k = 0; k < int'(N_OFF); k++) begin
          int e;
          e = pmf_exp.pop_front();
          checks++;
          if (int'(pmf_out[k]) != e) fail($sformatf("pmf[%0d] got %0d exp %0d", k, pmf_out[k], e));
        end
      end
    end else if (pmf_due.size() != 0 && pmf_due[0] <= cycle) begin
      fail("missing pmf_valid"); void'(pmf_due.pop_front());
      for (int k = 0; k < int'(N_OFF); k++) void'(pmf_exp.pop_front());
    end
    if (corr_valid) begin
      checks++;
      if (corr_due.size() == 0) fail("unexpected corr_valid");
      else begin
        int due;
        due = corr_due.pop_front();
        if (due != cycle) fail($sformatf("corr latency: due %0d", due));
        for (int k = 0; k < int'(N_OFF); k++) begin
          int e;
          e = corr_exp.pop_front();
          checks++;
          if (int'(corr_out[k]) != e) fail($sformatf("corr[%0d] got %0d exp %0d", k, corr_out[k], e));
        end
      end
    end
    if (det_valid) begin
      checks++;
      if (det_due.size() == 0) fail("unexpected det_valid");
      else begin
        int due, e;
        due = det_due.pop_front();
        e = det_exp.pop_front();
        checks++;
        if (due != cycle) fail($sformatf("det latency: due %0d", due));
        if (int'(detected) != ((e >> 24) & 1) || int'(peak_addr) != ((e >> 16) & 255) ||
            int'(peak_val) != int'(16'(e) << 1) / 2)
          fail($sformatf("det got %0d %0d@%0d exp %h", detected, peak_val, peak_addr, e));
        if (detected) n_det++; else n_nodet++;
        if (sig_addr != 0) begin
          checks++;
          if (!detected || int'(peak_addr) != sig_addr)
            fail($sformatf("signal at offset %0d: detected=%0d addr=%0d", sig_addr, detected, peak_addr));
          else n_addr_ok++;
        end
      end
    end
  end

  // Reference model of one accepted frame at the current cycle.
  task automatic model_frame(input int smp [N_OFF]);
    int w [N_TAPS];
    int p [N_OFF];
    int sgn, t0;
    t0 = cycle;
    for (int j = 0; j < int'(N_OFF); j++) hist.push_back(smp[j]);
    for (int i = 0; i < int'(N_TAPS); i++) w[i] = hist[hist.size() - N_TAPS + i];
    for (int k = 0; k < int'(N_OFF); k++) begin
      p[k] = 0;
      for (int i = 0; i < int'(N_COEF); i++) p[k] += w[k + i] * coef_r[i];
      pmf_exp.push_back(p[k]);
    end
    pmf_due.push_back(t0 + LAT_PMF);
    sgn = ((code_r >> chip_cnt) & 1) ? -1 : 1;
    if (sgn < 0) n_neg++; else n_pos++;
    for (int k = 0; k < int'(N_OFF); k++) acc[k] += sgn * p[k];
    chip_cnt++;
    if (chip_cnt == int'(N_ACC)) begin
      int mv, ma;
      mv = 0; ma = 0;
      for (int k = 0; k < int'(N_OFF); k++) begin
        int v;
        v = floor_div(acc[k], N_ACC);
        if (v > 16383) v = 16383;
        if (v < -16384) v = -16384;
        corr_exp.push_back(v);
        if (k == 0 || v > mv) begin mv = v; ma = k + 1; end
        acc[k] = 0;
      end
      corr_due.push_back(t0 + LAT_CORR);
      det_exp.push_back(((mv > int'(threshold)) ? (1 << 24) : 0) | (ma << 16) | (mv & 16'hffff));
      det_due.push_back(t0 + LAT_DET);
      chip_cnt = 0;
    end
  endtask

  task automatic idle(input int n);
    repeat (n) begin @(negedge clk); in_valid = 0; end
  endtask

  task automatic load_coefs();
    for (int i = 0; i < int'(N_COEF); i++) begin
      @(negedge clk);
      coef_wr_en = 1; coef_wr_addr = A_W'(i);
      coef_wr_data = (n_coef_load == 0 && i < 2) ? C_W'(-16) : C_W'($urandom);
      coef_r[i] = int'(coef_wr_data);
    end
    @(negedge clk); coef_wr_en = 0;
    n_coef_load++;
  endtask

  task automatic load_pn(input int seed);
    @(negedge clk);
    pn_load = 1; pn_seed = PN_W'(seed);
    @(negedge clk);
    pn_load = 0;
    code_r = code_of(seed);
    n_pn_load++;
  endtask

  // Stream nsym symbols; signal != 0 embeds the template at offset off.
  task automatic run_symbols(input int nsym, input bit signal, input int off);
    int stream [$];
    int frames, base;
    frames = nsym * N_ACC;
    sig_addr = signal ? off : 0;
    base = hist.size();
    for (int n = 0; n < frames * int'(N_OFF) + N_COEF; n++) stream.push_back(0);
    if (signal)
      for (int f = 0; f < frames; f++) begin
        int sg;
        // a pulse starting in frame f is wholly in the window 4 frames later
        sg = ((code_r >> ((f + 4) % N_ACC)) & 1) ? -1 : 1;
        for (int i = 0; i < int'(N_COEF); i++)
          stream[f * N_OFF + off + i] += sg * floor_div(coef_r[i], 2);
      end
    for (int f = 0; f < frames; f++) begin
      int smp [N_OFF];
      // idle cycles, some in the middle of a symbol
      while ($urandom_range(0, 5) == 0) begin
        @(negedge clk); in_valid = 0;
        if (chip_cnt != 0) n_stall++;
      end
      @(negedge clk);
      for (int j = 0; j < int'(N_OFF); j++) begin
        int v;
        v = stream[f * N_OFF + j] + int'($urandom_range(0, 2)) - 1;
        if (v > 7) v = 7;
        if (v < -8) v = -8;
        smp[j] = v;
        in_samples[j] = X_W'(v);
      end
      in_valid = 1;
      model_frame(smp);
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < int'(N_OFF); j++) in_samples[j] = '0;
    for (int k = 0; k < int'(N_OFF); k++) acc[k] = 0;
    for (int i = 0; i < int'(N_COEF); i++) coef_r[i] = 0;
    for (int i = 0; i < int'(N_TAPS); i++) hist.push_back(0);
    code_r = code_of(1);   // reset seed
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    threshold = 15'sd500;
    load_coefs();
    load_pn(7'h5a);
    run_symbols(4, 1'b1, 3);
    idle(10);
    run_symbols(3, 1'b0, 0);
    idle(10);
    load_coefs();
    load_pn(7'h13);
    run_symbols(4, 1'b1, 11);
    idle(10);
    run_symbols(2, 1'b0, 0);
    idle(12);
    checks++;
    if (pmf_due.size() || corr_due.size() || det_due.size()) fail("results still outstanding");
    checks++;
    if (n_addr_ok < 6) fail($sformatf("only %0d detections at the signal offset", n_addr_ok));
    $display("coverage: stalls=%0d neg_chips=%0d pos_chips=%0d detect=%0d at_offset=%0d no_detect=%0d coef_loads=%0d pn_loads=%0d",
             n_stall, n_neg, n_pos, n_det, n_addr_ok, n_nodet, n_coef_load, n_pn_load);
    checks++;
    if (n_stall == 0 || n_neg == 0 || n_pos == 0 || n_det == 0 || n_nodet == 0 ||
        n_coef_load < 2 || n_pn_load < 2) fail("a mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
