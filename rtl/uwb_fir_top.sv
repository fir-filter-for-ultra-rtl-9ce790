// Impulse-UWB baseband correlator: pulse-matched filter, PN correlation,
// peak and threshold detection.
//
// The ADC delivers one frame of N_OFF = 16 four-bit samples per clock.
// tap_line keeps the last 79 samples; the pulse-matched filter (pmf)
// correlates them with the 64-coefficient pulse template held in coef_mem
// at 16 consecutive offsets, producing 16 15-bit values per frame. The
// correlator weights the values of successive frames with +1/-1 chips of
// the PN code from pn_gen and accumulates N_ACC frames into one symbol.
// Once per symbol, the peak_detector picks the largest of the 16 symbol
// values and its offset (1..16), and the threshold_detector flags
// detection when that value is above `threshold`.
//
// Interface: in_valid/in_samples carry frames (in_samples[0] earliest);
// idle cycles are allowed and stall the chain. Coefficients are written one
// word at a time, the PN seed with pn_load; both should change between
// symbols. pmf_* and corr_* expose the intermediate results.
// Timing: pmf_out appears 3 cycles after its frame is accepted (tap window
// 1, PMF 2); corr_out 1 cycle after the PMF output of the symbol's last
// frame; the detection result 2 cycles after corr_out.
// Sizes of window, template and widths follow the filter specification;
// the frame interface, N_ACC, the LFSR code and the pipeline registers are
// this design's choices.
module uwb_fir_top
  import uwb_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [X_W-1:0]    in_samples [N_OFF],
  input  logic                     coef_wr_en,
  input  logic [$clog2(N_COEF)-1:0] coef_wr_addr,
  input  logic signed [C_W-1:0]    coef_wr_data,
  input  logic                     pn_load,
  input  logic [PN_W-1:0]          pn_seed,
  input  logic signed [PMF_W-1:0]  threshold,
  output logic                     pmf_valid,
  output logic signed [PMF_W-1:0]  pmf_out  [N_OFF],
  output logic                     corr_valid,
  output logic signed [PMF_W-1:0]  corr_out [N_OFF],
  output logic                     det_valid,
  output logic                     detected,
  output logic signed [PMF_W-1:0]  peak_val,
  output logic [ADDR_W-1:0]        peak_addr
);
  logic                  taps_valid;
  logic signed [X_W-1:0] taps [N_TAPS];
  logic signed [C_W-1:0] coef [N_COEF];
  logic [N_ACC-1:0]      pn_code;
  logic [$clog2(N_ACC)-1:0] chip_idx;
  logic                  sym_last;
  logic                  pk_valid;
  logic signed [PMF_W-1:0] pk_val;
  logic [ADDR_W-1:0]     pk_addr;

  tap_line u_taps (
    .clk, .rst_n, .in_valid, .in_samples, .taps_valid, .taps
  );

  coef_mem u_coef (
    .clk, .rst_n, .wr_en(coef_wr_en), .wr_addr(coef_wr_addr),
    .wr_data(coef_wr_data), .coef
  );

  pmf u_pmf (
    .clk, .rst_n, .in_valid(taps_valid), .taps, .coef,
    .out_valid(pmf_valid), .pmf_out
  );

  pn_gen u_pn (
    .clk, .rst_n, .load(pn_load), .seed(pn_seed), .code(pn_code)
  );

  correlator u_corr (
    .clk, .rst_n, .in_valid(pmf_valid), .pmf_in(pmf_out), .pn_code,
    .chip_idx, .sym_last, .out_valid(corr_valid), .corr_out
  );

  peak_detector u_peak (
    .clk, .rst_n, .in_valid(corr_valid), .din(corr_out),
    .out_valid(pk_valid), .max_val(pk_val), .max_addr(pk_addr)
  );

  threshold_detector u_thr (
    .clk, .rst_n, .in_valid(pk_valid), .max_val(pk_val), .max_addr(pk_addr),
    .threshold, .det_valid, .detected, .peak_val, .peak_addr
  );

  // chip_idx and sym_last are for observation in simulation only.
  logic unused_ok;
  assign unused_ok = ^{chip_idx, sym_last};
endmodule
