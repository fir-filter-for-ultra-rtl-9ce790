// Sample window (filter taps) in front of the pulse-matched filter.
//
// Holds the N_TAPS most recent ADC samples. The ADC delivers BLOCK samples
// per clock (one pulse frame); on every cycle with in_valid the window moves
// by BLOCK samples: the oldest BLOCK samples drop out and in_samples enter at
// the new end. taps[0] is the oldest sample and taps[N_TAPS-1] the newest;
// in_samples[0] is the earliest sample of the arriving frame.
//
// With N_TAPS = 79 and BLOCK = 16 the filter's 16 offsets in one cycle
// start right where the offsets of the previous cycle stopped, so every
// sample position is tried once. The 79-tap window follows the filter
// specification; the 16-sample frame interface is this design's choice.
//
// Timing: taps and taps_valid are registered; taps_valid is in_valid
// delayed by one cycle. Reset clears the window to zero (synchronous,
// active low).
module tap_line
  import uwb_pkg::*;
#(
  parameter int unsigned N_TAPS_P = N_TAPS,
  parameter int unsigned BLOCK    = N_OFF,
  parameter int unsigned X_W_P    = X_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [X_W_P-1:0] in_samples [BLOCK],
  output logic                    taps_valid,
  output logic signed [X_W_P-1:0] taps       [N_TAPS_P]
);
  initial assert (BLOCK <= N_TAPS_P) else $error("BLOCK larger than window");

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      taps_valid <= 1'b0;
      for (int i = 0; i < int'(N_TAPS_P); i++) taps[i] <= '0;
    end else begin
      taps_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < int'(N_TAPS_P - BLOCK); i++) taps[i] <= taps[i + BLOCK];
        for (int j = 0; j < int'(BLOCK); j++) taps[N_TAPS_P - BLOCK + j] <= in_samples[j];
      end
    end
  end
endmodule
