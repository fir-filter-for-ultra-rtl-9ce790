// Threshold detector: decides whether the searched pattern is present.
//
// The peak value of a symbol is compared with a programmable threshold;
// a value strictly above it means the pattern was detected. The peak value
// and its address are passed on with the decision so that a later stage
// knows where in the frame the pattern lies. The compare follows the
// filter description; the signed comparison and the registered outputs
// are this design's choices.
//
// Timing: det_valid / detected / peak_val / peak_addr are registered, one
// cycle after in_valid. Reset clears them.
module threshold_detector
  import uwb_pkg::*;
#(
  parameter int unsigned W   = PMF_W,
  parameter int unsigned A_W = ADDR_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] max_val,
  input  logic [A_W-1:0]      max_addr,
  input  logic signed [W-1:0] threshold,
  output logic                det_valid,
  output logic                detected,
  output logic signed [W-1:0] peak_val,
  output logic [A_W-1:0]      peak_addr
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      det_valid <= 1'b0;
      detected  <= 1'b0;
      peak_val  <= '0;
      peak_addr <= '0;
    end else begin
      det_valid <= in_valid;
      if (in_valid) begin
        detected  <= max_val > threshold;
        peak_val  <= max_val;
        peak_addr <= max_addr;
      end
    end
  end
endmodule
