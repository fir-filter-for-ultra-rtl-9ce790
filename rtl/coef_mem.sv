// Coefficient store of the pulse-matched filter.
//
// N_COEF signed words of C_W bits hold the sampled template of the pulse
// being searched for (64 words of 5 bits by default). A host writes one
// word per cycle through wr_en / wr_addr / wr_data; all words are read in
// parallel on coef, as the filter multiplies every tap at once.
//
// Timing: a write takes effect at the clock edge; coef shows it from the
// next cycle. Writes to addresses >= N_COEF are ignored. Reset clears all
// words to zero. The write port and reset value are this design's choice;
// the document only shows the coefficients as an input of the filter.
module coef_mem
  import uwb_pkg::*;
#(
  parameter int unsigned N_COEF_P = N_COEF,
  parameter int unsigned C_W_P    = C_W,
  parameter int unsigned A_W      = $clog2(N_COEF_P)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    wr_en,
  input  logic [A_W-1:0]          wr_addr,
  input  logic signed [C_W_P-1:0] wr_data,
  output logic signed [C_W_P-1:0] coef [N_COEF_P]
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_COEF_P); i++) coef[i] <= '0;
    end else if (wr_en && (32'(wr_addr) < N_COEF_P)) begin
      coef[wr_addr] <= wr_data;
    end
  end
endmodule
