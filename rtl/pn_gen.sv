// Pseudo-random code generator for the correlator.
//
// Produces the N_ACC-chip code word that gives each pulse of a symbol its
// +1/-1 weight. The chips are the first N_ACC output bits of a PN_W-bit
// Fibonacci LFSR started from a seed: chip 0 is bit 0 of the seed, and
// each step shifts the state right and inserts at the top the parity of
// (state & MASK). The default mask gives a maximal-length sequence of
// period 127. The code must match the transmitter's pattern, so the seed
// is loadable.
//
// Interface: load with seed writes a new code word; code holds it.
// Timing: the code word is registered and appears the cycle after load.
// Reset loads RESET_SEED. The document names a PN generator but does not
// describe it; the LFSR and its size are this design's choice.
module pn_gen
  import uwb_pkg::*;
#(
  parameter int unsigned N_CHIP     = N_ACC,
  parameter int unsigned W          = PN_W,
  parameter logic [W-1:0] MASK      = PN_MASK,
  parameter logic [W-1:0] RESET_SEED = W'(1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [W-1:0]      seed,
  output logic [N_CHIP-1:0] code
);
  // Unrolled LFSR: chips of a code word for a given start state.
  function automatic logic [N_CHIP-1:0] chips_of(input logic [W-1:0] start);
    logic [W-1:0] s;
    logic [N_CHIP-1:0] c;
    s = start;
    for (int i = 0; i < int'(N_CHIP); i++) begin
      c[i] = s[0];
      s    = {^(s & MASK), s[W-1:1]};
    end
    return c;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n)    code <= chips_of(RESET_SEED);
    else if (load) code <= chips_of(seed);
  end
endmodule
