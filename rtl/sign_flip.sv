// Multiply-by-(+1/-1) unit of the correlator.
//
// A full multiplier is not needed to apply a +/-1 pseudo-random chip: a
// two-input mux chooses between the input and its negation, with the chip
// as select (neg = 0 passes d, neg = 1 gives -d). This follows the
// correlator's bit-flip block, where the select is a slice of the code
// word. The result is one bit wider than the input so that negating the
// most negative input cannot overflow (a choice of this design).
// Purely combinational.
module sign_flip #(
  parameter int unsigned IN_W = 15
) (
  input  logic signed [IN_W-1:0] d,
  input  logic                   neg,
  output logic signed [IN_W:0]   q
);
  logic signed [IN_W:0] d_ext;

  always_comb begin
    d_ext = {d[IN_W-1], d};
    q     = neg ? -d_ext : d_ext;
  end
endmodule
