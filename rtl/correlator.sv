// Correlation block: PN-signed accumulation of pulse-matched-filter outputs.
//
// Each of the N_OFF lanes takes one PMF output per accepted cycle,
// multiplies it by the current pseudo-random chip (+1 or -1) with a
// sign_flip mux, and adds it into an accumulator clocked at the input rate.
// After N_ACC inputs (one symbol) the lane's sum is latched into an output
// register that therefore changes at rate f/N_ACC, and the accumulator
// starts again. The chip for the i-th input of a symbol is bit i of the
// code word pn_code (a slice of the code, as in the bit-flip block); bit
// value 1 means multiply by -1.
//
// Output width: the accumulated sum needs IN_W + log2(N_ACC) bits; the
// peak detector after it takes 15-bit values, so the sum is divided by
// N_ACC (arithmetic shift right by OUT_SHIFT, rounding toward minus
// infinity) to give the mean per pulse, and saturated to OUT_W bits (only
// +2^(OUT_W-1) itself can exceed the range). This scaling and N_ACC = 16
// are choices of this design.
//
// Interface: in_valid qualifies pmf_in; idle cycles freeze the lanes and
// the chip counter. chip_idx is the position of the current input in the
// symbol; sym_last is high (combinationally) on the input that completes a
// symbol.
// Timing: out_valid pulses for one cycle, the cycle after the last input
// of a symbol. Reset (synchronous, active low) restarts the symbol.
module correlator
  import uwb_pkg::*;
#(
  parameter int unsigned N_LANE    = N_OFF,
  parameter int unsigned IN_W      = PMF_W,
  parameter int unsigned N_ACC_P   = N_ACC,
  parameter int unsigned OUT_W     = PMF_W,
  localparam int unsigned ACC_W    = IN_W + 1 + $clog2(N_ACC_P),
  parameter int unsigned OUT_SHIFT = $clog2(N_ACC_P),
  localparam int unsigned CNT_W    = (N_ACC_P > 1) ? $clog2(N_ACC_P) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [IN_W-1:0] pmf_in   [N_LANE],
  input  logic [N_ACC_P-1:0]     pn_code,
  output logic [CNT_W-1:0]       chip_idx,
  output logic                   sym_last,
  output logic                   out_valid,
  output logic signed [OUT_W-1:0] corr_out [N_LANE]
);
  logic                    chip;
  logic signed [ACC_W-1:0] acc      [N_LANE];
  logic signed [ACC_W-1:0] acc_next [N_LANE];
  logic signed [OUT_W-1:0] scaled   [N_LANE];

  localparam logic signed [ACC_W-1:0] MAX_OUT = ACC_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] MIN_OUT = -ACC_W'(1 << (OUT_W - 1));

  always_comb begin
    chip     = pn_code[chip_idx];
    sym_last = in_valid && (32'(chip_idx) == N_ACC_P - 1);
  end

  for (genvar l = 0; l < int'(N_LANE); l++) begin : g_lane
    logic signed [IN_W:0] signed_in;
    sign_flip #(.IN_W(IN_W)) u_flip (.d(pmf_in[l]), .neg(chip), .q(signed_in));
    logic signed [ACC_W-1:0] shifted;
    always_comb begin
      acc_next[l] = ((chip_idx == '0) ? ACC_W'(0) : acc[l]) + ACC_W'(signed_in);
      shifted     = acc_next[l] >>> OUT_SHIFT;
      if (shifted > MAX_OUT)      scaled[l] = OUT_W'(MAX_OUT);
      else if (shifted < MIN_OUT) scaled[l] = OUT_W'(MIN_OUT);
      else                        scaled[l] = OUT_W'(shifted);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      chip_idx  <= '0;
      out_valid <= 1'b0;
      for (int l = 0; l < int'(N_LANE); l++) begin
        acc[l]      <= '0;
        corr_out[l] <= '0;
      end
    end else begin
      out_valid <= sym_last;
      if (in_valid) begin
        chip_idx <= sym_last ? '0 : chip_idx + 1'b1;
        for (int l = 0; l < int'(N_LANE); l++) acc[l] <= acc_next[l];
        if (sym_last)
          for (int l = 0; l < int'(N_LANE); l++)
            corr_out[l] <= scaled[l];
      end
    end
  end
endmodule
