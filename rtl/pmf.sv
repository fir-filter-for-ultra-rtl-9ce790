// Pulse-matched filter (PMF): fully parallel multiply and adder tree.
//
// For every offset k in 0..N_OFF-1 the filter forms the dot product
//     pmf_out[k] = sum_{i=0}^{N_COEF-1} taps[k+i] * coef[i]
// of the 64 taps starting at k with the 64 template coefficients, so the
// 79-sample window yields 16 correlation values per cycle. With 4-bit
// samples and 5-bit coefficients each product needs 9 bits and the sum of
// 64 of them fits in 15 bits. This is the parallel organisation (one
// multiply-and-add chain per offset); the additions of each chain are done
// as a balanced binary tree of log2(64) = 6 levels rather than a serial
// chain, the improvement the filter description suggests.
//
// Timing: with PIPELINE = 1 (default) the products are registered, then the
// adder tree feeds the output register: latency 2 cycles, one result set
// per cycle. PIPELINE = 0 gives latency 1. out_valid follows in_valid with
// the same latency. The pipeline register between multipliers and adders
// is this design's use of the pipelining technique; its place is not
// given by the document. Reset clears the valid bits and the registers.
module pmf
  import uwb_pkg::*;
#(
  parameter int unsigned N_TAPS_P = N_TAPS,
  parameter int unsigned N_COEF_P = N_COEF,
  parameter int unsigned X_W_P    = X_W,
  parameter int unsigned C_W_P    = C_W,
  parameter int unsigned OUT_W    = PMF_W,
  parameter bit          PIPELINE = 1'b1,
  localparam int unsigned NO      = N_TAPS_P - N_COEF_P + 1,
  localparam int unsigned P_W     = X_W_P + C_W_P,
  localparam int unsigned LEVELS  = $clog2(N_COEF_P),
  localparam int unsigned NLEAF   = 1 << LEVELS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [X_W_P-1:0] taps    [N_TAPS_P],
  input  logic signed [C_W_P-1:0] coef    [N_COEF_P],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] pmf_out [NO]
);
  // Products of offset k, tap i: prod_c combinational, prod_q the value
  // the adder tree sees (registered when PIPELINE is set).
  logic signed [P_W-1:0] prod_c [NO][N_COEF_P];
  logic signed [P_W-1:0] prod_q [NO][N_COEF_P];
  logic                  prod_valid;
  logic signed [OUT_W-1:0] sum_c [NO];

  for (genvar k = 0; k < int'(NO); k++) begin : g_off
    for (genvar i = 0; i < int'(N_COEF_P); i++) begin : g_mul
      assign prod_c[k][i] = P_W'(taps[k + i]) * P_W'(coef[i]);
      if (PIPELINE) begin : g_pipe
        always_ff @(posedge clk) begin
          if (!rst_n) prod_q[k][i] <= '0;
          else        prod_q[k][i] <= prod_c[k][i];
        end
      end else begin : g_comb
        assign prod_q[k][i] = prod_c[k][i];
      end
    end
  end

  if (PIPELINE) begin : g_vpipe
    always_ff @(posedge clk) begin
      if (!rst_n) prod_valid <= 1'b0;
      else        prod_valid <= in_valid;
    end
  end else begin : g_vcomb
    assign prod_valid = in_valid;
  end

  // One adder tree per offset, written level by level: level 0 holds the
  // products (padded with zeros to NLEAF), each node of level lv+1 adds two
  // neighbouring nodes of level lv, and the single node of the last level
  // is the sum.
  for (genvar k = 0; k < int'(NO); k++) begin : g_tree
    for (genvar lv = 0; lv <= int'(LEVELS); lv++) begin : g_lvl
      logic signed [OUT_W-1:0] s [NLEAF >> lv];
      for (genvar n = 0; n < int'(NLEAF >> lv); n++) begin : g_node
        if (lv == 0) begin : g_leaf
          if (n < int'(N_COEF_P)) begin : g_prod
            assign s[n] = OUT_W'(prod_q[k][n]);
          end else begin : g_pad
            assign s[n] = '0;
          end
        end else begin : g_add
          assign s[n] = g_lvl[lv-1].s[2*n] + g_lvl[lv-1].s[2*n + 1];
        end
      end
    end
    assign sum_c[k] = g_lvl[LEVELS].s[0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < int'(NO); k++) pmf_out[k] <= '0;
    end else begin
      out_valid <= prod_valid;
      for (int k = 0; k < int'(NO); k++) pmf_out[k] <= sum_c[k];
    end
  end
endmodule
