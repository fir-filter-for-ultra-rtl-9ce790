// Peak detector: maximum of the correlator outputs and its address.
//
// Finds the largest of N_IN signed W-bit inputs (16 values of 15 bits by
// default) and reports the value and its address, numbered 1..N_IN (offset
// 1 is din[0]). The comparison is a balanced tree of two-input
// compare-select cells, log2(16) = 4 levels deep; on a tie the lower
// address wins. Values are compared as signed numbers, so a strongly
// negative correlation does not count as a peak; tree organisation, tie
// rule and signed comparison are this design's choices.
//
// Timing: the result is registered: max_val / max_addr / out_valid appear
// one cycle after din / in_valid. Reset clears them.
module peak_detector
  import uwb_pkg::*;
#(
  parameter int unsigned N_IN = N_OFF,
  parameter int unsigned W    = PMF_W,
  parameter int unsigned A_W  = $clog2(N_IN + 1),
  localparam int unsigned NL  = 1 << $clog2(N_IN)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] din [N_IN],
  output logic                out_valid,
  output logic signed [W-1:0] max_val,
  output logic [A_W-1:0]      max_addr
);
  // Heap-ordered tree: node n compares nodes 2n and 2n+1; leaves hold the
  // inputs, unused leaves are marked empty so they never win.
  logic signed [W-1:0] val  [2*NL];
  logic [A_W-1:0]      addr [2*NL];
  logic                used [2*NL];

  always_comb begin
    val[0] = '0; addr[0] = '0; used[0] = 1'b0;
    for (int i = 0; i < int'(NL); i++) begin
      used[NL + i] = (i < int'(N_IN));
      val[NL + i]  = (i < int'(N_IN)) ? din[i] : '0;
      addr[NL + i] = A_W'(i + 1);
    end
    for (int n = int'(NL) - 1; n >= 1; n--) begin
      // Take the right child only if it is strictly larger (or the left is empty).
      if (used[2*n + 1] && (!used[2*n] || val[2*n + 1] > val[2*n])) begin
        val[n] = val[2*n + 1]; addr[n] = addr[2*n + 1];
      end else begin
        val[n] = val[2*n];     addr[n] = addr[2*n];
      end
      used[n] = used[2*n] || used[2*n + 1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      max_val   <= '0;
      max_addr  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        max_val  <= val[1];
        max_addr <= addr[1];
      end
    end
  end
endmodule
